// tb_upgma_permute: the benchmark procedure of random data sets and their
// permutations, on the processing element at its default size. For 16 and 64
// taxa, three random data sets are each run as generated and under nine
// random relabellings of the taxa. Every run's tree is checked against the
// reference model through the host port. Relabelling must not change the
// sequence of merge distances, and the engine's busy time may vary only
// through the order in which removed slots are stepped over: the spread of
// busy cycles over the ten runs of a data set must stay below 5 % of the
// smallest. The busy cycles are printed. Distances are drawn from 1 to 10^9
// with no value deliberately repeated, so that equal minima are unlikely and
// the merge order does not depend on the labelling.
module tb_upgma_permute;
  import upgma_pkg::*;
  import upgma_ref_pkg::*;
  localparam int N_MAX = 256, RD_LAT = 4;   // the engine's defaults
  localparam int SW = $clog2(N_MAX), CW = $clog2(N_MAX + 1);
  localparam int NUM_W = DATA_W + CW + 1;

  logic clk = 0, rst_n = 0;
  lad_space_e lad_space = SP_REG;
  logic [ADDR_W-1:0] lad_addr = '0;
  logic lad_wr = 0, lad_rd = 0;
  logic [DATA_W-1:0] lad_wdata = '0, lad_rdata;
  logic lad_rvalid, irq;
  mem_req_t left_req, right_req;
  logic [DATA_W-1:0] left_rdata, right_rdata;
  int checks = 0, failures = 0;
  localparam int PSIZES [2] = '{16, 64};
  longint unsigned base [64][64];
  longint unsigned base_d [64];
  int perm [64];

  upgma_pe dut (.*);
  sram_bank #(.DEPTH(1 << (2 * SW)), .RD_LAT(RD_LAT)) u_left  (.clk, .req(left_req),  .rdata(left_rdata));
  sram_bank #(.DEPTH(1024), .RD_LAT(RD_LAT)) u_right (.clk, .req(right_req), .rdata(right_rdata));

  always #5 clk = ~clk;

  // mechanism counters
  int c_newmin = 0, c_tie = 0, c_skip = 0, c_wait = 0, c_avg = 0;
  int c_irq = 0, c_busy_access = 0, c_clamp = 0;
  longint busy_cycles = 0;
  logic irq_q = 0;
  always @(posedge clk) begin
    if (dut.u_min.take) c_newmin++;
    if (dut.u_min.valid && dut.u_min.found && dut.u_min.d == dut.u_min.min_d) c_tie++;
    if (dut.u_ctrl.state.name() == "S_SCAN" &&
        dut.u_ctrl.active[dut.u_ctrl.si[SW-1:0]] &&
        32'(dut.u_ctrl.sj) < 32'(dut.u_ctrl.n_reg) &&
        !dut.u_ctrl.active[dut.u_ctrl.sj[SW-1:0]]) c_skip++;
    if (dut.u_ctrl.state.name() == "S_WAIT") c_wait++;
    if (dut.u_avg.done) c_avg++;
    if (irq && !irq_q) c_irq++;
    irq_q <= irq;
    if (dut.u_ctrl.busy) busy_cycles++;
  end

  initial begin
    repeat (100000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic host_write(input lad_space_e sp, input int a, input logic [31:0] v);
    @(negedge clk);
    lad_space = sp; lad_addr = ADDR_W'(a); lad_wdata = v; lad_wr = 1;
    @(negedge clk);
    lad_wr = 0;
  endtask

  task automatic host_read(input lad_space_e sp, input int a, output logic [31:0] v);
    int lat;
    @(negedge clk);
    lad_space = sp; lad_addr = ADDR_W'(a); lad_rd = 1;
    @(negedge clk);
    lad_rd = 0;
    lat = 1;
    while (!lad_rvalid && lat < 50) begin
      @(negedge clk);
      lat++;
    end
    v = lad_rdata;
  endtask

  // load dmat[0..n-1] (upper triangle), run, leave the tree in the Right bank
  task automatic host_run(input int n, input int n_req);
    logic [31:0] v;
    longint bc0;
    for (int i = 0; i < n; i++)
      for (int j = i + 1; j < n; j++)
        host_write(SP_LEFT, i * N_MAX + j, 32'(dmat[i][j]));
    bc0 = busy_cycles;
    host_write(SP_REG, int'(REG_CTRL), (32'(n_req) << CTRL_N_LSB) | 32'h3);
    host_read(SP_REG, int'(REG_STATUS), v);
    check(v[ST_BUSY] && !v[ST_DONE], "status busy during run");
    if (n >= 2) begin
      host_read(SP_RIGHT, int'(ROOT_ADDR), v);
      check(v == 0, "memory read while busy returns zero");
      c_busy_access++;
    end
    while (!irq) @(negedge clk);
    host_read(SP_REG, int'(REG_STATUS), v);
    check(!v[ST_BUSY] && v[ST_DONE] && v[ST_IRQ], "status done");
    host_write(SP_REG, int'(REG_STATUS), 32'h6);
    check(!irq, "irq cleared");
    if (n_req > N_MAX) c_clamp++;
    run(n, RD_LAT, NUM_W);
    check(busy_cycles - bc0 == longint'(n_cycles),
          $sformatf("n=%0d busy %0d cycles, expected %0d", n, busy_cycles - bc0, n_cycles));
  endtask

  task automatic check_tree(input int n);
    logic [31:0] v, w;
    host_read(SP_RIGHT, int'(ROOT_ADDR), v);
    check(v == {16'(n), 16'(root_id)}, $sformatf("n=%0d root word %h", n, v));
    for (int m = 0; m < n - 1; m++) begin
      host_read(SP_RIGHT, int'(REC_BASE) + 2 * m, v);
      host_read(SP_RIGHT, int'(REC_BASE) + 2 * m + 1, w);
      check(v == {16'(rec_a[m]), 16'(rec_b[m])} && w == 32'(rec_d[m]),
            $sformatf("n=%0d merge %0d: %h %0d expected %0d %0d %0d",
                      n, m, v, w, rec_a[m], rec_b[m], rec_d[m]));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;

    foreach (PSIZES[k]) begin
      for (int set = 0; set < 3; set++) begin
        int n;
        longint cmin, cmax;
        n = PSIZES[k];
        gen(n, 1000000000, 0, 5000 + 10 * k + set);
        for (int i = 0; i < n; i++)
          for (int j = 0; j < n; j++) base[i][j] = dmat[i][j];
        cmin = 0; cmax = 0;
        for (int p = 0; p < 10; p++) begin
          // p = 0: data set as generated; else a random relabelling
          for (int i = 0; i < n; i++) perm[i] = i;
          if (p > 0)
            for (int i = n - 1; i > 0; i--) begin
              int r, t;
              r = int'($urandom % 32'(i + 1));
              t = perm[i]; perm[i] = perm[r]; perm[r] = t;
            end
          for (int i = 0; i < n; i++)
            for (int j = 0; j < n; j++) dmat[i][j] = base[perm[i]][perm[j]];
          host_run(n, n);
          check_tree(n);
          if (p == 0) for (int m = 0; m < n - 1; m++) base_d[m] = rec_d[m];
          else begin
            bit same;
            same = 1;
            for (int m = 0; m < n - 1; m++) if (rec_d[m] != base_d[m]) same = 0;
            check(same, $sformatf("n=%0d set %0d perm %0d: merge distances differ", n, set, p));
          end
          if (p == 0 || longint'(n_cycles) < cmin) cmin = longint'(n_cycles);
          if (p == 0 || longint'(n_cycles) > cmax) cmax = longint'(n_cycles);
        end
        $display("taxa %0d set %0d: busy cycles %0d .. %0d over 10 runs", n, set, cmin, cmax);
        check((cmax - cmin) * 20 < cmin, "busy-cycle spread over permutations");
      end
    end

    $display("mechanisms: new_min=%0d tie=%0d skip_removed=%0d read_wait=%0d avg=%0d irq=%0d busy_access=%0d clamp=%0d",
             c_newmin, c_tie, c_skip, c_wait, c_avg, c_irq, c_busy_access, c_clamp);
    check(c_newmin > 0, "new minimum never stored");
    check(c_skip > 0, "removed slot never skipped");
    check(c_wait > 0, "read latency wait never happened");
    check(c_avg > 0, "no average computed");
    check(c_irq == 60, $sformatf("interrupts %0d", c_irq));
    check(c_busy_access > 0, "no host access while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
