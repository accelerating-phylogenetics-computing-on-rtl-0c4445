// tb_upgma_pe: end-to-end test of the processing element as the host sees
// it. The host loads the distance matrix into the Left bank over the LAD
// port, writes the taxa count and start bit, checks busy and the dropped
// memory access while the engine runs, waits for the interrupt, clears it,
// and reads the tree back from the Right bank over the LAD port.
// First run: the four-taxon example matrix with distances scaled by 256 (8
// fraction bits), checked against hand-worked values. Further runs: random
// matrices (some with many equal distances), checked against the reference
// model, including the busy cycle count. The test counts how often each
// mechanism occurs (new minimum stored, equal distance kept, removed slot
// skipped, read-latency wait, average computed, interrupt, host access while
// busy, taxa count clamped) and fails if one never happens.
module tb_upgma_pe;
  import upgma_pkg::*;
  import upgma_ref_pkg::*;
  localparam int N_MAX = 32, RD_LAT = 4;
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
  localparam int EX [4][4] = '{'{0, 6, 8, 3}, '{6, 0, 7, 9}, '{8, 7, 0, 4}, '{3, 9, 4, 0}};

  upgma_pe #(.N_MAX(N_MAX), .RD_LAT(RD_LAT)) dut (.*);
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
    repeat (3000000) @(posedge clk);
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
    logic [31:0] v, w;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // four-taxon example, distances x256
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) dmat[i][j] = 64'(EX[i][j]) * 256;
    host_run(4, 4);
    // merge 0: leaves 0 and 3 at distance 3 -> node 4 (height 1.5)
    // new distances: to 1 (6+9)/2 = 7.5, to 2 (8+4)/2 = 6
    // merge 1: node 4 and leaf 2 at 6 -> node 5 (height 3)
    // new distance to 1: (7.5*2 + 7)/3 = 7.333 -> 1877/256 truncated
    // merge 2: node 5 and leaf 1 at 7.333 -> root node 6
    host_read(SP_RIGHT, int'(ROOT_ADDR), v);
    check(v == {16'd4, 16'd6}, $sformatf("example root word %h", v));
    host_read(SP_RIGHT, int'(REC_BASE) + 0, v); host_read(SP_RIGHT, int'(REC_BASE) + 1, w);
    check(v == {16'd0, 16'd3} && w == 32'd768, $sformatf("example merge 0: %h %0d", v, w));
    host_read(SP_RIGHT, int'(REC_BASE) + 2, v); host_read(SP_RIGHT, int'(REC_BASE) + 3, w);
    check(v == {16'd4, 16'd2} && w == 32'd1536, $sformatf("example merge 1: %h %0d", v, w));
    host_read(SP_RIGHT, int'(REC_BASE) + 4, v); host_read(SP_RIGHT, int'(REC_BASE) + 5, w);
    check(v == {16'd5, 16'd1} && w == 32'd1877, $sformatf("example merge 2: %h %0d", v, w));
    host_read(SP_LEFT, 0 * N_MAX + 1, v);
    check(v == 32'd1877, "matrix entry of the merged cluster");

    // random runs
    gen(10, 1000, 3, 11);          host_run(10, 10);        check_tree(10);
    gen(16, 6, 20, 12);            host_run(16, 16);        check_tree(16);
    gen(N_MAX, 100000, 5, 13);     host_run(N_MAX, N_MAX);  check_tree(N_MAX);
    gen(N_MAX, 20, 10, 14);        host_run(N_MAX, N_MAX + 7); check_tree(N_MAX);
    gen(2, 50, 0, 15);             host_run(2, 2);          check_tree(2);

    $display("mechanisms: new_min=%0d tie=%0d skip_removed=%0d read_wait=%0d avg=%0d irq=%0d busy_access=%0d clamp=%0d",
             c_newmin, c_tie, c_skip, c_wait, c_avg, c_irq, c_busy_access, c_clamp);
    check(c_newmin > 0, "new minimum never stored");
    check(c_tie > 0, "equal distance never seen");
    check(c_skip > 0, "removed slot never skipped");
    check(c_wait > 0, "read latency wait never happened");
    check(c_avg > 0, "no average computed");
    check(c_irq == 6, $sformatf("interrupts %0d", c_irq));
    check(c_busy_access > 0, "no host access while busy");
    check(c_clamp > 0, "taxa count never clamped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
