// tb_upgma_full: the processing element at its default size (256 taxa,
// four-cycle reads) running the benchmark taxa counts 10, 16, 32, 50, 57,
// 64, 75, 100, 128, 150, 175, 200, 225 and 256, one random data set each
// (distances up to 1000, some values repeated). For every run the host loads
// the matrix over the LAD port, starts the engine, waits for the interrupt
// and reads the whole tree back; each merge record, the root word and the
// busy cycle count are compared with the reference model. The busy cycles
// of each size are printed. As in tb_upgma_pe, the test counts new minima,
// equal distances, skipped slots, read waits, averages, interrupts and host
// accesses while busy, and fails if one of them never happens.
module tb_upgma_full;
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
  localparam int SIZES [14] = '{10, 16, 32, 50, 57, 64, 75, 100, 128, 150, 175, 200, 225, 256};

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
    repeat (400000000) @(posedge clk);
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

    foreach (SIZES[k]) begin
      gen(SIZES[k], 1000, SIZES[k] / 4, 1000 + k);
      host_run(SIZES[k], SIZES[k]);
      check_tree(SIZES[k]);
      $display("taxa %0d: engine busy %0d cycles", SIZES[k], n_cycles);
    end

    $display("mechanisms: new_min=%0d tie=%0d skip_removed=%0d read_wait=%0d avg=%0d irq=%0d busy_access=%0d clamp=%0d",
             c_newmin, c_tie, c_skip, c_wait, c_avg, c_irq, c_busy_access, c_clamp);
    check(c_newmin > 0, "new minimum never stored");
    check(c_tie > 0, "equal distance never seen");
    check(c_skip > 0, "removed slot never skipped");
    check(c_wait > 0, "read latency wait never happened");
    check(c_avg > 0, "no average computed");
    check(c_irq == 14, $sformatf("interrupts %0d", c_irq));
    check(c_busy_access > 0, "no host access while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
