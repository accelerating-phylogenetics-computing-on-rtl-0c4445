// tb_upgma_ctrl: the controller with its two datapath units (min_finder,
// avg_unit) and behavioural Left/Right banks, without the host interface.
// The distance matrix is written straight into the Left bank, a run is
// started, and the tree in the Right bank is compared with the reference
// model: every merge record, the root word, the number of distance reads,
// the read latency (each read must be consumed exactly RD_LAT cycles after
// it was issued) and the number of cycles the engine is busy. Runs cover 1,
// 2, 3 and N_MAX taxa, random sizes, matrices with many equal distances, and
// a taxa count above N_MAX.
module tb_upgma_ctrl;
  import upgma_pkg::*;
  import upgma_ref_pkg::*;
  localparam int N_MAX = 16, RD_LAT = 4;
  localparam int SW = $clog2(N_MAX), CW = $clog2(N_MAX + 1);

  logic clk = 0, rst_n = 0, start = 0;
  logic [CW-1:0] n_taxa = '0;
  logic busy, done;
  mem_req_t left_req, right_req;
  logic [DATA_W-1:0] left_rdata, right_rdata;
  logic mf_clear, mf_valid, mf_found, mf_take;
  logic [DATA_W-1:0] mf_d, mf_min_d;
  logic [SW-1:0] mf_i, mf_j, mf_min_i, mf_min_j;
  logic av_acc_en, av_acc_first, av_div_start, av_busy, av_done;
  logic [DATA_W-1:0] av_d, av_avg;
  logic [CW-1:0] av_h;
  logic [DATA_W+CW:0] av_num;
  logic [CW:0] av_den;
  int checks = 0, failures = 0;

  upgma_ctrl #(.N_MAX(N_MAX), .RD_LAT(RD_LAT)) dut (.*);
  min_finder #(.DATA_W(DATA_W), .IDX_W(SW)) u_min (
    .clk, .rst_n, .clear(mf_clear), .valid(mf_valid), .d(mf_d), .i(mf_i), .j(mf_j),
    .min_d(mf_min_d), .min_i(mf_min_i), .min_j(mf_min_j), .found(mf_found), .take(mf_take));
  avg_unit #(.DATA_W(DATA_W), .CNT_W(CW)) u_avg (
    .clk, .rst_n, .acc_en(av_acc_en), .acc_first(av_acc_first), .d(av_d), .h(av_h),
    .div_start(av_div_start), .busy(av_busy), .done(av_done), .avg(av_avg),
    .num(av_num), .den(av_den));
  sram_bank #(.DEPTH(1 << (2 * SW)), .RD_LAT(RD_LAT)) u_left  (.clk, .req(left_req),  .rdata(left_rdata));
  sram_bank #(.DEPTH(1024), .RD_LAT(RD_LAT)) u_right (.clk, .req(right_req), .rdata(right_rdata));

  always #5 clk = ~clk;

  // read-latency monitor
  int reads = 0, since_read = -1, lat_bad = 0, done_pulses = 0;
  longint busy_cycles = 0;
  always @(posedge clk) begin
    if (left_req.rd) begin
      reads++;
      since_read <= 0;
    end else if (since_read >= 0) begin
      since_read <= since_read + 1;
    end
    if (mf_valid || av_acc_en) begin
      if (since_read + 1 != RD_LAT) lat_bad++;
      since_read <= -1;
    end
    if (done) done_pulses++;
    if (busy) busy_cycles++;
  end

  initial begin
    repeat (400000) @(posedge clk);
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

  task automatic one_run(input int n, input int max_d, input int reps, input int unsigned seed);
    int n_eff, r0, dp0;
    longint bc0;
    logic [31:0] w;
    n_eff = (n > N_MAX) ? N_MAX : n;
    gen(n_eff, max_d, reps, seed);
    run(n_eff, RD_LAT, DATA_W + CW + 1);
    for (int i = 0; i < N_MAX; i++)
      for (int j = 0; j < N_MAX; j++)
        u_left.mem[i * N_MAX + j] = (i < n_eff && j < n_eff) ? 32'(dmat[i][j]) : 32'hFFFF_FFFF;
    for (int k = 0; k < 1024; k++) u_right.mem[k] = 32'hDEAD_BEEF;
    r0 = reads; dp0 = done_pulses; bc0 = busy_cycles;
    @(negedge clk);
    n_taxa = CW'(n); start = 1;
    @(negedge clk);
    start = 0;
    check(busy, "busy after start");
    while (!done) @(negedge clk);
    @(negedge clk);
    check(!busy && done_pulses == dp0 + 1, "single done pulse, idle after");
    w = u_right.mem[int'(ROOT_ADDR)];
    check(w == {16'(n_eff), 16'(root_id)},
          $sformatf("n=%0d root word %h expected %0d/%0d", n, w, n_eff, root_id));
    for (int m = 0; m < n_eff - 1; m++) begin
      check(u_right.mem[int'(REC_BASE) + 2 * m] == {16'(rec_a[m]), 16'(rec_b[m])} &&
            u_right.mem[int'(REC_BASE) + 2 * m + 1] == 32'(rec_d[m]),
            $sformatf("n=%0d merge %0d: %h %0d expected %0d %0d %0d", n, m,
                      u_right.mem[int'(REC_BASE) + 2 * m], u_right.mem[int'(REC_BASE) + 2 * m + 1],
                      rec_a[m], rec_b[m], rec_d[m]));
    end
    check(64'(reads - r0) == n_reads,
          $sformatf("n=%0d reads %0d expected %0d", n, reads - r0, n_reads));
    check(lat_bad == 0, "read latency");
    check(busy_cycles - bc0 == longint'(n_cycles),
          $sformatf("n=%0d busy for %0d cycles, expected %0d", n, busy_cycles - bc0, n_cycles));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    one_run(1, 10, 0, 1);
    one_run(2, 10, 0, 2);
    one_run(3, 10, 0, 3);
    one_run(N_MAX, 1000, 3, 4);
    one_run(N_MAX, 5, 10, 5);          // many equal distances
    one_run(N_MAX + 5, 100, 2, 6);     // clamped to N_MAX
    for (int t = 0; t < 12; t++)
      one_run(2 + int'($urandom % (N_MAX - 1)), (t % 2 == 1) ? 8 : 100000, 4, 100 + t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
