// tb_avg_unit: random distances and cluster sizes go through the two-term
// accumulate and the divider; the result must equal
// (d1*h1 + d2*h2) / (h1 + h2) truncated, and 'done' must come exactly
// DATA_W + CNT_W + 2 cycles after the div_start cycle (one quotient bit per
// cycle, then the registered done).
module tb_avg_unit;
  localparam int DW = 32, CW = 9;
  logic clk = 0, rst_n = 0;
  logic acc_en = 0, acc_first = 0, div_start = 0;
  logic [DW-1:0] d = '0;
  logic [CW-1:0] h = '0;
  logic busy, done;
  logic [DW-1:0] avg;
  logic [DW+CW:0] num;
  logic [CW:0] den;
  int checks = 0, failures = 0;

  avg_unit #(.DATA_W(DW), .CNT_W(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      longint unsigned d1, d2, h1, h2, expv;
      int cyc;
      int unsigned r1, r2, r3, r4;
      r1 = $urandom; r2 = $urandom; r3 = $urandom % 255; r4 = $urandom;
      if (t % 3 == 0) begin
        r1 = r1 % 100;
        r2 = r2 % 100;
      end
      r4 = r4 % (32'd255 - r3);
      d1 = 64'(r1);
      d2 = 64'(r2);
      h1 = 64'(r3) + 64'd1;
      h2 = 64'(r4) + 64'd1;
      if (t == 0) begin d1 = 64'hFFFF_FFFF; d2 = 64'hFFFF_FFFF; h1 = 255; h2 = 1; end
      expv = (d1 * h1 + d2 * h2) / (h1 + h2);
      @(negedge clk);
      acc_en = 1; acc_first = 1; d = DW'(d1); h = CW'(h1);
      @(negedge clk);
      acc_first = 0; d = DW'(d2); h = CW'(h2);
      @(negedge clk);
      acc_en = 0;
      check(num == (DW+CW+1)'(d1 * h1 + d2 * h2) && den == (CW+1)'(h1 + h2), "numerator/denominator");
      div_start = 1;
      @(negedge clk);
      div_start = 0;
      cyc = 1;
      while (!done && cyc < 200) begin
        @(negedge clk);
        cyc++;
      end
      check(cyc == DW + CW + 2, $sformatf("latency %0d", cyc));
      check(avg == DW'(expv), $sformatf("avg %0d expected %0d", avg, expv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
