// tb_min_finder: streams of random distances (small range, so equal values
// occur) go through min_finder; after each stream the stored minimum and its
// pair must be the first smallest value of the stream. 'take' is checked
// cycle by cycle, and the result must be visible one cycle after the last
// valid distance.
module tb_min_finder;
  localparam int DW = 32, IW = 8;
  logic clk = 0, rst_n = 0, clear = 0, valid = 0;
  logic [DW-1:0] d = '0;
  logic [IW-1:0] i = '0, j = '0;
  logic [DW-1:0] min_d;
  logic [IW-1:0] min_i, min_j;
  logic found, take;
  int checks = 0, failures = 0;

  min_finder #(.DATA_W(DW), .IDX_W(IW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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
    for (int s = 0; s < 200; s++) begin
      int len;
      logic [DW-1:0] ref_d;
      logic [IW-1:0] ref_i, ref_j;
      bit have;
      len = 1 + int'($urandom % 30);
      have = 0; ref_d = '0; ref_i = '0; ref_j = '0;
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      check(!found, "found cleared");
      for (int k = 0; k < len; k++) begin
        valid = 1;
        d = (s % 2 == 0) ? DW'($urandom % 8) : DW'($urandom);
        i = IW'($urandom); j = IW'($urandom);
        #1;
        check(take == (!have || d < ref_d), "take");
        if (!have || d < ref_d) begin
          have = 1; ref_d = d; ref_i = i; ref_j = j;
        end
        @(negedge clk);
        // an idle cycle now and then
        if ($urandom % 4 == 0) begin
          valid = 0; d = '0;
          @(negedge clk);
        end
      end
      valid = 0;
      check(found && min_d == ref_d && min_i == ref_i && min_j == ref_j,
            $sformatf("stream %0d: min %0d (%0d,%0d) expected %0d (%0d,%0d)",
                      s, min_d, min_i, min_j, ref_d, ref_i, ref_j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
