// sram_bank: behavioural model of one board memory bank (not synthesized as
// part of the design). DEPTH words of DATA_W bits; a write is stored at the
// clock edge that samples it; a read request sampled at edge t delivers the
// word on rdata from just after edge t + RD_LAT - 1, so a synchronous reader
// samples it at edge t + RD_LAT. Contents start at zero; testbenches may
// load mem[] directly.
module sram_bank
  import upgma_pkg::*;
#(
  parameter int unsigned DEPTH  = 65536,
  parameter int unsigned RD_LAT = 4
) (
  input  logic              clk,
  input  mem_req_t          req,
  output logic [DATA_W-1:0] rdata
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [DATA_W-1:0] mem  [DEPTH];
  logic [DATA_W-1:0] pipe [RD_LAT];

  initial begin
    for (int k = 0; k < int'(DEPTH); k++) mem[k] = '0;
    for (int k = 0; k < int'(RD_LAT); k++) pipe[k] = '0;
  end

  always @(posedge clk) begin
    if (req.wr) begin
      assert (32'(req.addr) < DEPTH) else $error("sram_bank: write beyond depth");
      mem[req.addr[AW-1:0]] <= req.wdata;
    end
    pipe[0] <= req.rd ? mem[req.addr[AW-1:0]] : '0;
    for (int k = 1; k < int'(RD_LAT); k++) pipe[k] <= pipe[k-1];
  end

  assign rdata = pipe[RD_LAT-1];

endmodule
