// min_finder: the minimum-search datapath of the UPGMA engine.
//
// During one pass over the distance matrix the controller presents one
// distance per 'valid' cycle together with the pair of cluster slots (i, j)
// it belongs to. A single magnitude comparator checks the incoming distance
// against the minimum held in a register; when it is smaller (or when the
// register holds nothing yet since 'clear') the distance and its pair are
// stored at the next clock edge. The comparison is strict, so among equal
// distances the first one presented wins. The document lets equidistant pairs
// be picked at random; picking the first in scan order is this design's
// choice and keeps results reproducible.
//
// Interface: clear (synchronous, empties the register), valid/d/i/j in,
// min_d/min_i/min_j/found out, take is high in a valid cycle whose distance
// will be stored. Timing: compare in the 'valid' cycle, store at its end.
module min_finder #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned IDX_W  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              valid,
  input  logic [DATA_W-1:0] d,
  input  logic [IDX_W-1:0]  i,
  input  logic [IDX_W-1:0]  j,
  output logic [DATA_W-1:0] min_d,
  output logic [IDX_W-1:0]  min_i,
  output logic [IDX_W-1:0]  min_j,
  output logic              found,
  output logic              take
);

  // comparator: is the stored minimum greater than the new distance?
  logic greater;
  assign greater = min_d > d;
  assign take    = valid && (!found || greater);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      found <= 1'b0;
      min_d <= '0;
      min_i <= '0;
      min_j <= '0;
    end else if (clear) begin
      found <= 1'b0;
    end else if (take) begin
      found <= 1'b1;
      min_d <= d;
      min_i <= i;
      min_j <= j;
    end
  end

endmodule
