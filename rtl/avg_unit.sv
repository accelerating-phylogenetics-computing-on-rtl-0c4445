// avg_unit: average-distance datapath of the UPGMA engine.
//
// When clusters i and j merge into k, the distance from k to every other
// cluster l is the size-weighted mean
//     d_kl = (d_il * |Ci| + d_jl * |Cj|) / (|Ci| + |Cj|).
// As in the document's data-flow graph, one multiplier forms d * h and an
// adder adds it into a numerator accumulator, while a second adder sums the
// cluster sizes h into a denominator register in the same cycle; a divider
// then produces the quotient. The document calls the cluster size the
// "height" of the node. Here the two terms are presented one per cycle:
//   acc_en with acc_first=1 loads  num = d*h,      den = h
//   acc_en with acc_first=0 adds   num += d*h,     den += h
//   div_start                      starts num / den
// 'done' pulses when 'avg' is valid, NUM_W + 1 cycles after the div_start
// cycle (one quotient bit per cycle in seq_divider, NUM_W = DATA_W + CNT_W + 1). The quotient is truncated to DATA_W bits; it
// cannot exceed the largest input distance. Integer truncation is this
// design's choice: distances are unsigned integers, or fixed-point values
// scaled by the host.
module avg_unit #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned CNT_W  = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              acc_en,
  input  logic              acc_first,
  input  logic [DATA_W-1:0] d,
  input  logic [CNT_W-1:0]  h,
  input  logic              div_start,
  output logic              busy,
  output logic              done,
  output logic [DATA_W-1:0] avg,
  output logic [DATA_W+CNT_W:0] num,
  output logic [CNT_W:0]    den
);

  localparam int unsigned NUM_W = DATA_W + CNT_W + 1;
  localparam int unsigned DEN_W = CNT_W + 1;

  logic [DATA_W+CNT_W-1:0] prod;
  logic [NUM_W-1:0]        quot;
  logic [DEN_W-1:0]        rem_unused;

  assign prod = d * h;   // multiplier

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num <= '0;
      den <= '0;
    end else if (acc_en) begin
      num <= (acc_first ? '0 : num) + NUM_W'(prod);  // multiply-accumulate adder
      den <= (acc_first ? '0 : den) + DEN_W'(h);     // denominator adder
    end
  end

  seq_divider #(.NUM_W(NUM_W), .DEN_W(DEN_W)) u_div (
    .clk   (clk),
    .rst_n (rst_n),
    .start (div_start),
    .num   (num),
    .den   (den),
    .busy  (busy),
    .done  (done),
    .quot  (quot),
    .rem   (rem_unused)
  );

  assign avg = quot[DATA_W-1:0];

endmodule
