// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// 'start' loads the numerator and denominator; NUM_W + 1 cycles after the
// start cycle 'done' pulses for one cycle with quot = num / den (truncated)
// and rem = num % den.
// Each cycle shifts the next numerator bit into the partial remainder and
// subtracts the denominator when it fits. A division by zero gives an all-ones
// quotient. 'busy' is high while bits are being produced; a 'start' while busy
// is ignored. This radix-2 structure is this design's choice: the document
// names a divider without giving its insides.
module seq_divider #(
  parameter int unsigned NUM_W = 42,
  parameter int unsigned DEN_W = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  output logic             busy,
  output logic             done,
  output logic [NUM_W-1:0] quot,
  output logic [DEN_W-1:0] rem
);

  localparam int unsigned CNT_W = $clog2(NUM_W + 1);

  logic [NUM_W-1:0] q_sh;     // numerator bits still to shift in, then quotient
  logic [DEN_W:0]   r;        // partial remainder, one bit wider than den
  logic [DEN_W-1:0] dv;
  logic [CNT_W-1:0] cnt;
  logic [DEN_W:0]   r_try;
  logic [DEN_W:0]   r_diff;

  assign r_try  = {r[DEN_W-1:0], q_sh[NUM_W-1]};
  assign r_diff = r_try - {1'b0, dv};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      q_sh <= '0;
      r    <= '0;
      dv   <= '0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        q_sh <= num;
        r    <= '0;
        dv   <= den;
        cnt  <= CNT_W'(NUM_W);
      end else if (busy) begin
        if (r_try >= {1'b0, dv}) begin
          r    <= r_diff;
          q_sh <= {q_sh[NUM_W-2:0], 1'b1};
        end else begin
          r    <= r_try;
          q_sh <= {q_sh[NUM_W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CNT_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quot = q_sh;
  assign rem  = r[DEN_W-1:0];

endmodule
