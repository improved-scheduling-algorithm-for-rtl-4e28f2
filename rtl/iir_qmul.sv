// iir_qmul: fixed-point multiplier of the IIR filters.
//
// Computes (a * b) / 2**FRAC, combinationally, the way the filter's
// behavioural description scales every product: coefficients are integers
// that carry FRAC fraction bits (FRAC = 10 gives the description's "/1024").
// The division truncates toward zero, as integer division does in the
// description, so a negative product is biased by 2**FRAC - 1 before the
// arithmetic shift. The quotient is returned in OUT_W bits; a value that
// does not fit wraps (two's complement), which is this design's choice: the
// description's integer arithmetic would simply not allow it.
module iir_qmul #(
  parameter int unsigned A_W   = 32,
  parameter int unsigned B_W   = 32,
  parameter int unsigned FRAC  = 10,
  parameter int unsigned OUT_W = 32
) (
  input  logic signed [A_W-1:0]   a,
  input  logic signed [B_W-1:0]   b,
  output logic signed [OUT_W-1:0] p
);

  localparam int unsigned PW = A_W + B_W;

  logic signed [PW-1:0] full;
  logic signed [PW-1:0] biased;

  always_comb begin
    full   = a * b;
    biased = full[PW-1] ? full + PW'((64'd1 << FRAC) - 64'd1) : full;
    p      = OUT_W'(biased >>> FRAC);
  end

endmodule
