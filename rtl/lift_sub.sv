// lift_sub: the SUB unit of a lifting step, y = a - b, with a the delayed
// sample of the stream being corrected and b the rounded filter value.
// Both are signed; the result is one bit wider than the wider operand so
// it never overflows. Combinational.
module lift_sub #(
  parameter int unsigned A_W = 16,
  parameter int unsigned B_W = 20,
  localparam int unsigned Y_W = ((A_W > B_W) ? A_W : B_W) + 1
) (
  input  logic signed [A_W-1:0] a,
  input  logic signed [B_W-1:0] b,
  output logic signed [Y_W-1:0] y
);
  assign y = Y_W'(a) - Y_W'(b);
endmodule
