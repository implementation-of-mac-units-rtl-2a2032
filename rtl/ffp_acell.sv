// ffp_acell: arithmetic (A) cell of the four-function arithmetic array.
//
// A controlled one-bit adder/subtractor. The operand bit B is inverted when
// X=1 (subtract), giving T = B ^ X, and is added to A with the carry Ci that
// comes from the cell on the right:
//   S  = F ? (A ^ T ^ Ci) : A        (F=0 passes A through unchanged)
//   Co = T(A + Ci) + A Ci            (full-adder carry, to the cell on the left)
// These two equations are the cell's published definition. X and F travel on
// to the cell on the right unchanged.
//
// D and E are the diagonal bypass lines that carry the operand (B, C) down to
// the next row, one column to the right. Their logic is this design's own:
//   D = C(B + F),  E = D + B~C
// With B = C (multiply, divide, square) they are a plain bypass, D = E = B.
// In square-root mode a cell holding (B,C) = (0,1) marks where the row's root
// bit belongs and hands F (the root bit) down as (F,F); a cell holding (1,0),
// the trailing one of the trial operand, hands (0,1) down, becoming the marker
// of the next row.
//
// Purely combinational, no clock.
module ffp_acell (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic x_in,
  input  logic f_in,
  input  logic ci,
  output logic s,
  output logic co,
  output logic d,
  output logic e,
  output logic x_out,
  output logic f_out
);
  logic t;

  always_comb begin
    t     = b ^ x_in;
    s     = f_in ? (a ^ t ^ ci) : a;
    co    = (t & (a | ci)) | (a & ci);
    d     = c & (b | f_in);
    e     = d | (b & ~c);
    x_out = x_in;
    f_out = f_in;
  end
endmodule
