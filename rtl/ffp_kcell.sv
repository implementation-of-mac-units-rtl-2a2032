// ffp_kcell: control (K) cell at the left end of each row of the
// four-function arithmetic array.
//
// It chooses what the row does through F, the enable of the row's A cells:
//   F = X Ci + P ~X
// With X=0 (multiply, square) F is the row's multiplier bit P, so the row
// adds B or passes its partial product. With X=1 (divide, square root) F is
// the carry out of the row's leftmost A cell, Ci: a carry of 1 means the
// trial subtraction did not borrow and the difference is kept; otherwise the
// row passes A unchanged (restoring step). The F equation is the published one.
//
// Co leaves the array to the left as the row's result bit CK. The published
// cell shows Co without an equation; here Co = Ci, the row's no-borrow bit,
// which is the quotient or root bit. X is passed to the row.
//
// Purely combinational.
module ffp_kcell (
  input  logic x_in,
  input  logic p,
  input  logic ci,
  output logic x_out,
  output logic f,
  output logic co
);
  always_comb begin
    f     = (x_in & ci) | (p & ~x_in);
    co    = ci;
    x_out = x_in;
  end
endmodule
