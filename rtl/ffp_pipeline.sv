// ffp_pipeline: four-function arithmetic pipeline (multiply, divide, square,
// square root) built from three rows of A cells, each led by a K cell.
//
// Columns are numbered by the weight of the A input they line up with:
// column 6 is a leading zero, columns 5..0 hold A5..A0.
//   row 1: columns 6..4, A inputs 0, A5, A4, operand B2..B0 / C2..C0, K gets P0
//   row 2: columns 6..2, A inputs = row 1's S and A3, A2,            K gets P1
//   row 3: columns 6..0, A inputs = row 2's S and A1, A0,            K gets P2
// Each lower row takes its B/C from the D/E lines of the row above, one
// column to the right, with 0 fed in at both free ends. The operand therefore
// slides one column right per row, which is what both the add-shift
// multiplier and the restoring divider need.
//
// Operations (published conditions):
//   multiply  X=0, P0=0, C=B:    S6..S2 = B2B1B0 * P1P2   (P1 the MSB)
//   square    X=0, P0=0, B=C=0P1P2: S6..S2 = (P1P2)^2
//   divide    X=1, C=B:          CK2CK1CK0 = A5A4A3A2 / B2B1B0
//   sqrt      X=1, B=001, C=010: CK2CK1CK0 = floor(sqrt(A5..A0))
// Row 1's rightmost cell loops X into its own carry in (+1 of the two's
// complement when subtracting). Rows 2 and 3 take X into their rightmost
// carry too, except in square-root mode (row 1's rightmost cell holds
// (B,C)=(1,0)): there a carry of 0 subtracts the trailing 1 of the trial
// operand Q01 without a cell for it. That rule, the row widths of rows 2 and
// 3 and the D/E logic of the A cell are this design's reconstruction; the
// cell equations for S, Co and F are the published ones.
//
// Limits (not checked): divide needs B != 0 and a quotient below 8; multiply
// needs P0 = 0. Divide leaves the remainder in S4..S2.
//
// Purely combinational, no clock; the result settles after three row ripples.
module ffp_pipeline (
  input  logic [5:0] a,   // A5..A0
  input  logic [2:0] b,   // B2..B0
  input  logic [2:0] c,   // C2..C0
  input  logic [2:0] p,   // P2..P0
  input  logic       x,   // 0 multiply/square, 1 divide/square root
  output logic [6:0] s,   // S6..S0
  output logic [2:0] ck   // CK2..CK0, CK2 the MSB
);
  logic [2:0] s1, d1, e1;
  logic [4:0] s2, d2, e2;
  logic [6:0] s3;
  logic       x1;
  logic       sqrt_mode, ci_low;

  ffp_stage #(.NCELL(3)) u_row1 (
    .x(x), .p(p[0]), .a({1'b0, a[5:4]}), .b(b), .c(c), .ci_lsb(x1),
    .s(s1), .d(d1), .e(e1), .ck(ck[2]), .x_lsb(x1)
  );

  // row 1's rightmost cell holds the square-root trailing one: E=1, D=0
  assign sqrt_mode = e1[0] & ~d1[0];
  assign ci_low    = x & ~sqrt_mode;

  ffp_stage #(.NCELL(5)) u_row2 (
    .x(x), .p(p[1]), .a({s1, a[3:2]}), .b({1'b0, d1, 1'b0}), .c({1'b0, e1, 1'b0}),
    .ci_lsb(ci_low), .s(s2), .d(d2), .e(e2), .ck(ck[1]), .x_lsb()
  );

  ffp_stage #(.NCELL(7)) u_row3 (
    .x(x), .p(p[2]), .a({s2, a[1:0]}), .b({1'b0, d2, 1'b0}), .c({1'b0, e2, 1'b0}),
    .ci_lsb(ci_low), .s(s3), .d(), .e(), .ck(ck[0]), .x_lsb()
  );

  assign s = s3;
endmodule
