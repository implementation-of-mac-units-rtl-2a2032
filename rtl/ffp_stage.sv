// ffp_stage: one row (stage) of the four-function arithmetic array.
//
// A K cell followed by NCELL A cells. Bit 0 of every vector is the rightmost
// cell (lowest weight). The carry ripples from cell 0 (fed by ci_lsb) to the
// leftmost cell, whose carry out goes into the K cell; the K cell's F and X
// travel from left to right through all A cells. The cells' S, D and E
// outputs go to the row below; ck is the K cell's result bit and x_lsb is the
// X line as it leaves the rightmost cell (the first row loops it back into
// its own carry in).
//
// Purely combinational: the delay of a row is one ripple through NCELL cells.
// Building the row as one module of width NCELL is this design's choice; the
// array uses rows of 3, 5 and 7 cells.
module ffp_stage #(
  parameter int unsigned NCELL = 3
) (
  input  logic             x,
  input  logic             p,
  input  logic [NCELL-1:0] a,
  input  logic [NCELL-1:0] b,
  input  logic [NCELL-1:0] c,
  input  logic             ci_lsb,
  output logic [NCELL-1:0] s,
  output logic [NCELL-1:0] d,
  output logic [NCELL-1:0] e,
  output logic             ck,
  output logic             x_lsb
);
  // xr[i]/fr[i]: X and F arriving at cell i from its left neighbour.
  logic [NCELL:0] xr, fr;
  // cr[i]: carry into cell i; cr[NCELL] is the leftmost cell's carry out.
  logic [NCELL:0] cr;

  ffp_kcell u_k (
    .x_in (x),
    .p    (p),
    .ci   (cr[NCELL]),
    .x_out(xr[NCELL-1]),
    .f    (fr[NCELL-1]),
    .co   (ck)
  );

  assign cr[0] = ci_lsb;

  for (genvar i = 0; i < NCELL; i++) begin : g_cell
    // cell i passes X/F on to cell i-1; cell 0 drives the spare xr/fr[NCELL]
    localparam int unsigned NXT = (i == 0) ? NCELL : i - 1;
    ffp_acell u_a (
      .a    (a[i]),
      .b    (b[i]),
      .c    (c[i]),
      .x_in (xr[i]),
      .f_in (fr[i]),
      .ci   (cr[i]),
      .s    (s[i]),
      .co   (cr[i+1]),
      .d    (d[i]),
      .e    (e[i]),
      .x_out(xr[NXT]),
      .f_out(fr[NXT])
    );
  end

  assign x_lsb = xr[NCELL];
endmodule
