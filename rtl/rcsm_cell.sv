// rcsm_cell: one-bit Reversible Controlled Subtract Multiplexer (RCSM).
//
// The building block of the square-root array. An SRG with its constant input
// tied to 0 forms the full subtraction x - y - bin, giving the borrow out bout
// and a difference bit. A reversible multiplexer then chooses the cell's
// output r: the difference when the row's root bit u is 1 (the trial
// subtraction of the whole row did not go negative) and the untouched
// minuend x when u is 0 (the row restores its input).
//
// bout does not depend on u, so the borrow ripples through a row first, the
// row's final borrow decides u, and only then do the r outputs settle: there
// is no combinational loop. The garbage outputs of both gates are left open.
// The SRG-plus-multiplexer structure follows the published design; the choice
// of a Fredkin-type multiplexer is this design's own.
//
// Purely combinational, no clock.
module rcsm_cell (
  input  logic x,     // minuend bit
  input  logic y,     // subtrahend bit
  input  logic bin,   // borrow from the next lower bit
  input  logic u,     // root bit of the row: 1 = keep difference, 0 = restore
  output logic bout,  // borrow to the next higher bit
  output logic r      // u ? (x - y - bin) : x
);
  logic diff;

  srg_gate u_srg (
    .w1 (x),
    .w2 (y),
    .w3 (bin),
    .w4 (1'b0),
    .w5 (),
    .w6 (),
    .w7 (bout),
    .w8 (diff)
  );

  rev_mux u_mux (
    .s (u),
    .a (x),
    .b (diff),
    .p (),
    .q (r),
    .r ()
  );
endmodule
