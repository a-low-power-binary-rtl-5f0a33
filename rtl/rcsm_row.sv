// rcsm_row: one row of the square-root array, i.e. one step of the
// digit-by-digit (subtract-and-append-01) square-root algorithm.
//
// Row K (K = 0 for the top row) brings down the next pair of radicand bits
// behind the partial remainder, and trial-subtracts the root found so far with
// "01" appended:
//     minuend    = {rem_in, pair}                 (K+3 bits)
//     subtrahend = {0, root_in[K-1:0], 0, 1}      (K+3 bits)
// The subtraction ripples from the least significant cell upwards through
// K+3 RCSM cells. The root bit u is the inverse of the final borrow: 1 when
// the difference is zero or positive, 0 when it is negative. A Feynman gate
// with a constant 1 input performs that inversion, and a chain of Feynman
// gates with constant 0 inputs copies u to every cell, so each signal drives a
// single gate input as reversible logic requires. Each cell then outputs its
// difference bit (u = 1) or its own minuend bit (u = 0).
//
// The new remainder never exceeds 2*root, so it fits in K+2 bits and the top
// cell's output (always 0 once selected) is dropped; the lint tool reports
// it as an unused bit, which is intended. With K = 0 the row has no
// previous root bits and rem_in must be 0; root_in is then one unused bit.
// The step itself follows the published algorithm; the cell count per row and
// the Feynman-gate fan-out chain are this design's choices.
//
// Purely combinational, no clock.
module rcsm_row #(
  parameter int K = 0                        // row index = number of root bits known
) (
  input  logic [K:0]                 rem_in,  // partial remainder from the row above
  input  logic [1:0]                 pair,    // next two radicand bits
  input  logic [((K > 0) ? K : 1)-1:0] root_in, // root bits so far, MSB first
  output logic                       u,       // root bit of this row
  output logic [K+1:0]               rem_out  // new partial remainder
);
  localparam int W = K + 3;                  // cells in this row

  logic [W-1:0] x;                           // minuend bits
  logic [W-1:0] y;                           // subtrahend bits
  logic [W:0]   borrow;                      // borrow chain, borrow[0] = 0
  logic [W-1:0] sel;                         // copies of u along the row
  logic [W-1:0] r;                           // cell outputs

  always_comb begin
    x = {rem_in, pair};
    y = '0;
    y[1:0] = 2'b01;
    for (int i = 0; i < K; i++) y[i+2] = root_in[i];
  end

  assign borrow[0] = 1'b0;

  // Root bit: u = ~borrow[W] through a Feynman gate with its target at 1.
  feynman_gate u_inv (
    .a (borrow[W]),
    .b (1'b1),
    .p (),
    .q (sel[0])
  );
  assign u = sel[0];

  for (genvar i = 0; i < W; i++) begin : g_cell
    logic sel_i;

    if (i < W - 1) begin : g_fan
      // Copy the root bit: p feeds this cell, q carries on along the row.
      feynman_gate u_fan (
        .a (sel[i]),
        .b (1'b0),
        .p (sel_i),
        .q (sel[i+1])
      );
    end else begin : g_last
      assign sel_i = sel[i];                 // last cell takes the final copy
    end

    rcsm_cell u_cell (
      .x    (x[i]),
      .y    (y[i]),
      .bin  (borrow[i]),
      .u    (sel_i),
      .bout (borrow[i+1]),
      .r    (r[i])
    );
  end

  assign rem_out = r[K+1:0];
endmodule
