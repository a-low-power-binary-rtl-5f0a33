// rev_mux: reversible 2:1 multiplexer (controlled swap, Fredkin type).
//
//   p = s
//   q = s ? b : a       (the multiplexer output)
//   r = s ? a : b       (garbage, kept so the gate stays reversible)
// In the square rooter s is the root bit of a row, a the cell's minuend bit
// and b its difference: a row whose trial subtraction succeeded passes the
// difference on, a row whose subtraction failed restores its input. The
// multiplexing function is the published design's; realising it as a
// Fredkin-type controlled swap is this design's choice, because the equations
// of the reversible gate used for this job are not given.
//
// Purely combinational, no clock.
module rev_mux (
  input  logic s,
  input  logic a,
  input  logic b,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = s;
    q = (~s & a) | (s & b);
    r = (~s & b) | (s & a);
  end
endmodule
