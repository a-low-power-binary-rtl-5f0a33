// feynman_gate: Feynman (controlled-NOT) gate, the basic 2x2 reversible gate.
//
//   p = a
//   q = a ^ b
// With b = 0 it copies a onto two wires (reversible logic allows a fan-out of
// one, so every extra copy of a signal costs a Feynman gate); with b = 1 it
// gives a and its inverse. The square rooter uses both forms: inverting a
// row's final borrow into the root bit and copying that root bit to the
// multiplexers of the row. Which gates perform those two jobs is this
// design's own choice; the gate itself is the standard one.
//
// Purely combinational, no clock.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  always_comb begin
    p = a;
    q = a ^ b;
  end
endmodule
