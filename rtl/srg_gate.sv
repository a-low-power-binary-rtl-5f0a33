// srg_gate: Saimur Rahman Gate (SRG), a 4-input, 4-output reversible gate.
//
// Outputs, as the gate is defined:
//   w5 = w1 ^ w3                          (garbage)
//   w6 = w1 ^ w2                          (garbage)
//   w7 = ~w1&w2 ^ ~w1&w3 ^ w2&w3          (borrow of w1 - w2 - w3)
//   w8 = w1 ^ w2 ^ w3 ^ w4                (difference when w4 = 0)
// With the constant input w4 held at 0 the gate is a full subtractor: w1 is
// the minuend, w2 the subtrahend, w3 the borrow in, w7 the borrow out and
// w8 the difference. The mapping from four inputs to four outputs is a
// bijection, so no information is lost. The equations are those of the
// published gate; nothing here is a local choice.
//
// Purely combinational, no clock.
module srg_gate (
  input  logic w1,
  input  logic w2,
  input  logic w3,
  input  logic w4,
  output logic w5,
  output logic w6,
  output logic w7,
  output logic w8
);
  always_comb begin
    w5 = w1 ^ w3;
    w6 = w1 ^ w2;
    w7 = (~w1 & w2) ^ (~w1 & w3) ^ (w2 & w3);
    w8 = w1 ^ w2 ^ w3 ^ w4;
  end
endmodule
