// Feynman gate: the reversible (2,2) controlled-NOT gate.
//
// Inputs (B, A), outputs (Y, X) with Y = B and X = A xor B. The mapping is a
// bijection on two bits, so no input information is lost. Tying A to 0 makes
// the gate a fan-out (copy) element, X = Y = B; tying A to 1 makes X the
// complement of B, the gate's use as an inverter. Purely combinational, no
// clock. The function and pin names follow the gate's published definition;
// nothing here is a design choice.
module feynman_gate (
    input  logic a,
    input  logic b,
    output logic y,
    output logic x
);

  assign y = b;
  assign x = a ^ b;

endmodule
