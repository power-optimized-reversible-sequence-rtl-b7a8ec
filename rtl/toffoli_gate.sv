// Toffoli gate: the reversible (3,3) controlled-controlled-NOT gate.
//
// Inputs (C, B, A), outputs (Z, Y, X) with Z = C, Y = B and X = A xor (B and C).
// The two control lines pass straight through and the target A is inverted
// only when both controls are 1, so the mapping is a bijection on three bits.
// Tying A to 1 turns X into NAND(B, C), which is how the sequence generator
// uses it; Y and Z are then garbage outputs. Purely combinational, no clock.
// The function and pin names follow the gate's published definition.
module toffoli_gate (
    input  logic a,
    input  logic b,
    input  logic c,
    output logic z,
    output logic y,
    output logic x
);

  assign z = c;
  assign y = b;
  assign x = a ^ (b & c);

endmodule
