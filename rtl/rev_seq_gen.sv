// Reversible sequence generator: a three-stage shift register with a
// next-state feedback, built entirely from Feynman and Toffoli gates.
//
// A sequence generator is a shift register whose serial input Z is a function
// of its own outputs. Here the three reversible D stages are cascaded
// FF2 -> FF1 -> FF0 (Q2 drives D1, Q1 drives D0) and the next-state input is
// Z = D2 = Q1-bar, taken straight from FF1's complement output, so no decoder
// gates are needed. On each rising clock edge
//   {Q2, Q1, Q0} <= {~Q1, Q2, Q1}
// which walks the four-state cycle 100 -> 110 -> 011 -> 001 -> 100. The
// serial output is Q2, the repeating 4-bit sequence 1, 1, 0, 0.
//
// Interface: clk in; seq_out (= Q2), q = {Q2,Q1,Q0} and q_n = their
// complements out. All outputs change only after a rising edge of clk.
// There is no reset. Every one of the eight power-up states falls into the
// cycle after one rising edge, so from the second edge on the output is the
// sequence above (its phase depends on the power-up state).
//
// The stage cascade, the Q1-bar feedback and the output tap follow the
// published design. The master-slave form of each stage is this design's
// own (see rev_dff).
module rev_seq_gen (
    input  logic       clk,
    output logic       seq_out,
    output logic [2:0] q,
    output logic [2:0] q_n
);

  logic d2;   // Z, the next-state input of FF2

  // Next-state function: Z = Q1-bar.
  assign d2 = q_n[1];

  rev_dff ff2 (.clk(clk), .d(d2),   .q(q[2]), .q_n(q_n[2]));
  rev_dff ff1 (.clk(clk), .d(q[2]), .q(q[1]), .q_n(q_n[1]));
  rev_dff ff0 (.clk(clk), .d(q[1]), .q(q[0]), .q_n(q_n[0]));

  assign seq_out = q[2];

endmodule
