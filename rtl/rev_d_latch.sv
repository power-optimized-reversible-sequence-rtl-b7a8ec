// Reversible gated D latch, built only from Feynman and Toffoli gates.
//
// This is the gate network of one sequence-generator stage:
//   FG1 (A=1, B=D)            -> D and D-bar
//   TG1 (A=1) = NAND(D,    EN) -> set_n
//   TG2 (A=1) = NAND(D-bar, EN) -> rst_n
//   TG3 (A=1) = NAND(set_n, Q-bar feedback)
//   TG4 (A=1) = NAND(rst_n, Q feedback)
//   FG2 (A=0) copies TG3 to Q and to the feedback into TG4
//   FG3 (A=0) copies TG4 to Q-bar and to the feedback into TG3
// TG3/TG4 form a cross-coupled NAND pair. Feynman copying gates provide the
// fan-out, since a reversible gate output may drive only one input.
//
// Interface: en is the stage's CLK input. While en = 1 the latch is
// transparent (q follows d, q_n = ~q); while en = 0 it holds. There is no
// reset: the held value after power-up is whatever the loop settles to.
//
// Circuit warnings: the TG3/FG2/TG4/FG3 ring is a combinational loop on
// purpose. It is the storage element of the latch, and a reversible latch
// has no other way to hold state. Garbage outputs (the pass-through lines of
// the Toffoli gates) go to an unused bus.
//
// The netlist follows the published stage drawing; the enable polarity
// (transparent on EN = 1) follows from the NAND gating drawn there.
module rev_d_latch (
    input  logic en,
    input  logic d,
    output logic q,
    output logic q_n
);

  logic d_copy, d_bar;       // FG1 outputs
  logic set_n, rst_n;        // TG1, TG2 outputs
  logic tg3_x, tg4_x;        // cross-coupled NAND outputs
  logic q_fb, q_n_fb;        // copies fed back into the NAND pair
  logic [7:0] garbage;       // pass-through (Z, Y) outputs of TG1..TG4, unused

  // FG1 with A = 1: Y copies D, X inverts it.
  feynman_gate fg1 (.a(1'b1), .b(d), .y(d_copy), .x(d_bar));

  // Input gating with the enable.
  toffoli_gate tg1 (.a(1'b1), .b(d_copy), .c(en), .z(garbage[1]), .y(garbage[0]), .x(set_n));
  toffoli_gate tg2 (.a(1'b1), .b(d_bar),  .c(en), .z(garbage[3]), .y(garbage[2]), .x(rst_n));

  // Cross-coupled storage pair.
  toffoli_gate tg3 (.a(1'b1), .b(set_n), .c(q_n_fb), .z(garbage[5]), .y(garbage[4]), .x(tg3_x));
  toffoli_gate tg4 (.a(1'b1), .b(rst_n), .c(q_fb),   .z(garbage[7]), .y(garbage[6]), .x(tg4_x));

  // Fan-out of the storage outputs through copying Feynman gates.
  feynman_gate fg2 (.a(1'b0), .b(tg3_x), .y(q_fb),   .x(q));
  feynman_gate fg3 (.a(1'b0), .b(tg4_x), .y(q_n_fb), .x(q_n));

endmodule
