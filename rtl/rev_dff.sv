// Reversible positive-edge D flip-flop: one stage (FF2, FF1 or FF0) of the
// sequence generator.
//
// Two copies of the reversible gated latch (rev_d_latch) in master-slave form.
// A Feynman gate with A tied to 1 inverts the clock for the master, which is
// transparent while clk = 0; the slave is transparent while clk = 1. On the
// rising edge the master closes on the value of d and the slave passes it on,
// so q takes the value d had just before the edge and holds it for a full
// clock period. q_n is the complement from the slave's second NAND.
//
// Interface: clk, d in; q, q_n out. d must be stable around the rising edge;
// there is no reset, the stage powers up in whatever state its loops settle to.
//
// The latch network is the published stage drawing. Pairing two latches into
// a master-slave flip-flop, and the choice of the rising edge, are this
// design's own: one drawn latch per stage would let the cascaded stages race
// through while the clock is high.
module rev_dff (
    input  logic clk,
    input  logic d,
    output logic q,
    output logic q_n
);

  logic clk_copy, clk_bar;   // FG outputs: clock and its complement
  logic m_q, m_q_n;          // master latch outputs

  feynman_gate fg_clk (.a(1'b1), .b(clk), .y(clk_copy), .x(clk_bar));

  rev_d_latch master (.en(clk_bar),  .d(d),   .q(m_q), .q_n(m_q_n));
  rev_d_latch slave  (.en(clk_copy), .d(m_q), .q(q),   .q_n(q_n));

endmodule
