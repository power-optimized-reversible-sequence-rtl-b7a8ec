// End-to-end testbench for rev_seq_gen, the reversible sequence generator.
//
// Part 1, free run: after the first rising edge the register is inside its
// cycle. For the following edges the testbench predicts each next state from
// the shift rule {Q2,Q1,Q0} <= {~Q1,Q2,Q1}, checks q, q_n = ~q and seq_out = Q2,
// checks that the outputs do not move between edges (one new bit per clock)
// and that the serial output repeats with period 4 as 1,1,0,0.
//
// Part 2, self-start: the design has no reset, so the testbench places the
// register in each of the eight states in turn by forcing the storage nodes of
// the three slave latches while the clock is low, releases them, and checks
// the state after the next rising edge. This covers the four states outside
// the cycle, which must all enter it in one edge.
//
// It counts each mechanism (the four cycle states visited, the Q1-bar
// feedback producing both a 0 and a 1 on D2, the shift of a 1 and of a 0 from
// Q2 into Q1, recovery from an off-cycle state) and fails if one never
// happens. The design has no parameters, so this is also the full-size run.
module tb_rev_seq_gen;

  logic       clk = 1'b0;
  logic       seq_out;
  logic [2:0] q, q_n;
  int         checks = 0, failures = 0;

  int n_state [8];
  int n_fb_one = 0, n_fb_zero = 0, n_shift_one = 0, n_shift_zero = 0;
  int n_recover = 0;

  rev_seq_gen dut (.clk(clk), .seq_out(seq_out), .q(q), .q_n(q_n));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference next-state function, written from the shift rule.
  function automatic logic [2:0] next_state(logic [2:0] s);
    return {~s[1], s[2], s[1]};
  endfunction

  function automatic bit in_cycle(logic [2:0] s);
    return s == 3'b100 || s == 3'b110 || s == 3'b011 || s == 3'b001;
  endfunction

  task automatic check_outputs(logic [2:0] want, string where);
    checks++;
    if (q !== want || q_n !== ~want || seq_out !== want[2]) begin
      failures++;
      $display("FAIL %s t=%0t: q=%03b q_n=%03b out=%0b, want q=%03b",
               where, $time, q, q_n, seq_out, want);
    end
  endtask

  // Put the register into state s: force the cross-coupled NAND outputs of
  // each slave latch, release them once the loops hold the new value.
  task automatic place_state(logic [2:0] s);
    force dut.ff2.slave.tg3_x = s[2];
    force dut.ff2.slave.tg4_x = ~s[2];
    force dut.ff1.slave.tg3_x = s[1];
    force dut.ff1.slave.tg4_x = ~s[1];
    force dut.ff0.slave.tg3_x = s[0];
    force dut.ff0.slave.tg4_x = ~s[0];
    #1;
    release dut.ff2.slave.tg3_x;
    release dut.ff2.slave.tg4_x;
    release dut.ff1.slave.tg3_x;
    release dut.ff1.slave.tg4_x;
    release dut.ff0.slave.tg3_x;
    release dut.ff0.slave.tg4_x;
    #1;
  endtask

  logic [2:0] prev, want;
  logic [3:0] window;

  initial begin
    foreach (n_state[i]) n_state[i] = 0;

    // ---- Part 1: free run ----------------------------------------------
    @(posedge clk);
    #1;
    checks++;
    if (!in_cycle(q)) begin
      failures++;
      $display("FAIL not in cycle after first edge: q=%03b", q);
    end
    prev   = q;
    window = '0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      check_outputs(prev, "mid-period hold");
      @(posedge clk);
      #1;
      want = next_state(prev);
      check_outputs(want, "after edge");
      n_state[q]++;
      if (prev[1]) n_fb_zero++; else n_fb_one++;
      if (prev[2]) n_shift_one++; else n_shift_zero++;
      window = {window[2:0], seq_out};
      if (i >= 3) begin
        checks++;
        if (window != 4'b1100 && window != 4'b1001 &&
            window != 4'b0011 && window != 4'b0110) begin
          failures++;
          $display("FAIL serial output window %04b is not a rotation of 1100", window);
        end
      end
      prev = q;
    end

    // ---- Part 2: every start state -------------------------------------
    for (int s = 0; s < 8; s++) begin
      @(negedge clk);
      #1;
      place_state(3'(s));
      check_outputs(3'(s), "placed state");
      @(posedge clk);
      #1;
      check_outputs(next_state(3'(s)), "edge from placed state");
      checks++;
      if (!in_cycle(q)) begin
        failures++;
        $display("FAIL state %03b did not enter the cycle: q=%03b", 3'(s), q);
      end
      if (!in_cycle(3'(s)) && in_cycle(q)) n_recover++;
    end

    // ---- Mechanism coverage --------------------------------------------
    $display("cycle states: 100=%0d 110=%0d 011=%0d 001=%0d", n_state[4], n_state[6],
             n_state[3], n_state[1]);
    $display("feedback D2=1: %0d  D2=0: %0d  shift 1: %0d  shift 0: %0d  recoveries: %0d",
             n_fb_one, n_fb_zero, n_shift_one, n_shift_zero, n_recover);
    checks++;
    if (n_state[4] == 0 || n_state[6] == 0 || n_state[3] == 0 || n_state[1] == 0) begin
      failures++;
      $display("FAIL a cycle state was never visited");
    end
    checks++;
    if (n_fb_one == 0 || n_fb_zero == 0 || n_shift_one == 0 || n_shift_zero == 0) begin
      failures++;
      $display("FAIL feedback or shift not exercised both ways");
    end
    checks++;
    if (n_recover != 4) begin
      failures++;
      $display("FAIL expected 4 recoveries from off-cycle states, saw %0d", n_recover);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
