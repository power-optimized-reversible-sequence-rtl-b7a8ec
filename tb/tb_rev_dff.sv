// Self-checking testbench for rev_dff.
// Runs a 10-unit clock and drives random data at three points of each period:
// just after the falling edge, while the clock is low, and while it is high.
// Its model is a rising-edge flip-flop: the value of d at the rising edge
// appears on q after that edge and stays for the whole period. It checks q and
// q_n = ~q after every edge and after every mid-phase data change, so a
// transparent latch in place of the flip-flop is caught. It also counts
// captured 0s and 1s and fails if either is missing. Watchdog included.
module tb_rev_dff;

  logic clk = 1'b0;
  logic d, q, q_n;
  logic model;
  int   checks = 0, failures = 0;
  int   n_one = 0, n_zero = 0;

  rev_dff dut (.clk(clk), .d(d), .q(q), .q_n(q_n));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string where);
    checks++;
    if (q !== model || q_n !== ~model) begin
      failures++;
      $display("FAIL %s t=%0t: q=%0b q_n=%0b, want q=%0b", where, $time, q, q_n, model);
    end
  endtask

  initial begin
    d = 1'b0;
    @(posedge clk);          // first edge loads a known value
    model = 1'b0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      #1 check("after edge");
      d = 1'($urandom_range(0, 1));
      #2 check("clock low, d changed");
      d = 1'($urandom_range(0, 1));
      @(posedge clk);
      model = d;
      if (d) n_one++; else n_zero++;
      #1 check("after rising edge");
      d = 1'($urandom_range(0, 1));
      #2 check("clock high, d changed");
    end
    checks++;
    if (n_one == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL coverage: ones=%0d zeros=%0d", n_one, n_zero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
