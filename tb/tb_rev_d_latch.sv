// Self-checking testbench for rev_d_latch.
// Drives random enable/data patterns and keeps its own model of a gated D
// latch: the stored bit follows d while en = 1 and holds while en = 0. After
// each change it checks q against the model and q_n against ~q. It counts how
// often the latch was transparent and how often it held against a changed d,
// and fails if either never happened. A watchdog ends the run if it stalls.
module tb_rev_d_latch;

  logic en, d, q, q_n;
  logic model;
  int   checks = 0, failures = 0;
  int   n_pass = 0, n_hold = 0;

  rev_d_latch dut (.en(en), .d(d), .q(q), .q_n(q_n));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Load a known value first: the latch has no reset.
    en = 1'b1; d = 1'b0; #1;
    model = 1'b0;
    for (int i = 0; i < 400; i++) begin
      en = 1'($urandom_range(0, 1));
      d  = 1'($urandom_range(0, 1));
      #1;
      if (en) begin
        model = d;
        n_pass++;
      end else if (d != model) begin
        n_hold++;
      end
      checks++;
      if (q !== model || q_n !== ~model) begin
        failures++;
        $display("FAIL step %0d en=%0b d=%0b: q=%0b q_n=%0b, want q=%0b", i, en, d, q, q_n, model);
      end
    end
    checks++;
    if (n_pass == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL coverage: transparent=%0d hold=%0d", n_pass, n_hold);
    end
    $display("transparent=%0d held-against-change=%0d", n_pass, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
