// Self-checking testbench for feynman_gate.
// Applies all four input vectors (B, A) and compares (Y, X) with the gate's
// truth table, written out here as a constant table rather than as the
// xor formula. Also checks the two uses made of the gate: A = 0 copies B,
// A = 1 inverts it. A watchdog ends the run if it stalls.
module tb_feynman_gate;

  logic a, b, y, x;
  int   checks = 0, failures = 0;

  feynman_gate dut (.a(a), .b(b), .y(y), .x(x));

  // Truth table rows indexed by {B, A}; entry is {Y, X}.
  localparam logic [1:0] TABLE [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {b, a} = 2'(i);
      #1;
      checks++;
      if ({y, x} !== TABLE[i]) begin
        failures++;
        $display("FAIL B=%0b A=%0b: got Y=%0b X=%0b, want %02b", b, a, y, x, TABLE[i]);
      end
      checks++;
      if (a == 1'b0 && x !== b) begin
        failures++;
        $display("FAIL copy use: B=%0b X=%0b", b, x);
      end
      if (a == 1'b1 && x !== ~b) begin
        failures++;
        $display("FAIL invert use: B=%0b X=%0b", b, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
