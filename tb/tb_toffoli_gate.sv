// Self-checking testbench for toffoli_gate.
// Applies all eight input vectors (C, B, A) and compares (Z, Y, X) with the
// gate's truth table, written out here as a constant table. Also checks the
// NAND use (A = 1) and that the gate is reversible: the eight outputs are all
// different. A watchdog ends the run if it stalls.
module tb_toffoli_gate;

  logic a, b, c, z, y, x;
  int   checks = 0, failures = 0;
  logic [7:0] seen;

  toffoli_gate dut (.a(a), .b(b), .c(c), .z(z), .y(y), .x(x));

  // Rows indexed by {C, B, A}; entry is {Z, Y, X}.
  localparam logic [2:0] TABLE [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                                       3'b100, 3'b101, 3'b111, 3'b110};

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {c, b, a} = 3'(i);
      #1;
      checks++;
      if ({z, y, x} !== TABLE[i]) begin
        failures++;
        $display("FAIL C=%0b B=%0b A=%0b: got %03b, want %03b", c, b, a, {z, y, x}, TABLE[i]);
      end
      seen[{z, y, x}] = 1'b1;
      if (a) begin
        checks++;
        if (x !== ~(b & c)) begin
          failures++;
          $display("FAIL NAND use: B=%0b C=%0b X=%0b", b, c, x);
        end
      end
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL not a bijection: outputs seen %08b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
