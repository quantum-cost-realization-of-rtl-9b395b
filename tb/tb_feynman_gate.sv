// tb_feynman_gate: exhaustive self-checking test of the 2x2 Feynman gate.
//
// Applies all four input pairs, compares P and Q with the truth table
// P = A, Q = A xor B, and feeds the outputs through a second gate to check
// that the gate undoes itself (reversibility). A watchdog ends the run if it
// stalls.
module tb_feynman_gate;

  logic a, b, p, q, p2, q2;
  int   checks = 0, failures = 0;

  feynman_gate dut  (.a(a),  .b(b),  .p(p),  .q(q));
  feynman_gate dut2 (.a(p),  .b(q),  .p(p2), .q(q2));

  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (p !== a || q !== (a ^ b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b: p=%0b q=%0b", a, b, p, q);
      end
      checks++;
      if (p2 !== a || q2 !== b) begin
        failures++;
        $display("FAIL inverse a=%0b b=%0b: got %0b %0b", a, b, p2, q2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
