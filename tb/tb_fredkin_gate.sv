// tb_fredkin_gate: exhaustive self-checking test of the 3x3 Fredkin gate.
//
// For all eight inputs it checks P = A and that B, C pass straight when A = 0
// and swap when A = 1 (so Q is the 2:1 multiplexer A ? C : B). A second gate
// fed with the outputs must return the inputs (the gate is its own inverse).
module tb_fredkin_gate;

  logic a, b, c, p, q, r, p2, q2, r2;
  int   checks = 0, failures = 0;

  fredkin_gate dut  (.a(a), .b(b), .c(c), .p(p),  .q(q),  .r(r));
  fredkin_gate dut2 (.a(p), .b(q), .c(r), .p(p2), .q(q2), .r(r2));

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
    logic eq, er;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      eq = a ? c : b;
      er = a ? b : c;
      checks++;
      if (p !== a || q !== eq || r !== er) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b: p=%0b q=%0b r=%0b", a, b, c, p, q, r);
      end
      checks++;
      if ({p2, q2, r2} !== {a, b, c}) begin
        failures++;
        $display("FAIL inverse of %03b gave %0b%0b%0b", v[2:0], p2, q2, r2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
