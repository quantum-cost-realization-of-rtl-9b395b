// tb_rev_shift_stage: self-checking test of single shifter stages.
//
// Three 8-bit stages (shift by 1, 2 and 4) see every data word with the
// select at 0 and at 1. For each the test checks the result word
// (data << 2**J with zero fill, or unchanged), the garbage word (the
// unselected multiplexer inputs: data bit i-D or 0 when shifting, data bit i
// when not) and that the select line leaves the stage unchanged.
module tb_rev_shift_stage;

  localparam int unsigned N = 8;

  logic [N-1:0] din;
  logic         sel;
  logic [N-1:0] dout [3];
  logic [N-1:0] garb [3];
  logic         selo [3];
  int           checks = 0, failures = 0;

  rev_shift_stage #(.N(N), .J(0)) u_s0 (.sel_i(sel), .data_i(din), .sel_o(selo[0]), .data_o(dout[0]), .garb_o(garb[0]));
  rev_shift_stage #(.N(N), .J(1)) u_s1 (.sel_i(sel), .data_i(din), .sel_o(selo[1]), .data_o(dout[1]), .garb_o(garb[1]));
  rev_shift_stage #(.N(N), .J(2)) u_s2 (.sel_i(sel), .data_i(din), .sel_o(selo[2]), .data_o(dout[2]), .garb_o(garb[2]));

  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp_d, exp_g;
    int unsigned  d;
    for (int s = 0; s < 2; s++) begin
      for (int v = 0; v < (1 << N); v++) begin
        sel = s[0];
        din = N'(v);
        #1;
        for (int j = 0; j < 3; j++) begin
          d = 1 << j;
          // reference: the same shift written bit by bit
          for (int i = 0; i < N; i++) begin
            logic shifted_in;
            shifted_in = (i >= int'(d)) ? din[i-d] : 1'b0;
            exp_d[i] = sel ? shifted_in : din[i];
            exp_g[i] = sel ? din[i] : shifted_in;
          end
          checks++;
          if (dout[j] !== exp_d || garb[j] !== exp_g || selo[j] !== sel) begin
            failures++;
            if (failures < 10)
              $display("FAIL J=%0d sel=%0b din=%b: dout=%b (exp %b) garb=%b (exp %b) selo=%0b",
                       j, sel, din, dout[j], exp_d, garb[j], exp_g, selo[j]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
