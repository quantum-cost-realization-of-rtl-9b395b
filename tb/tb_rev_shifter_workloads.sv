// tb_rev_shifter_workloads: the three shifter sizes of the cost comparison.
//
// Runs rev_shifter_checker at (4, 2), (8, 3) and (16, 4), each exhaustively
// over all data words and shift amounts, and checks each size's Fredkin,
// Feynman, garbage-output and quantum-cost figures:
//   (4, 2):   8 FR,  5 FE, 10 GO, QC  45
//   (8, 3):  24 FR, 17 FE, 27 GO, QC 137
//   (16, 4): 64 FR, 49 FE, 68 GO, QC 369
module tb_rev_shifter_workloads;

  int   chk [3];
  int   fail [3];
  logic done [3];
  int   checks, failures;

  rev_shifter_checker #(.N(4),  .K(2), .FR_EXP(8),  .FE_EXP(5),  .GO_EXP(10), .QC_EXP(45))
    u_4_2  (.checks(chk[0]), .failures(fail[0]), .done(done[0]));
  rev_shifter_checker #(.N(8),  .K(3), .FR_EXP(24), .FE_EXP(17), .GO_EXP(27), .QC_EXP(137))
    u_8_3  (.checks(chk[1]), .failures(fail[1]), .done(done[1]));
  rev_shifter_checker #(.N(16), .K(4), .FR_EXP(64), .FE_EXP(49), .GO_EXP(68), .QC_EXP(369))
    u_16_4 (.checks(chk[2]), .failures(fail[2]), .done(done[2]));

  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2], fail[0] + fail[1] + fail[2] + 1);
    $finish;
  end

  initial begin
    wait (done[0] && done[1] && done[2]);
    checks   = chk[0] + chk[1] + chk[2];
    failures = fail[0] + fail[1] + fail[2];
    $display("(4,2): %0d checks, (8,3): %0d checks, (16,4): %0d checks", chk[0], chk[1], chk[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
