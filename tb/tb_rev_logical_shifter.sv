// tb_rev_logical_shifter: end-to-end test of the (8, 3) reversible logical
// left shifter at its default size.
//
// Every data word is shifted by every amount (2048 cases). For each case the
// test checks
//   * the result against the language's own shift operator, data << amount;
//   * reversibility: the inputs are rebuilt from data_o and garbage_o alone,
//     running the stages backwards (a stage's input is its garbage word when
//     its select was 1, its output word when it was 0), and must match;
//   * that no two input cases give the same output vector.
// It also checks the circuit's cost figures (24 Fredkin, 17 Feynman gates,
// 27 garbage outputs, quantum cost 137) and counts the mechanisms of the
// design - each stage shifting and passing, zero fill, bits pushed out into
// the garbage - counting a failure for any that never happened.
module tb_rev_logical_shifter;

  localparam int unsigned N  = 8;
  localparam int unsigned K  = 3;
  localparam int unsigned GO = N * K + K;

  logic [N-1:0]  data_i, data_o;
  logic [K-1:0]  shamt_i;
  logic [GO-1:0] garbage_o;
  int            checks = 0, failures = 0;

  rev_logical_shifter dut (
    .data_i    (data_i),
    .shamt_i   (shamt_i),
    .data_o    (data_o),
    .garbage_o (garbage_o)
  );

  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [N-1:0]         exp_o, w;
    logic [K-1:0]         s_rec;
    bit                   seen [logic [N+GO-1:0]];
    // mechanism counters
    int                   n_stage_shift [K];
    int                   n_stage_pass  [K];
    // n_event[0]: a 1 in bit 0 replaced by a filled 0
    // n_event[1]: a 1 pushed past the top bit into the garbage
    // n_event[2]: shift amount 0;  n_event[3]: largest shift amount
    int                   n_event [4];

    // Cost figures of Tables 1 and 2 for (8, 3).
    check(dut.FR_GATES == 24,     $sformatf("Fredkin gates %0d, expected 24", dut.FR_GATES));
    check(dut.FE_GATES == 17,     $sformatf("Feynman gates %0d, expected 17", dut.FE_GATES));
    check($bits(garbage_o) == 27, $sformatf("garbage outputs %0d, expected 27", $bits(garbage_o)));
    check(dut.QUANTUM_COST == 137, $sformatf("quantum cost %0d, expected 137", dut.QUANTUM_COST));

    for (int k = 0; k < K; k++) begin
      n_stage_shift[k] = 0;
      n_stage_pass[k]  = 0;
    end
    for (int e = 0; e < 4; e++) n_event[e] = 0;

    for (int s = 0; s < (1 << K); s++) begin
      for (int v = 0; v < (1 << N); v++) begin
        data_i  = N'(v);
        shamt_i = K'(s);
        #1;
        exp_o = data_i << shamt_i;
        check(data_o === exp_o,
              $sformatf("data=%b shamt=%0d: data_o=%b expected %b", data_i, shamt_i, data_o, exp_o));

        // Run the stages backwards from the outputs alone.
        w = data_o;
        for (int j = K - 1; j >= 0; j--) begin
          s_rec[j] = garbage_o[N*K + j];
          if (s_rec[j]) w = garbage_o[j*N +: N];
        end
        check(s_rec === shamt_i && w === data_i,
              $sformatf("inverse of data=%b shamt=%0d gave data=%b shamt=%0d", data_i, shamt_i, w, s_rec));

        checks++;
        if (seen.exists({data_o, garbage_o})) begin
          failures++;
          $display("FAIL output vector repeated at data=%b shamt=%0d", data_i, shamt_i);
        end
        seen[{data_o, garbage_o}] = 1'b1;

        for (int j = 0; j < K; j++)
          if (shamt_i[j]) n_stage_shift[j]++; else n_stage_pass[j]++;
        if (shamt_i != 0 && data_i[0]) n_event[0]++;
        if ((data_i >> (N - int'(shamt_i))) != 0 && shamt_i != 0) n_event[1]++;
        if (shamt_i == 0) n_event[2]++;
        if (shamt_i == K'((1 << K) - 1)) n_event[3]++;
      end
    end

    check(seen.num() == (1 << (N + K)), $sformatf("%0d distinct output vectors", seen.num()));

    for (int j = 0; j < K; j++) begin
      $display("stage %0d: shifted %0d times, passed %0d times", j, n_stage_shift[j], n_stage_pass[j]);
      check(n_stage_shift[j] > 0 && n_stage_pass[j] > 0, $sformatf("stage %0d not exercised both ways", j));
    end
    $display("zero fill %0d, bits shifted out %0d, no shift %0d, full shift %0d",
             n_event[0], n_event[1], n_event[2], n_event[3]);
    check(n_event[0] > 0 && n_event[1] > 0 && n_event[2] > 0 && n_event[3] > 0,
          "a mechanism never happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
