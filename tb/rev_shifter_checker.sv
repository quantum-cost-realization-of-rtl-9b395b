// rev_shifter_checker: test harness for one size of rev_logical_shifter.
//
// Instantiates the shifter at (N, K) and, from time 0, applies every data
// word with every shift amount. Each case is checked against the shift
// operator (data << amount) and against a reconstruction of the inputs from
// data_o and garbage_o alone (stages undone from the last to the first: a
// stage's input is its garbage word if its select was 1, else its output).
// It also compares the circuit's gate counts, garbage-output count and
// quantum cost with the expected figures given as parameters, and with the
// closed forms Fr = n(k-1)+n, Fe = n(k-1)+1, GO = nk+k. Raises done when
// finished; checks and failures hold the tallies.
module rev_shifter_checker #(
  parameter int unsigned N      = 8,
  parameter int unsigned K      = 3,
  parameter int unsigned FR_EXP = 24,
  parameter int unsigned FE_EXP = 17,
  parameter int unsigned GO_EXP = 27,
  parameter int unsigned QC_EXP = 137
) (
  output int   checks,
  output int   failures,
  output logic done
);

  localparam int unsigned GO = N * K + K;

  logic [N-1:0]  data_i, data_o;
  logic [K-1:0]  shamt_i;
  logic [GO-1:0] garbage_o;

  rev_logical_shifter #(.N(N), .K(K)) dut (
    .data_i    (data_i),
    .shamt_i   (shamt_i),
    .data_o    (data_o),
    .garbage_o (garbage_o)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL (%0d,%0d) %s", N, K, what);
    end
  endtask

  initial begin
    logic [N-1:0] exp_o, w;
    logic [K-1:0] s_rec;
    checks   = 0;
    failures = 0;
    done     = 1'b0;

    check(dut.FR_GATES == FR_EXP && dut.FR_GATES == N * (K - 1) + N,
          $sformatf("Fredkin gates %0d, expected %0d", dut.FR_GATES, FR_EXP));
    check(dut.FE_GATES == FE_EXP && dut.FE_GATES == N * (K - 1) + 1,
          $sformatf("Feynman gates %0d, expected %0d", dut.FE_GATES, FE_EXP));
    check($bits(garbage_o) == GO_EXP && dut.GARBAGE == GO_EXP,
          $sformatf("garbage outputs %0d, expected %0d", $bits(garbage_o), GO_EXP));
    check(dut.QUANTUM_COST == QC_EXP,
          $sformatf("quantum cost %0d, expected %0d", dut.QUANTUM_COST, QC_EXP));

    for (int s = 0; s < (1 << K); s++) begin
      for (longint v = 0; v < (64'd1 << N); v++) begin
        data_i  = N'(v);
        shamt_i = K'(s);
        #1;
        exp_o = data_i << shamt_i;
        check(data_o === exp_o,
              $sformatf("data=%h shamt=%0d: data_o=%h expected %h", data_i, shamt_i, data_o, exp_o));
        w = data_o;
        for (int j = int'(K) - 1; j >= 0; j--) begin
          s_rec[j] = garbage_o[N*K + j];
          if (s_rec[j]) w = garbage_o[j*N +: N];
        end
        check(s_rec === shamt_i && w === data_i,
              $sformatf("inverse of data=%h shamt=%0d gave data=%h shamt=%0d", data_i, shamt_i, w, s_rec));
      end
    end
    done = 1'b1;
  end

endmodule
