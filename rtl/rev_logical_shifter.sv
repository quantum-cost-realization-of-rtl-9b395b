// rev_logical_shifter: reversible (n, k) logical left barrel shifter.
//
// data_o = data_i << shamt_i, zero filled, built only from reversible gates:
// Fredkin gates as 2:1 multiplexers and Feynman gates for fan-out. It is a
// logarithmic shifter of K stages; stage j (rev_shift_stage with J = j)
// shifts by 2**j when shift bit s_j = shamt_i[j] is 1 and passes the word
// otherwise, so the stages together shift by any amount 0 .. 2**K - 1.
//
// Being reversible, the circuit also returns every line that is not the
// result, as garbage_o (N*K + K bits):
//   garbage_o[j*N +: N]  Fredkin R outputs of stage j (the unselected inputs)
//   garbage_o[N*K + j]   select line s_j after its trip through stage j
// Together with data_o they determine data_i and shamt_i uniquely. The
// select garbage lines equal shamt_i, because a Fredkin gate passes its
// control through unchanged; they are kept as ports so that no line of the
// reversible circuit is dropped. The gate
// count, garbage count and quantum cost are the rev_pkg formulas, exposed
// here as FR_GATES, FE_GATES, GARBAGE and QUANTUM_COST; at the default
// (8, 3) size they are 24, 17, 27 and 137.
//
// The default size (8, 3), the zero-fill logical left shift, the gate types
// and the stage-per-shift-bit algorithm follow the published design. The
// ordering of garbage_o is this implementation's choice. Purely
// combinational: a result is ready one propagation delay after the inputs
// change; there is no clock or reset.
module rev_logical_shifter
  import rev_pkg::*;
#(
  parameter int unsigned N = 8,   // data bits n
  parameter int unsigned K = 3,   // shift-value bits k, at most log2(n)
  // cost figures of the netlist below (see rev_pkg)
  localparam int unsigned FR_GATES     = fr_count(N, K),
  localparam int unsigned FE_GATES     = fe_count(N, K),
  localparam int unsigned GARBAGE      = go_count(N, K),
  localparam int unsigned QUANTUM_COST = qc_count(N, K)
) (
  input  logic [N-1:0]     data_i,
  input  logic [K-1:0]     shamt_i,
  output logic [N-1:0]     data_o,
  output logic [GARBAGE-1:0] garbage_o
);

  initial begin
    assert ((1 << K) <= N) else $error("rev_logical_shifter: K=%0d too large for N=%0d", K, N);
  end

  logic [N-1:0] word [K+1];   // word[j] enters stage j; word[K] is the result

  assign word[0] = data_i;

  for (genvar j = 0; j < K; j++) begin : g_stage
    rev_shift_stage #(.N(N), .J(j)) u_stage (
      .sel_i  (shamt_i[j]),
      .data_i (word[j]),
      .sel_o  (garbage_o[N*K + j]),
      .data_o (word[j+1]),
      .garb_o (garbage_o[j*N +: N])
    );
  end

  assign data_o = word[K];

endmodule
