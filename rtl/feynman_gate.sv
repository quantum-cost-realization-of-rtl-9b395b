// feynman_gate: 2x2 reversible Feynman (controlled-NOT) gate.
//
// P = A and Q = A xor B. The mapping is its own inverse, so no information is
// lost. With B held at 0 both outputs carry A, which is how the shifter makes
// the fan-out of two that a multiplexer tree needs while keeping every signal
// at a fan-out of one. Purely combinational, no clock.
//
// Quantum cost 1 (rev_pkg::QC_FE), the usual figure for this gate.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  always_comb begin
    p = a;
    q = a ^ b;
  end

endmodule
