// fredkin_gate: 3x3 reversible Fredkin (controlled-swap) gate.
//
// P = A, Q = A'B xor AC, R = A'C xor AB: when A is 0 the data lines pass
// straight, when A is 1 they swap. Q alone is a 2:1 multiplexer (A ? C : B),
// which is the role the gate plays in the barrel shifter; R carries the
// unselected input and becomes a garbage output, and P hands the select line
// on to the next gate of the stage. Purely combinational, no clock.
//
// Quantum cost 5 (rev_pkg::QC_FR).
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = (~a & b) ^ (a & c);
    r = (~a & c) ^ (a & b);
  end

endmodule
