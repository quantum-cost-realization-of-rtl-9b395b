// rev_shift_stage: one stage of the reversible logarithmic left shifter.
//
// With sel_i = 1 the word moves left by D = 2**J places and the low D bits
// become 0; with sel_i = 0 it passes unchanged. Each output bit i is the Q
// output of a Fredkin gate used as a 2:1 multiplexer: B = data bit i,
// C = data bit i-D (a constant 0 for i < D), A = the select line.
//
// Reversible-logic rules allow each signal a fan-out of one, so:
//   * the select line is not broadcast: it enters the gate of bit 0 and is
//     passed from gate to gate through the Fredkin P output; the P output of
//     the last gate (bit N-1) leaves as sel_o, a garbage output;
//   * a data bit i that feeds two multiplexers (bit i and bit i+D, which
//     exists when i+D < N) is first copied by a Feynman gate with B = 0.
// This gives N Fredkin and N-D Feynman gates per stage, and N+1 garbage
// outputs (the N Fredkin R outputs in garb_o, plus sel_o).
//
// The use of Fredkin gates as multiplexers and Feynman gates for fan-out is
// the published design; the exact placement (select chained from bit 0
// upward, one copy per doubly used bit) is this implementation's reading,
// chosen because it reproduces the published gate, garbage and quantum-cost
// counts. Purely combinational.
module rev_shift_stage
  import rev_pkg::*;
#(
  parameter int unsigned N = 8,   // word width n
  parameter int unsigned J = 0    // stage index; shift distance 2**J
) (
  input  logic         sel_i,
  input  logic [N-1:0] data_i,
  output logic         sel_o,
  output logic [N-1:0] data_o,
  output logic [N-1:0] garb_o
);

  localparam int unsigned D = 1 << J;

  initial begin
    assert (D < N) else $error("rev_shift_stage: shift distance %0d must be below width %0d", D, N);
  end

  logic [N-1:0] b_line;     // straight input of the multiplexer of each bit
  logic [N-1:0] c_copy;     // second copy of each bit, for the multiplexer D places up
  logic [N:0]   sel_chain;  // select line threaded through the Fredkin P outputs

  assign sel_chain[0] = sel_i;

  for (genvar i = 0; i < N; i++) begin : g_bit
    if (fe_needs_copy(N, D, i)) begin : g_fanout
      feynman_gate u_fe (
        .a (data_i[i]),
        .b (1'b0),
        .p (b_line[i]),
        .q (c_copy[i])
      );
    end else begin : g_direct
      assign b_line[i] = data_i[i];
      assign c_copy[i] = 1'b0;  // never read: bit i has no multiplexer D places up
    end

    logic c_in;
    if (i >= D) begin : g_shifted
      assign c_in = c_copy[i-D];
    end else begin : g_zero_fill
      assign c_in = 1'b0;
    end

    fredkin_gate u_fr (
      .a (sel_chain[i]),
      .b (b_line[i]),
      .c (c_in),
      .p (sel_chain[i+1]),
      .q (data_o[i]),
      .r (garb_o[i])
    );
  end

  assign sel_o = sel_chain[N];

endmodule
