// rev_pkg: constants and cost formulas shared by the reversible barrel shifter.
//
// The shifter is built only from two reversible gates: the 2x2 Feynman gate
// (quantum cost 1) and the 3x3 Fredkin gate (quantum cost 5). The functions
// below count the gates, garbage outputs and quantum cost of an (n, k)
// logical left shifter. They use the same structural rule as the generate
// loops in rev_shift_stage (fe_needs_copy), so the counts describe the netlist
// that is actually built. For k = log2(n) they reduce to the closed forms
//   Fredkin gates   Fr = n(k-1) + n
//   Feynman gates   Fe = n(k-1) + 1
//   garbage outputs GO = nk + k
//   quantum cost    QC = 5 Fr + Fe
// giving 8/5/10/45 for (4,2), 24/17/27/137 for (8,3), 64/49/68/369 for (16,4).
package rev_pkg;

  // Quantum cost of one gate, in elementary (1x1 and 2x2) quantum operations.
  localparam int unsigned QC_FR = 5;
  localparam int unsigned QC_FE = 1;

  // In the stage that shifts by d, bit i must reach two multiplexers (its own
  // position, and position i+d) exactly when i+d is still inside the word.
  // Such a bit is copied with one Feynman gate; the others go straight through.
  function automatic bit fe_needs_copy(int unsigned n, int unsigned d, int unsigned i);
    return (i + d) < n;
  endfunction

  // Feynman gates in one stage shifting by d.
  function automatic int unsigned stage_fe_count(int unsigned n, int unsigned d);
    int unsigned c = 0;
    for (int unsigned i = 0; i < n; i++)
      if (fe_needs_copy(n, d, i)) c++;
    return c;
  endfunction

  // One Fredkin multiplexer per bit per stage.
  function automatic int unsigned fr_count(int unsigned n, int unsigned k);
    return n * k;
  endfunction

  function automatic int unsigned fe_count(int unsigned n, int unsigned k);
    int unsigned c = 0;
    for (int unsigned j = 0; j < k; j++)
      c += stage_fe_count(n, 1 << j);
    return c;
  endfunction

  // Every Fredkin R output, plus the select line leaving the last gate of each stage.
  function automatic int unsigned go_count(int unsigned n, int unsigned k);
    return n * k + k;
  endfunction

  function automatic int unsigned qc_count(int unsigned n, int unsigned k);
    return QC_FR * fr_count(n, k) + QC_FE * fe_count(n, k);
  endfunction

endpackage
