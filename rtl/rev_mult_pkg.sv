// rev_mult_pkg: constants and cost functions shared by the TPS reversible
// multiplier.
//
// The multiplier is built only from TPS gates: WIDTH*WIDTH of them generate
// the partial products and WIDTH*(WIDTH-1) more, each wired as a full adder,
// sum the partial product rows. The functions below give the gate count and
// quantum cost of that netlist for a given operand width, so that a bench can
// compare them with published figures (28 gates and a quantum cost of 168 for
// the 4x4 case). The quantum cost of one TPS gate is taken as 6: its quantum
// circuit uses four controlled-V gates and two CNOT gates, and 6 is the value
// that the 4x4 totals imply (168 / 28).
package rev_mult_pkg;

  // Quantum cost of one TPS gate (four controlled-V and two CNOT gates).
  localparam int unsigned TPS_QUANTUM_COST = 6;

  // TPS gates in the partial product generation circuit: one per a_i*b_j.
  function automatic int unsigned ppgc_gate_count(int unsigned width);
    return width * width;
  endfunction

  // TPS gates in the parallel adder circuit: WIDTH-1 ripple rows of WIDTH
  // full adders each.
  function automatic int unsigned pac_gate_count(int unsigned width);
    return width * (width - 1);
  endfunction

  function automatic int unsigned mult_gate_count(int unsigned width);
    return ppgc_gate_count(width) + pac_gate_count(width);
  endfunction

  function automatic int unsigned mult_quantum_cost(int unsigned width);
    return TPS_QUANTUM_COST * mult_gate_count(width);
  endfunction

endpackage
