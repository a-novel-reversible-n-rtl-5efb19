// Shared definitions of the reversible counter.
//
// garbage_width() gives the width of the counter's garbage bus: every
// reversible T flip-flop leaves the two side outputs of its Peres gate unused,
// and every Peres gate of the AND chain (bits 1 .. N-2) does the same.
//
// The cost_* functions are the published cost formulas of the n-bit design
// (valid for n >= 2), counted on the quantum circuit in which the clock is
// relayed through the Peres gates; they are kept here as reference figures
// for testbenches and reports and do not shape any hardware.
package rev_pkg;

  // Width of rev_counter's garbage output for an N-bit counter.
  function automatic int unsigned garbage_width(int unsigned n);
    return 2 * n + ((n > 2) ? 2 * (n - 2) : 0);
  endfunction

  // Reversible gates: one PG and one FG per flip-flop plus the fan-out and
  // AND gates.
  function automatic int unsigned cost_gates(int unsigned n);
    return 5 * n - 5;
  endfunction

  // Quantum cost with a Feynman gate costing 1 and a Peres gate 4.
  function automatic int unsigned cost_quantum(int unsigned n);
    return 11 * n - 11;
  endfunction

  function automatic int unsigned cost_constant_inputs(int unsigned n);
    return 4 * n - 4;
  endfunction

  function automatic int unsigned cost_garbage_outputs(int unsigned n);
    return 3 * n - 4;
  endfunction

  // Critical path in unit delays of primitive 1x1 / 2x2 gates.
  function automatic int unsigned cost_delay(int unsigned n);
    return 11 * (n - 1);
  endfunction

endpackage
