// aqfp_pkg: constants and helpers shared by the AQFP Kogge-Stone adder.
//
// AQFP (adiabatic quantum-flux-parametron) gates are clocked by an AC
// power-clock: every gate and every buffer latches its result on one phase of
// the excitation and hands it to the gate in the next phase. The adder uses a
// four-phase excitation, so a word moves through four gate rows per
// excitation cycle. In this RTL a phase is one edge of `clk`; a gate row at
// pipeline position POS is enabled on phase POS mod 4.
//
// maj3() is the only logic primitive of the adder: AND and OR are majority
// gates with one constant input, and inversion is free on any input of an
// AQFP gate (a negative transformer coupling), so it appears as an input
// polarity option of the gate rather than as a separate cell.
package aqfp_pkg;

  // Phases per excitation cycle (two AC currents 90 degrees apart plus a DC
  // offset give four phases).
  localparam int unsigned NUM_PHASES = 4;

  typedef logic [NUM_PHASES-1:0] phase_t;  // one-hot: which phase fires next edge

  // Three-input majority.
  function automatic logic maj3(input logic a, input logic b, input logic c);
    return (a & b) | (a & c) | (b & c);
  endfunction

  // Depth of the Kogge-Stone prefix tree for a word of `width` bits.
  function automatic int unsigned prefix_levels(input int unsigned width);
    return (width <= 1) ? 0 : $clog2(width);
  endfunction

  // Pipeline positions a gate row occupies: itself plus its driver buffer.
  function automatic int unsigned row_stride(input bit driver_buf);
    return driver_buf ? 2 : 1;
  endfunction

  // Clocked stages from the operand inputs to the sum outputs: one row of
  // generate/propagate gates, one row per prefix level (the half-sum gate
  // shares the first of them), and two rows for the final XOR; each row is
  // followed by a driver buffer when driver_buf is set.
  function automatic int unsigned adder_stages(input int unsigned width,
                                               input bit driver_buf);
    return (prefix_levels(width) + 3) * row_stride(driver_buf);
  endfunction

endpackage
