// svpwm_pkg -- constants and helper functions shared by the multilevel
// multiphase space vector PWM modules.
//
// Number formats used throughout the design:
//   * normalized reference v_r: two's complement fixed point with
//     lvl_w(N) integer bits (sign included) and FRAC_W fraction bits, i.e.
//     the phase voltage divided by the inverter voltage step V_dc;
//   * fractional part v_f and the sorted vector: unsigned, FRAC_W bits,
//     value = code / 2**FRAC_W, in [0, 1);
//   * switching times t_j: unsigned, FRAC_W+1 bits, value = code / 2**FRAC_W,
//     in [0, 1] (t_1 reaches 1 when every v_f component is 0);
//   * switching levels v_s: two's complement, lvl_w(N) bits.
// The five-phase, five-level configuration is the one built and tested in the
// reference FPGA implementation; the fixed-point widths are this design's
// choice (the algorithm is formulated in real numbers).
package svpwm_pkg;

  // Default configuration: five phases, five levels.
  localparam int unsigned DEF_P      = 5;
  localparam int unsigned DEF_N      = 5;
  // Fraction bits of the normalized reference (time resolution T / 4096).
  localparam int unsigned DEF_FRAC_W = 12;

  // Bits of a signed output level for an N-level inverter whose levels are
  // -(N-1)/2 .. (N-1)/2 voltage steps.
  function automatic int unsigned lvl_w(input int unsigned n);
    return $clog2(n) + 1;
  endfunction

  // Bits needed to hold a phase index 0 .. p-1 (at least one).
  function automatic int unsigned idx_w(input int unsigned p);
    return (p > 1) ? $clog2(p) : 1;
  endfunction

  // Highest positive level of an N-level symmetric inverter.
  function automatic int unsigned max_level(input int unsigned n);
    return (n - 1) / 2;
  endfunction

  // Entry (r, c) of the triangular coefficient matrix D-hat without its
  // constant first row: row r (0 = largest fractional component) is 1 in
  // every column c > r, for columns 0 .. P.
  function automatic logic triu_entry(input int unsigned r, input int unsigned c);
    return c > r;
  endfunction

endpackage
