// Shared constants and helpers of the Vedic multiplier family.
//
// NIKHILAM_CORE_W is the operand width of the Nikhilam core from which the
// wider Nikhilam multipliers are assembled. square() is the formula behind
// the square ROM of that core: entry i of the ROM holds i*i.
package vedic_pkg;

  // Base (operand width) of the Nikhilam core; wider Nikhilam multipliers
  // are assembled from cores of this width.
  localparam int unsigned NIKHILAM_CORE_W = 4;

  // Contents of the square ROM: entry i holds i squared.
  function automatic int unsigned square(input int unsigned i);
    return i * i;
  endfunction

endpackage
