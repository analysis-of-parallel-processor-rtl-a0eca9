// bs_pkg: number formats shared by the Black-Scholes finite-difference solvers.
//
// All arithmetic is IEEE-754 binary floating point with EW exponent and MW fraction
// bits. Single precision (binary32) is the default configuration of every module;
// double precision (binary64) is selected by passing the FP64 widths below.
// Values are carried as raw bit patterns.
package bs_pkg;

  localparam int unsigned FP32_EW = 8;
  localparam int unsigned FP32_MW = 23;
  localparam int unsigned FP64_EW = 11;
  localparam int unsigned FP64_MW = 52;

  // Width of one grid point on the explicit solver's stream: value, the three
  // stencil coefficients, and the first/last markers of an option's grid.
  function automatic int unsigned elem_width(int unsigned w);
    return 4 * w + 2;
  endfunction

endpackage
