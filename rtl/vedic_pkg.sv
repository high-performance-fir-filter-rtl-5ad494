// vedic_pkg: constants and helpers shared by the MAC unit and the FIR
// filters. DEFAULT_DATA_W is the operand width of the 4x4 Urdhva multiplier,
// the width the filter is built for by default; every module takes its own
// DATA_W parameter, which must be a power of two for the Urdhva multiplier.
// prod_width gives the product width of two DATA_W-bit operands, and
// sum_width the width a sum of TAPS such products needs without overflow
// (product width plus ceil(log2(TAPS)) guard bits).
package vedic_pkg;
  localparam int unsigned DEFAULT_DATA_W = 4;

  function automatic int unsigned prod_width(input int unsigned data_w);
    return 2 * data_w;
  endfunction

  function automatic int unsigned sum_width(input int unsigned data_w, input int unsigned taps);
    return prod_width(data_w) + ((taps > 1) ? $clog2(taps) : 0);
  endfunction
endpackage
