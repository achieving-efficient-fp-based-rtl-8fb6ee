// da_pkg: shared sizes of the reconfigurable distributed-arithmetic (DA) FIR
// filter.
//
// The filter computes y = sum_n c[n] * x[k-n] without multipliers: every input
// sample is processed one bit position at a time, the bits of all taps at
// that position address a table of precomputed coefficient sums, and a
// scaling accumulator adds the table outputs with their binary weights.
//
// Defaults: 16-bit samples and a 35-bit result are the sizes printed on the
// filter's symbol (DAT_IN[15:0], RESULT[34:0]); the sample clock CLK1_16 is
// the bit clock divided by 16, i.e. one bit per clock. The coefficient width
// (16), tap count (8) and table address width (4) are this design's choices;
// 16 + 16 + log2(8) = 35 makes the printed result width exact for them.
package da_pkg;

  localparam int unsigned DATA_W_D     = 16; // input sample width B
  localparam int unsigned COEF_W_D     = 16; // coefficient width
  localparam int unsigned N_TAPS_D     = 8;  // filter length N
  localparam int unsigned LUT_ADDR_W_D = 4;  // taps per table partition M
  localparam int unsigned DA_UNITS_D   = 1;  // bit slices handled per clock L
  localparam int unsigned TRUNC_W_D    = 19; // width of RESULT_trun

  // Width of a table word: the sum of up to M coefficients.
  function automatic int unsigned lut_word_w(int unsigned coef_w, int unsigned m);
    return coef_w + $clog2(m);
  endfunction

  // Width that holds the full inner product of N taps without overflow.
  function automatic int unsigned acc_w(int unsigned data_w, int unsigned coef_w,
                                        int unsigned n_taps);
    return data_w + coef_w + $clog2(n_taps);
  endfunction

endpackage
