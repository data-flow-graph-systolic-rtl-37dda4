// sa_pkg: sizes shared by the systolic FIR arrays.
//
// The arrays realize a 3-tap FIR filter y(n) = a0*x(n) + a1*x(n-1) + a2*x(n-2),
// the example carried through the method; TAPS_DEF is that tap count. The word
// widths are this design's own choice: 16-bit signed samples and weights, and a
// partial-sum width that holds the full-precision sum of TAPS products, so no
// rounding or overflow occurs anywhere in the array.
package sa_pkg;
  localparam int unsigned TAPS_DEF   = 3;
  localparam int unsigned DATA_W_DEF = 16;
  localparam int unsigned COEF_W_DEF = 16;

  // Full-precision width of a sum of `taps` products of the given widths.
  function automatic int unsigned acc_width(int unsigned data_w, int unsigned coef_w,
                                            int unsigned taps);
    return data_w + coef_w + $clog2(taps + 1);
  endfunction

  localparam int unsigned ACC_W_DEF = acc_width(DATA_W_DEF, COEF_W_DEF, TAPS_DEF);
endpackage
