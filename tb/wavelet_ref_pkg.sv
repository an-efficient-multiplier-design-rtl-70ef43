// wavelet_ref_pkg: integer reference model of the (9,7) wavelet chain used
// by the testbenches. It computes each output directly as a 9-term sum over
// the signal (no window register, no pipeline), with its own copy of the
// coefficients in Q1.14:
//   analysis lowpass  h = 13971, 6183, -1812, -391, 620  (distance 0..4)
//   analysis highpass g = 12919, -6850, -667, 1057       (distance 0..3)
// A stream element m is centred on sample m-4 and uses the even set when m
// is even. Forward outputs are rounded to Q.4, inverse outputs to integers
// and clamped to 0..255.
package wavelet_ref_pkg;

  typedef int int_q[$];

  function automatic int coef(input bit inverse, input bit odd, input int j);
    int t_dwt_e [5] = '{13971,  6183, -1812, -391, 620};
    int t_dwt_o [5] = '{12919, -6850,  -667, 1057,   0};
    int t_idw_e [5] = '{12919, -6183,  -667,  391,   0};
    int t_idw_o [5] = '{13971,  6850, -1812, -1057, 620};
    if (!inverse) return odd ? t_dwt_o[j] : t_dwt_e[j];
    return odd ? t_idw_o[j] : t_idw_e[j];
  endfunction

  function automatic int at(const ref int_q s, input int i);
    if (i < 0 || i >= s.size()) return 0;
    return s[i];
  endfunction

  // Full-precision 9-tap sum for stream element m.
  function automatic longint tap_sum(input bit inverse, const ref int_q s, input int m);
    longint acc = 0;
    int c = m - 4;
    for (int j = -4; j <= 4; j++) begin
      acc += longint'(coef(inverse, m[0], (j < 0) ? -j : j)) * longint'(at(s, c - j));
    end
    return acc;
  endfunction

  // Forward transform of `len` stream elements (pixels followed by zeros).
  function automatic int_q dwt(const ref int_q pix, input int len);
    int_q r;
    for (int m = 0; m < len; m++) r.push_back(int'((tap_sum(1'b0, pix, m) + 512) >>> 10));
    return r;
  endfunction

  function automatic int_q fuse(const ref int_q a, const ref int_q b);
    int_q r;
    for (int m = 0; m < a.size(); m++) r.push_back((a[m] + b[m]) >>> 1);
    return r;
  endfunction

  function automatic int idwt_raw(const ref int_q cf, input int m);
    return int'((tap_sum(1'b1, cf, m) + (longint'(1) << 17)) >>> 18);
  endfunction

  function automatic int clamp8(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  function automatic int_q idwt(const ref int_q cf);
    int_q r;
    for (int m = 0; m < cf.size(); m++) r.push_back(clamp8(idwt_raw(cf, m)));
    return r;
  endfunction

endpackage
