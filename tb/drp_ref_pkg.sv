// drp_ref_pkg - bit-accurate reference models of the display rendering
// pipeline for the testbenches.
//
// The models are written from the arithmetic definition of each step, not
// from the RTL structure: table look-ups by integer division instead of
// shifts and masks, the approximate adders bit by bit with an explicit
// ripple carry, the transfer functions in real arithmetic. Each model also
// reports which approximation mechanisms changed its result, so that the
// testbenches can show that every mechanism was exercised.
package drp_ref_pkg;
  import drp_pkg::*;

  // Mechanism counters filled by the models.
  typedef struct {
    int interp_steps;     // interpolated look-up with a non-zero slope step
    int sparse_shared;    // non-interpolated look-up in a sub-segment > 1 code
    int loa_diff;         // LOA result differs from the exact sum
    int lsa_diff;         // LSA result differs from the exact sum
    int scale_trunc;      // precision-scaling shift dropped non-zero bits
    int clamp_low;        // colour conversion result clamped to 0
    int clamp_high;       // colour conversion result clamped to 4095
  } mech_t;

  // Tone-mapping curve: 2^x / (2^x + 3.6^0.6), x = code/256 - 8, scaled to
  // 4095 and rounded to nearest.
  function automatic int ref_tone_map(int code);
    real e, sig, v;
    e   = $pow(2.0, real'(code) / 256.0 - 8.0);
    sig = $pow(3.6, 0.6);
    v   = 4095.0 * (e / (e + sig));
    if (v <= 0.0) return 0;
    if (v >= 4095.0) return 4095;
    return int'($floor(v + 0.5));
  endfunction

  // Inverse sRGB EOTF on codes scaled by 4095.
  function automatic int ref_eotf_inv(int code);
    real y, v;
    y = real'(code) / 4095.0;
    if (y < 0.0031308) v = 12.92 * y;
    else               v = 1.055 * $pow(y, 1.0 / 2.4) - 0.055;
    v = v * 4095.0;
    if (v <= 0.0) return 0;
    if (v >= 4095.0) return 4095;
    return int'($floor(v + 0.5));
  endfunction

  function automatic int ref_fn(lut_fn_e fn, int code);
    return (fn == FN_TONE_MAP) ? ref_tone_map(code) : ref_eotf_inv(code);
  endfunction

  // Sparse table with hierarchical segmentation.
  function automatic int ref_lut(lut_fn_e fn, bit interp, int nsec,
                                 seg_list_t nseg, int x, ref mech_t m);
    int wsec, s, segw, j, x0, y0, y1, frac;
    real r;
    wsec = 4096 / nsec;
    s    = x / wsec;
    segw = wsec / int'(nseg[s]);
    j    = (x % wsec) / segw;
    x0   = s * wsec + j * segw;
    frac = x - x0;
    if (!interp) begin
      if (segw > 1) m.sparse_shared++;
      return ref_fn(fn, x0 + segw / 2);
    end
    y0 = ref_fn(fn, x0);
    y1 = ref_fn(fn, x0 + segw);
    r  = $floor((real'((y1 - y0) * frac) + real'(segw) / 2.0) / real'(segw));
    if (frac != 0 && int'(r) != 0) m.interp_steps++;
    return y0 + int'(r);
  endfunction

  // Approximate adder on w-bit two's complement words, bit by bit.
  function automatic longint ref_adder(bit lsa, int w, int split, bit sel,
                                       longint a, longint b, ref mech_t m);
    bit [63:0] av, bv, sv;
    bit c;
    int p;
    longint res, exact;
    av = a; bv = b; sv = '0;
    p  = (split > w) ? w : split;
    c  = 1'b0;
    for (int k = 0; k < w; k++) begin
      if (k < p) begin
        if (lsa) sv[k] = sel ? bv[k] : av[k];
        else     sv[k] = av[k] | bv[k];
        if (k == p - 1 && !lsa) c = av[k] & bv[k];
      end else begin
        sv[k] = av[k] ^ bv[k] ^ c;
        c     = (av[k] & bv[k]) | (c & (av[k] ^ bv[k]));
      end
    end
    // sign-extend from w bits
    for (int k = w; k < 64; k++) sv[k] = sv[w-1];
    res   = longint'(sv);
    exact = a + b;
    if (res != exact) begin
      if (lsa) m.lsa_diff++;
      else     m.loa_diff++;
    end
    return res;
  endfunction

  // One output channel of the colour space conversion.
  function automatic int ref_csc(int row, f_co_arr_t fco, f_in_arr_t fin,
                                 add_bit_arr_t at, add_bit_arr_t as_,
                                 a_p_arr_t ap, coef_arr_t mr, rgb_t px,
                                 ref mech_t m);
    int     fi, fc, w;
    longint coef, prod, term [3], s1, s2, o;
    int     x [3];
    x[0] = px.r; x[1] = px.g; x[2] = px.b;
    fi = fin[row];
    w  = 12 + 3 + 2 + fi;
    for (int j = 0; j < 3; j++) begin
      fc   = fco[row][j];
      coef = longint'($floor(real'($signed(mr[row][j])) * $pow(2.0, real'(fc) - 13.0) + 0.5));
      prod = longint'(x[j]) * coef;
      if (fc >= fi) begin
        term[j] = longint'($floor(real'(prod) / $pow(2.0, real'(fc - fi))));
        if (term[j] * (longint'(1) << (fc - fi)) != prod) m.scale_trunc++;
      end else begin
        term[j] = prod * (longint'(1) << (fi - fc));
      end
    end
    // split points are limited to b + F_in
    s1 = ref_adder(at[row][0], w, (int'(ap[row][0]) > 12 + fi) ? 12 + fi : int'(ap[row][0]),
                   as_[row][0], term[0], term[1], m);
    s2 = ref_adder(at[row][1], w, (int'(ap[row][1]) > 12 + fi) ? 12 + fi : int'(ap[row][1]),
                   as_[row][1], s1, term[2], m);
    o  = longint'($floor(real'(s2) / $pow(2.0, real'(fi))));
    if (o < 0) begin
      m.clamp_low++;
      return 0;
    end
    if (o > 4095) begin
      m.clamp_high++;
      return 4095;
    end
    return int'(o);
  endfunction

endpackage
