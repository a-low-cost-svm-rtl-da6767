// svm_ref_pkg: reference arithmetic for the SVM classifier testbenches,
// written with plain integers and reals, independent of the RTL.
//   fix_mul   product of two Q*.8 numbers keeping 8 fractional bits (floor)
//   sat12     clamp to the 12-bit partial-sum range [-2048, 2047]
//   q8_to_f32 IEEE-754 single encoding of a Q*.8 integer, through a real
package svm_ref_pkg;

  function automatic int fix_mul(int f, int w);
    int p = f * w;
    // floor division by 256 without relying on a shift of a signed value
    if (p >= 0) return p / 256;
    else        return -((-p + 255) / 256);
  endfunction

  function automatic int sat12(int v);
    if (v > 2047)  return 2047;
    if (v < -2048) return -2048;
    return v;
  endfunction

  // Convert through the double encoding: exact for |v| < 2**24.
  function automatic logic [31:0] q8_to_f32(int v);
    real r;
    logic [63:0] d;
    int e;
    if (v == 0) return 32'h0;
    r = real'(v) / 256.0;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    return {d[63], 8'(e), d[51:29]};
  endfunction

  // Signed value of a 10-bit field.
  function automatic int s10(logic [9:0] x);
    return x[9] ? int'(x) - 1024 : int'(x);
  endfunction

  // Expected fixed-point confidence (Q5.8, bias included) of every window of
  // a frame of fw x fh blocks with ww x wh-block windows. feat holds 36
  // elements per block in raster order, wt 36 weights per window position in
  // row-major order. Each window's partial sum is accumulated in block
  // arrival order and clamped to 12 bits after every step; n_sat counts the
  // steps that clamp.
  function automatic void frame_expect(input int fw, input int fh, input int ww, input int wh,
                                       ref int feat[], ref int wt[], input int bias,
                                       ref int exp_fix[], ref int n_sat);
    int nwx = fw - ww + 1;
    int nwy = fh - wh + 1;
    exp_fix = new[nwx * nwy];
    for (int wy = 0; wy < nwy; wy++) begin
      for (int wx = 0; wx < nwx; wx++) begin
        int acc = 0;
        for (int ry = 0; ry < wh; ry++) begin
          for (int rx = 0; rx < ww; rx++) begin
            int b = (wy + ry) * fw + (wx + rx);
            int r = ry * ww + rx;
            int s = 0;
            int full;
            for (int e = 0; e < 36; e++) s += fix_mul(feat[b * 36 + e], wt[r * 36 + e]);
            full = acc + s;
            acc  = sat12(full);
            if (acc != full) n_sat++;
          end
        end
        exp_fix[wy * nwx + wx] = acc + bias;
      end
    end
  endfunction

endpackage
