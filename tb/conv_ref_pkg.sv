// conv_ref_pkg: reference arithmetic for the testbenches, written from the
// mathematical definitions (real-valued) rather than from the RTL.
//
// Data formats: activations are 8-bit two's complement with 4 fraction bits,
// weights 8-bit with 6 fraction bits. Layouts of the flat arrays:
//   fm  [c*N*N + y*N + x]
//   w   [((f*C + c)*K + ky)*K + kx]
//   out [f*OUT*OUT + y*OUT + x]
package conv_ref_pkg;

  function automatic int round_half_up(real v);
    return int'($floor(v + 0.5));
  endfunction

  function automatic int round_half_away(real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  // Hard-Sigmoid of a value with 4 fraction bits, result with 4 fraction bits.
  function automatic int ref_hsigmoid(int x);
    real xr = real'(x) / 16.0;
    real yr;
    if (xr <= -3.0)     yr = 0.0;
    else if (xr >= 3.0) yr = 1.0;
    else                yr = (xr + 3.0) / 6.0;
    return round_half_up(yr * 16.0);
  endfunction

  // Hard-Swish of a value with 4 fraction bits, result with 4 fraction bits.
  function automatic int ref_hswish(int x);
    real xr = real'(x) / 16.0;
    real yr;
    if (xr <= -3.0)     yr = 0.0;
    else if (xr >= 3.0) yr = xr;
    else                yr = xr * (xr + 3.0) / 6.0;
    return round_half_away(yr * 16.0);
  endfunction

  // mode: 0 none, 1 Hard-Sigmoid, 2 Hard-Swish
  function automatic int ref_act(int x, int mode);
    case (mode)
      1:       return ref_hsigmoid(x);
      2:       return ref_hswish(x);
      default: return x;
    endcase
  endfunction

  // Rescale a sum of products (10 fraction bits) to 4 fraction bits, saturate.
  function automatic int ref_requant(longint s);
    int q = round_half_up(real'(s) / 64.0);
    if (q > 127)  q = 127;
    if (q < -128) q = -128;
    return q;
  endfunction

  function automatic int out_size(int n, int k, int pad, int stride);
    return (n + 2 * pad - k) / stride + 1;
  endfunction

  // One output value of a convolution layer, rescaled, before the activation.
  function automatic int ref_conv_q(ref byte fm[], ref byte w[], input int n,
                                    int c_n, int k, int pad, int stride,
                                    int f, int oy, int ox);
    longint s = 0;
    for (int c = 0; c < c_n; c++)
      for (int ky = 0; ky < k; ky++)
        for (int kx = 0; kx < k; kx++) begin
          int iy = oy * stride - pad + ky;
          int ix = ox * stride - pad + kx;
          if (iy >= 0 && iy < n && ix >= 0 && ix < n)
            s += longint'(fm[c*n*n + iy*n + ix]) * longint'(w[((f*c_n + c)*k + ky)*k + kx]);
        end
    return ref_requant(s);
  endfunction

  // One output value of a convolution layer.
  function automatic int ref_conv_point(ref byte fm[], ref byte w[], input int n,
                                        int c_n, int k, int pad, int stride,
                                        int f, int oy, int ox, int mode);
    return ref_act(ref_conv_q(fm, w, n, c_n, k, pad, stride, f, oy, ox), mode);
  endfunction

endpackage
