// pdwt_ref_pkg -- reference models for the testbenches of the parameterized-DWT design.
//
// Written as plain integer and real arithmetic (with * and /), separately from the
// shift-and-add / look-up hardware:
//   coef_real   the filter constants from their closed-form expressions in alpha
//   coef_int    the same constants with the exact fixed-point recipe of the hardware
//               (alpha^2 exact, 1/alpha = floor(2^32/q) / 2^24, round to nearest at 10 bits)
//   fir_lo/hi   one output of the 9-tap / 7-tap filter on a window of samples
//   dwt2d       the keyed multi-level transform of an image held in `img`
//   reorient    the re-oriented read address of an output position
package pdwt_ref_pkg;

  localparam int CF = 10;

  function automatic real coef_real(int code, bit hi, int i);
    real a;
    a = 1.0 + 3.0 * code / 256.0;
    if (!hi) begin
      case (i)
        4: return -9.0*a/64 + a*a/32 + 15.0/64 - 1.0/(8*a);
        3: return -a*a/16 + 11.0*a/32 - 11.0/16 + 1.0/(2*a);
        2: return 1.0/8 - 1.0/(2*a);
        1: return a*a/16 - 11.0*a/32 + 15.0/16 - 1.0/(2*a);
        default: return 9.0*a/32 - a*a/16 - 7.0/32 + 5.0/(4*a);
      endcase
    end else begin
      case (i)
        0: return 1.0/4 + a/8;
        1: return -(7.0/32 + a/32);
        2: return 1.0/8 - a/16;
        default: return -(1.0/32 - a/32);
      endcase
    end
  endfunction

  function automatic longint rnd_q10(longint v24);
    longint t;
    t = v24 + 64'sd8192;
    // floor division by 2^14
    if (t >= 0) return t / 16384;
    return -((-t + 16383) / 16384);
  endfunction

  function automatic int coef_int(int code, bit hi, int i);
    longint q, sq, r, v, one;
    q   = 256 + 3 * code;
    sq  = q * q;
    r   = (64'sd1 << 32) / q;
    one = 64'sd1 << 24;
    if (!hi) begin
      case (i)
        4: v = -9*q*1024 + sq*8 + 15*one/64 - r/8;
        3: v = -sq*16 + 11*q*2048 - 11*one/16 + r/2;
        2: v = one/8 - r/2;
        1: v = sq*16 - 11*q*2048 + 15*one/16 - r/2;
        default: v = 9*q*2048 - sq*16 - 7*one/32 + (5*r)/4;
      endcase
    end else begin
      case (i)
        0: v = one/4 + q*8192;
        1: v = -(7*one/32 + q*2048);
        2: v = one/8 - q*4096;
        default: v = -(one/32 - q*2048);
      endcase
    end
    v = rnd_q10(v);
    if (v > 2047) v = 2047;
    if (v < -2048) v = -2048;
    return int'(v);
  endfunction

  function automatic longint sat(longint v, int w);
    longint mx, mn;
    mx = (64'sd1 << (w - 1)) - 1;
    mn = -(64'sd1 << (w - 1));
    if (v > mx) return mx;
    if (v < mn) return mn;
    return v;
  endfunction

  function automatic longint rnd_out(longint s);
    longint t;
    t = s + 512;
    if (t >= 0) return t / 1024;
    return -((-t + 1023) / 1024);
  endfunction

  // win[0..8] = x(k-4) .. x(k+4)
  function automatic longint fir_lo(longint win[9], int k[5], int ow);
    longint s;
    s = k[0] * win[4];
    for (int i = 1; i < 5; i++) s += k[i] * (win[4-i] + win[4+i]);
    return sat(rnd_out(s), ow);
  endfunction

  function automatic longint fir_hi(longint win[9], int k[4], int ow);
    longint s;
    s = k[0] * win[4];
    for (int i = 1; i < 4; i++) s += k[i] * (win[4-i] + win[4+i]);
    return sat(rnd_out(s), ow);
  endfunction

  // ---------------- 2-D model on a package-level image ----------------
  longint img [];      // N*N, row-major

  function automatic int refl(int t, int s);
    if (t < 0) return -t;
    if (t >= s) return 2 * (s - 1) - t;
    return t;
  endfunction

  // one line (row or column) of length s, in place, Mallat order
  function automatic void line_pass(int n, int s, int ln, bit col, int code, int mw);
    longint x [], y [];
    longint win [9];
    int klo [5], khi [4];
    x = new[s];
    y = new[s];
    for (int i = 0; i < 5; i++) klo[i] = coef_int(code, 0, i);
    for (int i = 0; i < 4; i++) khi[i] = coef_int(code, 1, i);
    for (int e = 0; e < s; e++) x[e] = col ? img[e * n + ln] : img[ln * n + e];
    for (int kc = 0; kc < s; kc++) begin
      for (int t = 0; t < 9; t++) win[t] = x[refl(kc - 4 + t, s)];
      if (kc % 2 == 0) y[kc / 2]         = sat(fir_lo(win, klo, mw + 2), mw);
      else             y[s / 2 + kc / 2] = sat(fir_hi(win, khi, mw + 2), mw);
    end
    for (int e = 0; e < s; e++) begin
      if (col) img[e * n + ln] = y[e];
      else     img[ln * n + e] = y[e];
    end
  endfunction

  function automatic void dwt2d(int n, int levels, int alpha [], int mw);
    for (int l = 0; l < levels; l++) begin
      int s;
      s = n >> l;
      for (int ln = 0; ln < s; ln++) line_pass(n, s, ln, 0, alpha[2*l], mw);
      for (int ln = 0; ln < s; ln++) line_pass(n, s, ln, 1, alpha[2*l+1], mw);
    end
  endfunction

  // subband of (r,c): returns index, size and base; then the 8 orientations
  function automatic int reorient(int n, int levels, int r, int c, int orient [],
                                  output int sr, output int sc);
    int sb, size, br, bc, i, j, ti, tj, o;
    sb = 0; size = n >> levels; br = 0; bc = 0;
    for (int l = 1; l <= levels; l++) begin
      int h;
      h = n >> l;
      if (r >= h || c >= h) begin
        size = h;
        if (r < h)      begin sb = 3*(l-1) + 1; br = 0; bc = h; end
        else if (c < h) begin sb = 3*(l-1) + 2; br = h; bc = 0; end
        else            begin sb = 3*(l-1) + 3; br = h; bc = h; end
        break;
      end
    end
    o = orient[sb];
    i = r - br; j = c - bc;
    if (o[2]) begin ti = j; tj = i; end else begin ti = i; tj = j; end
    if (o[1]) ti = size - 1 - ti;
    if (o[0]) tj = size - 1 - tj;
    sr = br + ti;
    sc = bc + tj;
    return sb;
  endfunction

endpackage
