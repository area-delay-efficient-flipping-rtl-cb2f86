// tb_ref_pkg: reference arithmetic for the testbenches of the flipping DWT.
//
// Everything here is written with plain integer arithmetic and does not reuse
// the RTL's bit-level circuits:
//  * ref_mult: the fixed-width PEB Booth product. The exact product x*c minus
//    the value of the truncated part TP of the partial product array (found
//    from the Booth digits) leaves the kept part; the bias
//    A' + floor((TP_major + B')/2) is added and the result wrapped to n bits.
//  * ref_coef: coefficient mantissas from the 9/7 lifting constants.
//  * ref_au / ref_flip: the arithmetic unit and the four-stage flipping
//    recursion on a whole sequence, with zero start.
package tb_ref_pkg;

  localparam real ALPHA = -1.586134342059924;
  localparam real BETA  = -0.052980118572961;
  localparam real GAMMA =  0.882911075530934;
  localparam real DELTA =  0.443506852043971;
  localparam real KAPPA =  1.149604398860241;

  // Exponents of 1/a, 1/(ab), 1/(bg), 1/(gd), abg/K, abgdK.
  localparam int SHIFTS [6] = '{1, 5, 6, 3, -2, -3};

  function automatic longint sext(longint v, int n);
    longint m;
    m = (longint'(1) << n) - 1;
    v = v & m;
    return (v >= (longint'(1) << (n - 1))) ? v - (longint'(1) << n) : v;
  endfunction

  function automatic longint wrap(longint v, int n);
    return sext(v, n);
  endfunction

  function automatic real coef_real(int k);
    case (k)
      0: return 1.0 / ALPHA;
      1: return 1.0 / (ALPHA * BETA);
      2: return 1.0 / (BETA * GAMMA);
      3: return 1.0 / (GAMMA * DELTA);
      4: return ALPHA * BETA * GAMMA / KAPPA;
      default: return ALPHA * BETA * GAMMA * DELTA * KAPPA;
    endcase
  endfunction

  function automatic longint ref_coef(int k, int n);
    real s;
    s = coef_real(k) * (2.0 ** (n - SHIFTS[k]));
    return (s >= 0.0) ? longint'($floor(s + 0.5)) : -longint'($floor(-s + 0.5));
  endfunction

  // Booth digit i of c (n bits).
  function automatic int digit(longint c, int i);
    int b2, b1, b0;
    b2 = int'((c >> (2 * i + 1)) & 1);
    b1 = int'((c >> (2 * i)) & 1);
    b0 = (i == 0) ? 0 : int'((c >> (2 * i - 1)) & 1);
    return -2 * b2 + b1 + b0;
  endfunction

  function automatic longint ref_mult(longint x, longint c, int n);
    longint xs, cs, p, tp, rowv, rowbits, major, sigma, a_p, b_p, q;
    xs = sext(x, n);
    cs = sext(c, n);
    p  = xs * cs;
    tp = 0;
    major = 0;
    for (int i = 0; i < n / 2; i++) begin
      int d;
      d = digit(cs, i);
      // Row value before the +1 of a negation: d*x - (d < 0).
      rowv = longint'(d) * xs - ((d < 0) ? 1 : 0);
      rowbits = rowv & ((longint'(1) << (n + 1)) - 1);
      tp += (rowbits << (2 * i)) & ((longint'(1) << n) - 1);
      if (d < 0) tp += longint'(1) << (2 * i);
      major += (rowbits >> (n - 1 - 2 * i)) & 1;
    end
    a_p = (3 * n + 16) / 32;
    b_p = (((3 * n + 16) % 32) >= 16) ? 1 : 0;
    sigma = a_p + ((major + b_p) >> 1);
    q = ((p - tp) >>> n) + sigma;
    return wrap(q, n);
  endfunction

  function automatic longint shift_val(longint v, int s, int n);
    if (s >= 0) return wrap(v << s, n);
    return sext(v, n) >>> (-s);
  endfunction

  // z = c*x2 + x1 + x3 with coefficient k.
  function automatic longint ref_au(longint x1, longint x2, longint x3, int k, int n);
    longint pr;
    pr = shift_val(ref_mult(x2, ref_coef(k, n), n), SHIFTS[k], n);
    return wrap(pr + x1 + x3, n);
  endfunction

  // Flipping recursion over one sequence of pairs: xa[i] = x(2n-1) (multiplied),
  // xb[i] = x(2n). Outputs vl[i] (low band of pair i) and vh[i] (high band,
  // one pair late). Delays start at zero.
  task automatic ref_flip(input longint xa[], input longint xb[], input int n,
                          output longint vl[], output longint vh[]);
    longint s1, s2, s3, s4, r1, r2, r3, r4;
    vl = new[xa.size()];
    vh = new[xa.size()];
    s1 = 0; s2 = 0; s3 = 0; s4 = 0;
    foreach (xa[i]) begin
      r1 = ref_au(xb[i], xa[i], s1, 0, n);
      r2 = ref_au(r1, s1, s2, 1, n);
      r3 = ref_au(r2, s2, s3, 2, n);
      r4 = ref_au(r3, s3, s4, 3, n);
      vl[i] = shift_val(ref_mult(r4, ref_coef(5, n), n), SHIFTS[5], n);
      vh[i] = shift_val(ref_mult(s4, ref_coef(4, n), n), SHIFTS[4], n);
      s1 = xb[i]; s2 = r1; s3 = r2; s4 = r3;
    end
  endtask

  // Pixel alignment of the 2-D top: level shift, then shift by n-pix_w-6.
  function automatic longint ref_align(longint p, int pix_w, int n);
    longint v;
    int sh;
    v  = p - (longint'(1) << (pix_w - 1));
    sh = n - pix_w - 6;
    if (sh >= 0) return wrap(v << sh, n);
    return wrap(v >>> (-sh), n);
  endfunction

  // One-level 2-D transform of a w x h image, stored row-major in pix.
  // Rows first (zero start at each row), then the L and H columns (zero start
  // at the top). Results are (h/2) x (w/2), row-major.
  task automatic ref_dwt2d(input longint pix[], input int w, input int h,
                           input int pix_w, input int n,
                           output longint ll[], output longint lh[],
                           output longint hl[], output longint hh[]);
    longint rl[], rh[];
    longint xa[], xb[], vl[], vh[];
    rl = new[h * w / 2];
    rh = new[h * w / 2];
    for (int r = 0; r < h; r++) begin
      xa = new[w / 2];
      xb = new[w / 2];
      for (int k = 0; k < w / 2; k++) begin
        xa[k] = ref_align(pix[r * w + 2 * k], pix_w, n);
        xb[k] = ref_align(pix[r * w + 2 * k + 1], pix_w, n);
      end
      ref_flip(xa, xb, n, vl, vh);
      for (int k = 0; k < w / 2; k++) begin
        rl[r * w / 2 + k] = vl[k];
        rh[r * w / 2 + k] = vh[k];
      end
    end
    ll = new[h * w / 4];
    lh = new[h * w / 4];
    hl = new[h * w / 4];
    hh = new[h * w / 4];
    for (int k = 0; k < w / 2; k++) begin
      xa = new[h / 2];
      xb = new[h / 2];
      for (int m = 0; m < h / 2; m++) begin
        xa[m] = rl[(2 * m) * w / 2 + k];
        xb[m] = rl[(2 * m + 1) * w / 2 + k];
      end
      ref_flip(xa, xb, n, vl, vh);
      for (int m = 0; m < h / 2; m++) begin
        ll[m * w / 2 + k] = vl[m];
        lh[m * w / 2 + k] = vh[m];
      end
      for (int m = 0; m < h / 2; m++) begin
        xa[m] = rh[(2 * m) * w / 2 + k];
        xb[m] = rh[(2 * m + 1) * w / 2 + k];
      end
      ref_flip(xa, xb, n, vl, vh);
      for (int m = 0; m < h / 2; m++) begin
        hl[m * w / 2 + k] = vl[m];
        hh[m * w / 2 + k] = vh[m];
      end
    end
  endtask

endpackage
