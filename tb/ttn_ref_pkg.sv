// ttn_ref_pkg: software reference model of the TTN classifier arithmetic,
// used by the testbenches to compute expected results independently of the
// RTL. Numbers are plain integers holding Q(W-FRAC).FRAC values.
//   mulq(a, b)   = floor(a * b / 2^FRAC)
//   sat(v)       = v clipped to the signed W-bit range
//   node output  z[i] = sat( sum_jk mulq( sat(mulq(x[j], y[k])), V[i][j][k] ) )
//   feature map  round(2^FRAC * sin(pi/2 * a / 2^ABITS)), a the table address
package ttn_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic longint mulq(longint a, longint b, int frac);
    return (a * b) >>> frac;
  endfunction

  function automatic longint sat(longint v, int w);
    longint mx, mn;
    mx = (longint'(1) <<< (w - 1)) - 1;
    mn = -(longint'(1) <<< (w - 1));
    return (v > mx) ? mx : (v < mn) ? mn : v;
  endfunction

  // v is indexed (i*din + j)*din + k.
  function automatic void contract(input int din, input int dout,
                                   input longint x[], input longint y[],
                                   input longint v[], input int w, input int frac,
                                   output longint z[]);
    longint acc;
    z = new[dout];
    for (int i = 0; i < dout; i++) begin
      acc = 0;
      for (int j = 0; j < din; j++)
        for (int k = 0; k < din; k++)
          acc += mulq(sat(mulq(x[j], y[k], frac), w), v[(i * din + j) * din + k], frac);
      z[i] = sat(acc, w);
    end
  endfunction

  function automatic int bond(int l, int n, int d, int chi);
    int p;
    if (l == 0) return d;
    if (l >= $clog2(n)) return 1;
    p = d;
    for (int s = 0; s < l; s++) p = (p >= chi) ? p : p * p;
    return (p < chi) ? p : chi;
  endfunction

  function automatic int num_weights(int n, int d, int chi);
    int t;
    t = 0;
    for (int l = 1; l <= $clog2(n); l++)
      t += (n >> l) * bond(l, n, d, chi) * bond(l - 1, n, d, chi) * bond(l - 1, n, d, chi);
    return t;
  endfunction

  // Whole tree: leaves phi[n*d + c], weights in layer/node/(i,j,k) order.
  function automatic longint tree_eval(input int n, input int d, input int chi,
                                       input longint phi[], input longint wts[],
                                       input int w, input int frac);
    longint cur[][];
    longint nxt[][];
    longint x[], y[], v[], z[];
    int off, din, dout, nwn;
    cur = new[n];
    for (int m = 0; m < n; m++) begin
      cur[m] = new[d];
      for (int c = 0; c < d; c++) cur[m][c] = phi[m * d + c];
    end
    off = 0;
    for (int l = 1; l <= $clog2(n); l++) begin
      din  = bond(l - 1, n, d, chi);
      dout = bond(l, n, d, chi);
      nwn  = dout * din * din;
      nxt  = new[n >> l];
      for (int m = 0; m < (n >> l); m++) begin
        x = cur[2 * m];
        y = cur[2 * m + 1];
        v = new[nwn];
        for (int q = 0; q < nwn; q++) v[q] = wts[off + m * nwn + q];
        contract(din, dout, x, y, v, w, frac, z);
        nxt[m] = z;
      end
      off += (n >> l) * nwn;
      cur = nxt;
    end
    return cur[0][0];
  endfunction

  // Expected feature-map outputs for a raw input x.
  function automatic int fm_addr(longint x, int frac, int abits);
    if (x <= 0) return 0;
    if (x >= (longint'(1) <<< frac)) return 1 << abits;
    return int'(x >>> (frac - abits));
  endfunction

  function automatic longint fm_sin(int addr, int frac, int abits);
    real s;
    s = $sin(PI / 2.0 * real'(addr) / real'(1 << abits)) * real'(longint'(1) <<< frac);
    return longint'($floor(s + 0.5));
  endfunction

endpackage
