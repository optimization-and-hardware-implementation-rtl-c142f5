// wm_ref_pkg: reference model of the watermark embedding arithmetic for the testbenches.
//
// Integer model of the 10.10 fixed-point algorithm written with 64-bit arithmetic and explicit
// wrap-around to 20 bits, independent of the RTL: local mean eq. (13) with delta = 8, scaled
// local variance eq. (21) with d = 2, mask eq. (7), u = M * w, the chunked ||u||^2 of eq. (11),
// alpha = 16 A / sqrt(256 ||u||^2) and y = x + alpha * u. The PSNR amplitudes are computed here
// from A = 255 / sqrt(10^(PSNR/10)) in floating point.
package wm_ref_pkg;

  function automatic longint wrap20(longint v);
    longint r;
    r = v & 64'hFFFFF;
    if (r >= 64'h80000) r = r - 64'h100000;
    return r;
  endfunction

  function automatic longint rmul(longint a, longint b);
    return wrap20((a * b) >>> 10);
  endfunction

  function automatic longint rdiv(longint dd, longint ds);   // 30-bit / 20-bit, 20 LSBs
    if (ds == 0) return 64'hFFFFF;
    return (dd / ds) & 64'hFFFFF;
  endfunction

  function automatic longint risqrt(longint v);
    longint r;
    r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  function automatic longint amp(int sel);
    real a;
    a = 255.0 / $sqrt(10.0 ** ((30.0 + sel) / 10.0));
    return longint'($floor(a * 1024.0));
  endfunction

  // neighbourhood in 10.10 (pixel << 10), nine entries
  function automatic longint rmean(longint nb [9]);
    longint s;
    s = 0;
    for (int k = 0; k < 9; k++) s = wrap20(s + rmul(nb[k] >>> 8, 29127));
    return s;
  endfunction

  function automatic longint rvar(longint nb [9], longint mu);
    longint s, d;
    s = 0;
    for (int k = 0; k < 9; k++) begin
      d = wrap20(nb[k] - mu);
      s = wrap20(s + rmul(d >>> 5, d >>> 6));
    end
    return s;
  endfunction

  function automatic longint rmask(longint v);
    longint q;
    q = rdiv(4 * 1024, (4 + v) & 64'hFFFFF);
    return wrap20(1024 - q);
  endfunction

  // u of pixel (i,j) of an m x n image held in x (raster)
  function automatic longint ru(ref byte unsigned x [], input int m, input int n, input int i,
                                input int j, input longint w);
    longint nb [9];
    longint mu, v;
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++) begin
        int ii, jj;
        ii = i + a - 1; jj = j + b - 1;
        nb[a*3+b] = (ii >= 0 && ii < m && jj >= 0 && jj < n) ? longint'(x[ii*n+jj]) << 10 : 0;
      end
    mu = rmean(nb);
    v  = rvar(nb, mu);
    return rmul(rmask(v), w);
  endfunction

  // whole embedding; colmajor selects the order in which u^2 is accumulated
  function automatic void rembed(ref byte unsigned x [], ref int w [], input int m, input int n,
                                 input int sel, input bit colmajor, ref int u [], ref int y [],
                                 output longint alpha, output int chunks);
    longint sum, acc, q, r;
    int p;
    u = new[m*n];
    y = new[m*n];
    for (int i = 0; i < m; i++)
      for (int j = 0; j < n; j++) u[i*n+j] = int'(ru(x, m, n, i, j, longint'(w[i*n+j])));
    sum = 0; acc = 0; chunks = 0;
    for (int t = 0; t < m*n; t++) begin
      p = colmajor ? ((t % m) * n + (t / m)) : t;
      sum = wrap20(sum + rmul(u[p], u[p]));
      if (sum >= 462 * 1024 || (t == m*n-1 && sum != 0)) begin
        q = rdiv(sum << 10, (m / 16) * 1024);
        q = rdiv(q << 10, (n / 16) * 1024);
        acc = wrap20(acc + q);
        sum = 0;
        chunks++;
      end
    end
    r = risqrt(acc & 64'hFFFFF);
    alpha = wrap20(rdiv(wrap20(amp(sel) * 16) << 10, r << 5));
    for (int k = 0; k < m*n; k++) y[k] = int'(wrap20((longint'(x[k]) << 10) + rmul(alpha, u[k])));
  endfunction

  // approximately Gaussian watermark sample in 10.10 (Irwin-Hall of 12 uniforms), times gain
  function automatic int gauss_w(real gain);
    real s;
    s = 0.0;
    for (int k = 0; k < 12; k++) s += real'($urandom_range(0, 1000000)) / 1000000.0;
    s = (s - 6.0) * gain;
    if (s > 6.9) s = 6.9;
    if (s < -6.9) s = -6.9;
    return int'($floor(s * 1024.0));
  endfunction

endpackage
