// tb_ref_pkg: reference arithmetic shared by the system-level testbenches.
//
// kernel_ref computes the example kernel's two outputs bit for bit in
// 64-bit integer arithmetic from its formulas and node formats (Q I.F with
// 15 fraction bits, truncation and saturation); fpval reads a
// single-precision word as a real. Both are written independently of the
// RTL.
package tb_ref_pkg;
  localparam int F = 15;

  function automatic longint sat(longint v, int i);
    longint mx = (longint'(1) <<< (i + F)) - 1;
    if (v > mx) return mx;
    if (v < -mx - 1) return -mx - 1;
    return v;
  endfunction

  function automatic longint isqrt(longint n);
    longint r;
    if (n <= 0) return 0;
    r = longint'($floor($sqrt(real'(n))));
    while (r * r > n) r--;
    while ((r + 1) * (r + 1) <= n) r++;
    return r;
  endfunction

  function automatic longint recip(longint x, int io);
    longint q;
    if (x == 0) return sat(longint'(1) <<< 62, io);
    q = (longint'(1) <<< 30) / (x < 0 ? -x : x);
    q = sat(q, io);
    return x < 0 ? -q : q;
  endfunction

  // op = (t - s) / (|t - s|^2 + e)^(3/2) in the kernel's fixed-point formats.
  task automatic kernel_ref(longint a1, longint b1, longint a2, longint b2, longint e,
                            output longint o1, output longint o2);
    longint rd1, rd2, rd3, rd4, rd5, rd6, rd7, rd8, rd9, rd10;
    rd1 = sat(a1 - b1, 7);
    rd2 = sat(a2 - b2, 7);
    rd3 = sat((rd1 * rd1) >>> F, 11);
    rd4 = sat((rd2 * rd2) >>> F, 11);
    rd5 = sat(rd3 + rd4, 12);
    rd6 = sat(rd5 + e, 12);
    rd7 = sat(isqrt(rd6 <<< F), 6);
    rd9 = recip(rd6, 13);
    rd8 = recip(rd7, 7);
    rd10 = sat((rd8 * rd9) >>> F, 19);
    o1 = sat((rd1 * rd10) >>> F, 25);
    o2 = sat((rd2 * rd10) >>> F, 25);
  endtask

  function automatic real p2(int n);
    real r = 1.0;
    for (int i = 0; i < n; i++) r = r * 2.0;
    for (int i = 0; i > n; i--) r = r / 2.0;
    return r;
  endfunction

  function automatic real fpval(logic [31:0] w);
    real m;
    if (w[30:23] == 0) return 0.0;
    m = (1.0 + real'(w[22:0]) / 8388608.0) * p2(int'(w[30:23]) - 127);
    return w[31] ? -m : m;
  endfunction
endpackage
