// tb_model_pkg -- reference arithmetic for the testbenches of the DA
// baseband processor, written independently of the RTL (plain integer
// multiply-accumulate instead of bit-serial distributed arithmetic).
//
// Holds the four coefficient sets of the processor's evaluation (integers in
// units of 2^-12: 4096 = 1.0), the partial-sum table rule
//   S(addr) = sum over k of C_k * addr[k-1]
// and the direct-form-II filter step with the fixed-point rules of the
// design: t0 = floor((A1*x - A2*t1 - A3*t2 - A4*t3 - A5*t4) / 2^12) wrapped
// to 14 bits, Y = floor((B1*t0 + .. + B5*t4) / 2^12) wrapped to 15 bits,
// where x is the 10-bit sample sign-extended to 14 bits.
package tb_model_pkg;

  // Pattern 0..3: centre / bandwidth 500/40, 650/40, 500/100, 400/240 kHz at 2 MHz
  localparam int A_TAB [4][5] = '{
    '{4096,     0, 7631,     0, 3600},
    '{4096,  7168, 10784, 6720, 3600},
    '{4096,     0, 6642,     0, 2930},
    '{4096, -4124, 5348, -2691, 1941}};
  localparam int B_TAB [4][5] = '{
    '{ 50,    0,   43,    0,  50},
    '{ 52,   68,   76,   68,  52},
    '{194,    0,   45,    0, 194},
    '{550, -192, -459, -192, 550}};

  // coefficient k (0..4) of the feedback (ff=0: A1, -A2..-A5) or
  // feed-forward (ff=1: B1..B5) block of a pattern
  function automatic int coef(int pat, bit ff, int k);
    if (ff) return B_TAB[pat][k];
    return (k == 0) ? A_TAB[pat][0] : -A_TAB[pat][k];
  endfunction

  function automatic int psum(int pat, bit ff, int addr);
    int s = 0;
    for (int k = 0; k < 5; k++) if (addr[k]) s += coef(pat, ff, k);
    return s;
  endfunction

  // floor(sum c_k w_k / 2^12), wrapped to `bits` bits, returned sign-extended
  function automatic int dot_slice(int c[5], int w[5], int bits);
    longint acc = 0;
    longint q;
    for (int k = 0; k < 5; k++) acc += longint'(c[k]) * longint'(w[k]);
    q = acc >>> 12;
    q = q & ((longint'(1) << bits) - 1);
    if (q >= (longint'(1) << (bits - 1))) q -= (longint'(1) << bits);
    return int'(q);
  endfunction

  // one sample of the filter: r holds t0(n-1)..t0(n-5); returns Y(n-1)
  // (the value the hardware emits in the frame of sample n) and updates r
  function automatic int filter_step(int pat_fb, int pat_ff, int x, ref int r[5]);
    int cf[5], cb[5], wf[5], wb[5];
    int t0, yv;
    for (int k = 0; k < 5; k++) begin
      cf[k] = coef(pat_fb, 1'b0, k);
      cb[k] = coef(pat_ff, 1'b1, k);
      wb[k] = r[k];
    end
    wf[0] = x;
    for (int k = 1; k < 5; k++) wf[k] = r[k-1];
    t0 = dot_slice(cf, wf, 14);
    yv = dot_slice(cb, wb, 15);
    for (int k = 4; k > 0; k--) r[k] = r[k-1];
    r[0] = t0;
    return yv;
  endfunction

endpackage
