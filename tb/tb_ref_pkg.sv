// tb_ref_pkg: reference arithmetic for the testbenches, written with plain integer
// operations and independent of the RTL structure: Q5.10 product truncation, the
// saturating adder with K lower-part-OR bits, min-max normalisation and the
// table-based softmax (its table from real-valued 2^(-k/32)).
package tb_ref_pkg;

  function automatic int sat16(longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  // Q5.10 product: sign = bit 31 of the 32-bit product, magnitude bits 24..10.
  function automatic int mul_ref(int a, int b);
    longint p;
    int r;
    p = longint'(a) * longint'(b);
    r = int'((p >>> 10) & 64'h7FFF);
    if (p < 0) r = r - 32768;
    return r;
  endfunction

  // Saturating add; K lowest bits use the OR cell and ignore cin.
  function automatic int add_ref(int a, int b, int cin, int k);
    longint v;
    int mask, ck;
    if (k == 0) begin
      v = longint'(a) + longint'(b) + longint'(cin);
    end else begin
      mask = (1 << k) - 1;
      ck = ((a >> (k - 1)) & 1) & ((b >> (k - 1)) & 1);
      v = (longint'(a >>> k) + longint'(b >>> k) + longint'(ck)) * (longint'(1) << k)
          + longint'((a | b) & mask);
    end
    return sat16(v);
  endfunction

  // Neuron: sum over n inputs with alternating carry, then bias.
  function automatic int neuron_ref(int xs[], int ws[], int bias, int ksum, int kbias);
    int acc = 0;
    for (int i = 0; i < xs.size(); i++)
      acc = add_ref(acc, mul_ref(xs[i], ws[i]), i % 2, ksum);
    return add_ref(acc, bias, 0, kbias);
  endfunction

  function automatic int norm_ref(int x, int mn, int mx);
    if (mx == mn) return 0;
    return int'((longint'(x - mn) * 1024) / longint'(mx - mn));
  endfunction

  function automatic int exp_lut(int k);
    return int'($floor((2.0 ** (-real'(k) / 32.0)) * 32768.0 + 0.5));
  endfunction

  // Table-based exponential of (x - m), unsigned Q1.15.
  function automatic int exp_ref(int x, int m);
    longint t;
    int n, k;
    t = longint'(m - x) * 47274;
    n = int'(t >> 25);
    k = int'((t >> 20) & 31);
    if (n >= 16) return 0;
    return exp_lut(k) >> n;
  endfunction

endpackage
