// sem_ref_pkg: reference model of the SEM MAC for the testbenches.
//
// Written independently of the RTL: the S-box inverse is found by searching for b with
// a*b = 1 in GF(2^8), the affine map uses the bitwise AES formula, and the GIFT-128
// permutation index is assembled from bit fields instead of arithmetic.
package sem_ref_pkg;

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r, x;
    r = 0; x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= x;
      x = x[7] ? ((x << 1) ^ 8'h1b) : (x << 1);
    end
    return r;
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] a);
    logic [7:0] inv, s;
    inv = 0;
    for (int b = 1; b < 256; b++) if (gmul(a, 8'(b)) == 8'h01) inv = 8'(b);
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ ((8'h63 >> i) & 1);
    return s;
  endfunction

  // 256-entry cache so the model is fast.
  logic [7:0] sb_cache [256];
  bit         sb_ready = 0;

  function automatic logic [7:0] sbox_c(input logic [7:0] a);
    if (!sb_ready) begin
      for (int i = 0; i < 256; i++) sb_cache[i] = ref_sbox(8'(i));
      sb_ready = 1;
    end
    return sb_cache[a];
  endfunction

  function automatic logic [127:0] ref_layer(input logic [127:0] x, input int layer);
    logic [127:0] y;
    for (int p = 0; p < 16; p++) begin
      logic [7:0] off;
      off = 8'((16*layer + p) * 37 + 11);
      y[127-8*p -: 8] = sbox_c(x[127-8*p -: 8] ^ off);
    end
    return y;
  endfunction

  function automatic logic [6:0] ref_pidx(input logic [6:0] i);
    logic [1:0] b, c, g;
    logic [2:0] a;
    a = i[6:4]; b = i[3:2]; c = i[1:0];
    g = 2'(2'(3 * b) + c);
    return {g, a, c};
  endfunction

  function automatic logic [127:0] ref_perm(input logic [127:0] x);
    logic [127:0] y;
    for (int i = 0; i < 128; i++) y[ref_pidx(7'(i))] = x[i];
    return y;
  endfunction

  function automatic logic [127:0] ref_sem(input logic [127:0] m, input logic [127:0] k);
    return ref_layer(ref_perm(ref_layer(m ^ k, 0)), 1) ^ k;
  endfunction

endpackage
