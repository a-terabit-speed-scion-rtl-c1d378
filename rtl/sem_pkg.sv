// sem_pkg: constants of the Simplified Even-Mansour (SEM) MAC.
//
// SEM(M) = P1(M xor K) xor K with a 128-bit key K used both before and after the
// unkeyed permutation P1. P1 is a substitution / permutation / substitution network
// that works on bytes: two layers of sixteen 8-bit S-boxes, one per byte position,
// with a bit permutation between them.
//
// The S-box of byte position i in layer l is S(x xor c(l,i)), where S is the AES S-box
// (multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1, then the AES affine map
// with constant 0x63) and c(l,i) = (16*l + i) * 37 + 11 mod 256. This gives each byte
// position its own table, as the scheme requires; the choice of base S-box and offsets
// is this design's own. The table is computed at elaboration from exp/log tables of
// the generator 3, so no data file is needed.
package sem_pkg;

  typedef logic [255:0][7:0] sbox_table_t;

  function automatic logic [7:0] xtime3(input logic [7:0] a);
    // a * 3 in GF(2^8)
    logic [7:0] a2;
    a2 = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    return a2 ^ a;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] a, input int unsigned n);
    return (a << n) | (a >> (8 - n));
  endfunction

  function automatic sbox_table_t gen_sbox();
    sbox_table_t t;
    logic [7:0] expt [256];
    logic [7:0] logt [256];
    logic [7:0] p;
    logic [7:0] inv;
    p = 8'h01;
    for (int i = 0; i < 256; i++) begin
      expt[i] = p;
      p = xtime3(p);
    end
    for (int i = 0; i < 256; i++) logt[i] = 8'h00;
    for (int i = 0; i < 255; i++) logt[expt[i]] = 8'(i);
    for (int x = 0; x < 256; x++) begin
      if (x == 0) inv = 8'h00;
      else inv = expt[(255 - int'(logt[x])) % 255];
      t[x] = inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
    end
    return t;
  endfunction

  // Input offset that makes S-box (layer, byte position) distinct.
  function automatic logic [7:0] sbox_offset(input int unsigned layer, input int unsigned pos);
    return 8'(((16 * layer + pos) * 37 + 11) % 256);
  endfunction

  // GIFT-128 bit permutation: bit i of the input moves to bit gift_perm_idx(i).
  function automatic int unsigned gift_perm_idx(input int unsigned i);
    return 4 * (i / 16) + 32 * ((3 * ((i % 16) / 4) + (i % 4)) % 4) + (i % 4);
  endfunction

endpackage
