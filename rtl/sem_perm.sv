// sem_perm: permutation layer between the two S-box layers of the SEM permutation.
//
// The wiring is the GIFT-128 bit permutation: input bit i (bit 0 = LSB) goes to output
// bit 4*floor(i/16) + 32*((3*floor((i mod 16)/4) + (i mod 4)) mod 4) + (i mod 4). Every
// output byte collects bits from four different input bytes, which is what spreads one
// byte's S-box output over four bytes of the second layer. Pure wiring, no logic.
// The source design derives its permutation from GIFT-128 and describes it as working
// on bytes; a pure byte shuffle would leave the two S-box layers unmixed, so this
// design takes the GIFT-128 bit permutation itself.
module sem_perm
  import sem_pkg::*;
(
  input  logic [127:0] din,
  output logic [127:0] dout
);

  for (genvar i = 0; i < 128; i++) begin : g_bit
    assign dout[gift_perm_idx(i)] = din[i];
  end

endmodule
