// sem_sbox_layer: one substitution layer of the SEM permutation.
//
// Sixteen independent 8-bit table lookups, one per byte of the 128-bit block. Byte 0 is
// bits [127:120]. Each byte position has its own table (see sem_pkg for how the tables
// are derived); in a match/action pipeline each lookup is a separate exact-match table,
// so all sixteen run in parallel. LAYER selects which set of tables (0 or 1) the
// instance holds. Purely combinational; the caller registers the result.
module sem_sbox_layer
  import sem_pkg::*;
#(
  parameter int unsigned LAYER = 0
) (
  input  logic [127:0] din,
  output logic [127:0] dout
);

  localparam sbox_table_t SBOX = gen_sbox();

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      dout[127 - 8*i -: 8] = SBOX[din[127 - 8*i -: 8] ^ sbox_offset(LAYER, i)];
    end
  end

endmodule
