// sem_mac: pipelined Simplified Even-Mansour block cipher used as the hop-field MAC.
//
// SEM(M) = P1(M xor K) xor K, with P1 = S-box layer 0, GIFT-128 bit permutation, S-box
// layer 1. One block enters per cycle (in_valid) and its result leaves five cycles
// later (out_valid), one layer per stage, as the steps would be spread over the stages
// of a match/action pipeline:
//   stage 1: M xor K     stage 2: S-box layer 0     stage 3: permutation
//   stage 4: S-box layer 1     stage 5: xor K
// The key travels with the block, so a key change takes effect for the next block
// without flushing the pipeline. No stall: the pipeline accepts a block every cycle.
// The caller truncates the 128-bit result to the 6-byte MAC (the top 48 bits).
module sem_mac #(
  parameter int unsigned LATENCY = 5  // fixed by the five layers; exported for users
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [127:0] in_block,
  input  logic [127:0] in_key,
  output logic         out_valid,
  output logic [127:0] out_mac
);

  logic [127:0] x1, x2, x3, x4, x5;
  logic [127:0] k1, k2, k3, k4;
  logic [4:0]   v;
  logic [127:0] s0_out, p_out, s1_out;

  sem_sbox_layer #(.LAYER(0)) u_s0 (.din(x1), .dout(s0_out));
  sem_perm                    u_p  (.din(x2), .dout(p_out));
  sem_sbox_layer #(.LAYER(1)) u_s1 (.din(x3), .dout(s1_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else        v <= {v[3:0], in_valid};
  end

  always_ff @(posedge clk) begin
    x1 <= in_block ^ in_key;  k1 <= in_key;
    x2 <= s0_out;             k2 <= k1;
    x3 <= p_out;              k3 <= k2;
    x4 <= s1_out;             k4 <= k3;
    x5 <= x4 ^ k4;
  end

  assign out_valid = v[4];
  assign out_mac   = x5;

  initial assert (LATENCY == 5) else $error("sem_mac: LATENCY must be 5");

endmodule
