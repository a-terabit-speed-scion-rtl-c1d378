// pkt_buffer: byte store that holds each packet while its header is being checked.
//
// The parser sees every byte as it arrives, but the packet may only leave once the
// ingress pipeline has decided where it goes and whether its path meta header changes,
// so all bytes (with their end-of-packet flag) are queued here in arrival order and the
// deparser drains them. First-word-fall-through: the oldest byte is on rd_data while
// rd_valid is high; rd_pop removes it. wr_en must not be given while full.
// DEPTH must be a power of two and at least the longest header
// (1020 bytes, from the 8-bit HdrLen field in 4-byte units) so that a header can always
// be completed while earlier packets drain. On a switch ASIC the packet bodies wait in
// the chip's own queueing memory; this buffer, and its size, are this design's own.
module pkt_buffer #(
  parameter int unsigned DEPTH = 4096
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_en,
  input  logic [7:0]             wr_data,
  input  logic                   wr_last,
  output logic                   full,
  output logic                   rd_valid,
  output logic [7:0]             rd_data,
  output logic                   rd_last,
  input  logic                   rd_pop
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [8:0]  mem [DEPTH];
  logic [AW:0] wp_q, rp_q, used;

  assign used     = wp_q - rp_q;
  assign full     = (used == (AW+1)'(DEPTH));
  assign rd_valid = (used != '0);
  assign {rd_last, rd_data} = mem[rp_q[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q <= '0;
      rp_q <= '0;
    end else begin
      if (wr_en)              wp_q <= wp_q + 1'b1;
      if (rd_pop && rd_valid) rp_q <= rp_q + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wp_q[AW-1:0]] <= {wr_last, wr_data};
  end

  initial assert (DEPTH >= 1024 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("pkt_buffer: DEPTH must be a power of two of at least 1024");

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !full);

endmodule
