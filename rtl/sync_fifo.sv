// sync_fifo: single-clock first-word-fall-through FIFO.
//
// The oldest entry is visible on rd_data whenever rd_valid is high; rd_pop removes it.
// wr_en stores wr_data at the next edge and must not be asserted when full (checked by
// an assertion). count is the number of stored entries. DEPTH must be a power of two.
// Used to queue forwarding decisions and, in pkt_buffer, packet bytes.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  output logic                     full,
  output logic                     rd_valid,
  output logic [WIDTH-1:0]         rd_data,
  input  logic                     rd_pop,
  output logic [$clog2(DEPTH):0]   count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wp_q, rp_q;

  assign count    = wp_q - rp_q;
  assign full     = (count == (AW+1)'(DEPTH));
  assign rd_valid = (count != '0);
  assign rd_data  = mem[rp_q[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q <= '0;
      rp_q <= '0;
    end else begin
      if (wr_en)             wp_q <= wp_q + 1'b1;
      if (rd_pop && rd_valid) rp_q <= rp_q + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wp_q[AW-1:0]] <= wr_data;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd_pop |-> rd_valid);

endmodule
