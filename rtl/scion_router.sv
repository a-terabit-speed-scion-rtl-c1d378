// scion_router: SCION/EPIC L1 border-router data plane.
//
// A packet enters as a byte stream. pkt_parser extracts the header fields the router
// needs while every byte is also queued in pkt_buffer. Once the header is complete, the
// header vector passes through ingress_pipe (interface check, per-packet
// Simplified Even-Mansour MAC verification, route lookup, path meta header update; 8
// stages), and its decision is queued in a small decision FIFO. deparser then streams
// the buffered packet to the output, rewriting the path meta header when the packet is
// forwarded to another AS, and tagging every byte with its output port: the next-hop
// port, an internal port for a packet addressed to this AS, or CPU_PORT for any packet
// that fails parsing, the interface check, the MAC check or the route lookup.
//
// Packets with path type SCION are checked with the L0 MAC block, packets with path
// type EPIC with the L1 block that includes the packet timestamp and the source host.
//
// Flow control: in_ready drops when the packet buffer is full or when the decision
// FIFO could overflow (a packet of a few bytes yields a decision, so decisions are
// counted from the parser output until the deparser releases them). Throughput is one
// byte per cycle in and out; a packet's first byte can leave 10 cycles after its last
// header byte arrived (parser register, 8 pipeline stages, decision FIFO).
// Configuration (AS identity, AS key) and the two tables are written by the control
// plane through the cfg_* and *_wr_* ports.
// The check sequence, the CPU hand-off and the stage count follow the source design;
// the byte-wide datapath, the buffers and the handshakes are this design's own.
module scion_router
  import scion_pkg::*;
#(
  parameter int unsigned BUF_DEPTH  = 4096,
  parameter int unsigned DEC_DEPTH  = 16,
  parameter int unsigned IFT_IDX_W  = 8,
  parameter int unsigned HOST_IDX_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  // packet input
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [7:0]        in_data,
  input  logic              in_last,
  input  logic [PORT_W-1:0] in_port,
  // packet output
  output logic              out_valid,
  input  logic              out_ready,
  output logic [7:0]        out_data,
  output logic              out_last,
  output logic [PORT_W-1:0] out_port,
  output verdict_e          out_verdict,
  // control plane
  input  logic [15:0]       cfg_isd,
  input  logic [47:0]       cfg_as,
  input  logic [127:0]      cfg_key,
  input  logic              ift_wr_en,
  input  logic              ift_wr_set,
  input  logic [15:0]       ift_wr_ifid,
  input  logic [PORT_W-1:0] ift_wr_port,
  input  logic              host_wr_en,
  input  logic              host_wr_set,
  input  logic [31:0]       host_wr_addr,
  input  logic [PORT_W-1:0] host_wr_port
);

  localparam int unsigned DW = $bits(decision_t);
  localparam int unsigned CW = $clog2(DEC_DEPTH) + 1;

  logic in_fire;
  logic phv_valid;
  phv_t phv;
  logic buf_full;
  logic buf_valid, buf_last, buf_pop;
  logic [7:0] buf_data;
  logic dp_dec_valid, dp_dec_pop, pipe_dec_valid, dfifo_full;
  decision_t pipe_dec, dp_dec;
  logic [DW-1:0] dp_dec_bits;
  logic [CW-1:0] dfifo_count;
  logic [CW-1:0] pending_q;   // header vectors emitted and not yet released

  assign in_ready = !buf_full && (pending_q < CW'(DEC_DEPTH - 1));
  assign in_fire  = in_valid && in_ready;

  pkt_parser u_parser (
    .clk, .rst_n,
    .in_fire, .in_data, .in_last, .in_port,
    .phv_valid, .phv
  );

  pkt_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n,
    .wr_en(in_fire), .wr_data(in_data), .wr_last(in_last),
    .full(buf_full),
    .rd_valid(buf_valid), .rd_data(buf_data), .rd_last(buf_last), .rd_pop(buf_pop)
  );

  ingress_pipe #(.IFT_IDX_W(IFT_IDX_W), .HOST_IDX_W(HOST_IDX_W)) u_pipe (
    .clk, .rst_n,
    .phv_valid, .phv,
    .cfg_isd, .cfg_as, .cfg_key,
    .ift_wr_en, .ift_wr_set, .ift_wr_ifid, .ift_wr_port,
    .host_wr_en, .host_wr_set, .host_wr_addr, .host_wr_port,
    .dec_valid(pipe_dec_valid), .dec(pipe_dec)
  );

  sync_fifo #(.WIDTH(DW), .DEPTH(DEC_DEPTH)) u_dfifo (
    .clk, .rst_n,
    .wr_en(pipe_dec_valid), .wr_data(pipe_dec), .full(dfifo_full),
    .rd_valid(dp_dec_valid), .rd_data(dp_dec_bits), .rd_pop(dp_dec_pop),
    .count(dfifo_count)
  );
  assign dp_dec = decision_t'(dp_dec_bits);

  deparser u_dep (
    .clk, .rst_n,
    .dec_valid(dp_dec_valid), .dec(dp_dec), .dec_pop(dp_dec_pop),
    .buf_valid, .buf_data, .buf_last, .buf_pop,
    .out_valid, .out_ready, .out_data, .out_last, .out_port, .out_verdict
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pending_q <= '0;
    else        pending_q <= pending_q + CW'(phv_valid) - CW'(dp_dec_pop);
  end

  a_dec_fits: assert property (@(posedge clk) disable iff (!rst_n)
    pending_q <= CW'(DEC_DEPTH) && dfifo_count <= pending_q);
  a_no_dec_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    pipe_dec_valid |-> !dfifo_full);

endmodule
