// deparser: sends each buffered packet out with its forwarding decision applied.
//
// It takes the oldest decision and the packet bytes in the same order the packets
// arrived. While a decision is waiting, bytes flow from the packet buffer to the output
// at one byte per cycle, tagged with the decision's port and verdict; when the decision
// asks for it, the four bytes at meta_off (the path meta header) are replaced by the
// advanced header. The decision is released with the packet's last byte, so the next
// packet follows without an idle cycle. out_valid/out_ready is a valid/ready handshake:
// a byte moves when both are high, and out_valid stays high with the same byte until
// then. Purely combinational apart from the byte counter. Rewriting only the path
// meta header is this design's choice: it is the only field the router changes.
module deparser
  import scion_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // decisions
  input  logic              dec_valid,
  input  decision_t         dec,
  output logic              dec_pop,
  // packet bytes
  input  logic              buf_valid,
  input  logic [7:0]        buf_data,
  input  logic              buf_last,
  output logic              buf_pop,
  // output stream
  output logic              out_valid,
  input  logic              out_ready,
  output logic [7:0]        out_data,
  output logic              out_last,
  output logic [PORT_W-1:0] out_port,
  output verdict_e          out_verdict
);

  logic [OFF_W-1:0] off_q;
  logic [OFF_W-1:0] rel;
  logic             fire;

  assign rel         = off_q - dec.meta_off;
  assign out_valid   = dec_valid && buf_valid;
  assign out_last    = buf_last;
  assign out_port    = dec.port;
  assign out_verdict = dec.verdict;
  assign fire        = out_valid && out_ready;
  assign buf_pop     = fire;
  assign dec_pop     = fire && buf_last;

  always_comb begin
    out_data = buf_data;
    if (dec.rewrite && off_q >= dec.meta_off && rel < OFF_W'(META_LEN))
      out_data = dec.new_meta[31 - 8*rel[1:0] -: 8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                off_q <= '0;
    else if (fire && buf_last) off_q <= '0;
    else if (fire)             off_q <= off_q + 1'b1;
  end

endmodule
