// ingress_pipe: match/action ingress pipeline of the router, one header vector per cycle.
//
// It carries out the per-packet checks and the forwarding decision in eight registered
// stages, so a decision leaves exactly PIPE_LAT = 8 cycles after its header vector
// entered, and a new header vector can enter every cycle:
//   stage 0  ingress interface check: the interface the packet claims to arrive on
//            (ConsIngress when travelling in construction direction, ConsEgress
//            otherwise) must map, in the interface table, to the port the packet came in
//            on; interface 0 means the packet comes from inside this AS and is not
//            checked. The 128-bit MAC input block is assembled here.
//   stages 1-5  Simplified Even-Mansour MAC of the block under the AS key (sem_mac).
//   stage 6  MAC check: the top 48 bits of the cipher output must equal the 6-byte MAC
//            of the current hop field. Route lookup: destination ISD-AS equal to this
//            AS -> host table on the destination host; otherwise the egress interface
//            -> interface table.
//   stage 7  verdict, output port (the CPU port for every rejected packet) and, for a
//            packet that leaves towards another AS, the advanced path meta header.
//
// MAC input block (128 bits, most significant first). prev = MAC of hop field CurrHF-1,
// or 0 for the first hop field:
//   SCION path (L0):  InfoTimestamp(32) ExpTime(8) ConsIngress(16) ConsEgress(16) prev(48) 0(8)
//   EPIC path  (L1):  TsRel(32) SrcHost(32) ConsIngress(16) ConsEgress(16) prev[47:16](32)
// The L1 block carries the packet timestamp and the source host, which makes each
// MAC valid for one packet only. The field layout of both blocks is this design's choice.
//
// The interface and host tables are lookup_table instances written through the wr
// ports by the control plane. cfg_isd/cfg_as identify this AS and cfg_key is its
// 128-bit SEM key; all three are quasi-static configuration.
module ingress_pipe
  import scion_pkg::*;
#(
  parameter int unsigned IFT_IDX_W  = 8,   // interface table: 256 entries
  parameter int unsigned HOST_IDX_W = 10   // host table: 1024 entries
) (
  input  logic              clk,
  input  logic              rst_n,
  // header vectors from the parser
  input  logic              phv_valid,
  input  phv_t              phv,
  // configuration
  input  logic [15:0]       cfg_isd,
  input  logic [47:0]       cfg_as,
  input  logic [127:0]      cfg_key,
  // interface table writes: interface ID -> port
  input  logic              ift_wr_en,
  input  logic              ift_wr_set,
  input  logic [15:0]       ift_wr_ifid,
  input  logic [PORT_W-1:0] ift_wr_port,
  // host table writes: destination host (first 4 address bytes) -> port
  input  logic              host_wr_en,
  input  logic              host_wr_set,
  input  logic [31:0]       host_wr_addr,
  input  logic [PORT_W-1:0] host_wr_port,
  // decisions to the deparser
  output logic              dec_valid,
  output decision_t         dec
);

  localparam int unsigned PIPE_LAT = 8;
  localparam int unsigned SEM_LAT  = 5;

  typedef struct packed {
    phv_t        phv;
    logic        iface_ok;
    logic        local_dst;
    logic [15:0] eg_ifid;
  } ctx_t;

  // ---------------- stage 0 ----------------
  logic [15:0]       in_ifid0, eg_ifid0;
  logic              cons_dir0;
  logic [47:0]       prev_mac0;
  logic [127:0]      block0;
  logic [15:0]       ift_key  [2];
  logic              ift_hit  [2];
  logic [PORT_W-1:0] ift_port [2];
  logic [31:0]       host_key  [1];
  logic              host_hit  [1];
  logic [PORT_W-1:0] host_port [1];

  assign cons_dir0 = phv.inf.flags[0];
  assign in_ifid0  = cons_dir0 ? phv.hf.cons_ingress : phv.hf.cons_egress;
  assign eg_ifid0  = cons_dir0 ? phv.hf.cons_egress  : phv.hf.cons_ingress;
  assign prev_mac0 = phv.has_prev ? phv.prev_hf.mac : 48'h0;
  assign block0    = phv.epic
                   ? {phv.ts_rel, phv.src_host, phv.hf.cons_ingress, phv.hf.cons_egress, prev_mac0[47:16]}
                   : {phv.inf.timestamp, phv.hf.exp_time, phv.hf.cons_ingress, phv.hf.cons_egress,
                      prev_mac0, 8'h00};
  assign ift_key[0] = in_ifid0;

  lookup_table #(.KEY_W(16), .IDX_W(IFT_IDX_W), .DATA_W(PORT_W), .NRD(2)) u_ift (
    .clk, .rst_n,
    .wr_en(ift_wr_en), .wr_set(ift_wr_set), .wr_key(ift_wr_ifid), .wr_data(ift_wr_port),
    .rd_key(ift_key), .rd_hit(ift_hit), .rd_data(ift_port)
  );

  lookup_table #(.KEY_W(32), .IDX_W(HOST_IDX_W), .DATA_W(PORT_W), .NRD(1)) u_host (
    .clk, .rst_n,
    .wr_en(host_wr_en), .wr_set(host_wr_set), .wr_key(host_wr_addr), .wr_data(host_wr_port),
    .rd_key(host_key), .rd_hit(host_hit), .rd_data(host_port)
  );

  ctx_t   ctx0;
  logic   v1;
  logic   [127:0] block1, key1;
  ctx_t   c1;

  always_comb begin
    ctx0           = '0;
    ctx0.phv       = phv;
    ctx0.iface_ok  = (in_ifid0 == 16'd0) || (ift_hit[0] && ift_port[0] == phv.in_port);
    ctx0.local_dst = (phv.dst_isd == cfg_isd) && (phv.dst_as == cfg_as);
    ctx0.eg_ifid   = eg_ifid0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= phv_valid;
  end
  always_ff @(posedge clk) begin
    c1     <= ctx0;
    block1 <= block0;
    key1   <= cfg_key;
  end

  // ---------------- stages 1-5: SEM MAC ----------------
  logic         mac_valid;
  logic [127:0] mac_full;
  ctx_t         cdly [SEM_LAT];

  sem_mac u_mac (
    .clk, .rst_n,
    .in_valid(v1), .in_block(block1), .in_key(key1),
    .out_valid(mac_valid), .out_mac(mac_full)
  );

  always_ff @(posedge clk) begin
    cdly[0] <= c1;
    for (int i = 1; i < SEM_LAT; i++) cdly[i] <= cdly[i-1];
  end

  // ---------------- stage 6: MAC check and route lookup ----------------
  ctx_t              c5;
  logic              v6, mac_ok6, route_hit6;
  logic [PORT_W-1:0] route_port6;
  ctx_t              c6;

  assign c5          = cdly[SEM_LAT-1];
  assign ift_key[1]  = c5.eg_ifid;
  assign host_key[0] = c5.phv.dst_host;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v6 <= 1'b0;
    else        v6 <= mac_valid;
  end
  always_ff @(posedge clk) begin
    c6      <= c5;
    mac_ok6 <= (mac_full[127 -: MAC_W] == c5.phv.hf.mac);
    if (c5.local_dst) begin
      route_hit6  <= host_hit[0];
      route_port6 <= host_port[0];
    end else begin
      route_hit6  <= ift_hit[1] && (c5.eg_ifid != 16'd0);
      route_port6 <= ift_port[1];
    end
  end

  // ---------------- stage 7: verdict and header fix ----------------
  path_meta_t fixed_meta;
  verdict_e   verdict6;

  hdr_fixer u_fix (.meta_in(c6.phv.meta), .meta_out(fixed_meta));

  always_comb begin
    if (c6.phv.parse_err)  verdict6 = V_PARSE;
    else if (!c6.iface_ok) verdict6 = V_IFACE;
    else if (!mac_ok6)     verdict6 = V_MAC;
    else if (!route_hit6)  verdict6 = V_NOROUTE;
    else if (c6.local_dst) verdict6 = V_LOCAL;
    else                   verdict6 = V_FORWARD;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dec_valid <= 1'b0;
    else        dec_valid <= v6;
  end
  always_ff @(posedge clk) begin
    dec.verdict  <= verdict6;
    dec.port     <= (verdict6 == V_FORWARD || verdict6 == V_LOCAL) ? route_port6 : CPU_PORT;
    dec.rewrite  <= (verdict6 == V_FORWARD);
    dec.new_meta <= fixed_meta;
    dec.meta_off <= c6.phv.meta_off;
  end

  initial assert (PIPE_LAT == 1 + SEM_LAT + 2);

endmodule
