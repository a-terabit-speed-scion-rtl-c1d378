// scion_pkg: types and constants shared by the SCION/EPIC border-router data plane.
//
// The header layouts follow the SCION header format (common header, address header,
// path meta header, 8-byte info fields, 12-byte hop fields with a 6-byte MAC) and the
// EPIC path type, which puts a packet timestamp in front of the SCION path. Structs are
// packed in wire order (first byte on the wire in the most significant bits), so a
// parser can fill them by shifting bytes in from the right.
//
// Sizes that the design takes from its specification: 6-byte hop-field MACs, a 128-bit
// cipher block, at most 3 info fields and at most 64 hop fields per path. Port width,
// CPU port number and the verdict encoding are this design's own choices.
package scion_pkg;

  // ---- sizes ----
  localparam int unsigned BLOCK_W  = 128;  // SEM block size (n = 128)
  localparam int unsigned MAC_W    = 48;   // 6-byte hop-field MAC
  localparam int unsigned PORT_W   = 8;    // 128 front-panel ports plus a CPU port
  localparam int unsigned OFF_W    = 16;   // byte offset inside a packet
  localparam int unsigned MAX_INF  = 3;    // info fields per path
  localparam int unsigned MAX_HF   = 64;   // hop fields per path

  localparam logic [PORT_W-1:0] CPU_PORT = PORT_W'(128);

  // ---- path types carried in the common header ----
  localparam logic [7:0] PT_SCION = 8'd1;  // plain SCION path: EPIC L0 style MAC
  localparam logic [7:0] PT_EPIC  = 8'd3;  // EPIC path with packet timestamp: L1 MAC

  // ---- fixed header lengths in bytes ----
  localparam int unsigned COMMON_LEN = 12;
  localparam int unsigned ADDR_LEN   = 16;  // ISD-AS of destination and source
  localparam int unsigned EPIC_LEN   = 16;  // TsRel, PckId, PHVF, LHVF
  localparam int unsigned META_LEN   = 4;
  localparam int unsigned INFO_LEN   = 8;
  localparam int unsigned HOP_LEN    = 12;

  typedef struct packed {
    logic [1:0] curr_inf;
    logic [5:0] curr_hf;
    logic [5:0] rsv;
    logic [5:0] seg0_len;
    logic [5:0] seg1_len;
    logic [5:0] seg2_len;
  } path_meta_t;  // 32 bits

  typedef struct packed {
    logic [7:0]  flags;      // bit 0: construction direction (C), bit 1: peering (P)
    logic [7:0]  rsv;
    logic [15:0] seg_id;
    logic [31:0] timestamp;
  } info_field_t;  // 64 bits

  typedef struct packed {
    logic [7:0]       flags;
    logic [7:0]       exp_time;
    logic [15:0]      cons_ingress;
    logic [15:0]      cons_egress;
    logic [MAC_W-1:0] mac;
  } hop_field_t;  // 96 bits

  // Parsed header vector handed from the parser to the ingress pipeline.
  typedef struct packed {
    logic              parse_err;
    logic              epic;        // path type EPIC: verify with the L1 block
    logic [PORT_W-1:0] in_port;
    logic [15:0]       dst_isd;
    logic [47:0]       dst_as;
    logic [15:0]       src_isd;
    logic [47:0]       src_as;
    logic [31:0]       dst_host;    // first 4 bytes of the destination host address
    logic [31:0]       src_host;    // first 4 bytes of the source host address
    logic [31:0]       ts_rel;      // EPIC packet timestamp, relative part
    logic [31:0]       pck_id;      // EPIC packet timestamp, packet identifier
    path_meta_t        meta;
    logic [OFF_W-1:0]  meta_off;    // byte offset of the path meta header
    info_field_t       inf;         // info field selected by CurrINF
    hop_field_t        hf;          // hop field selected by CurrHF
    hop_field_t        prev_hf;     // hop field CurrHF-1
    logic              has_prev;    // CurrHF > 0
  } phv_t;

  typedef enum logic [2:0] {
    V_FORWARD  = 3'd0,  // valid, sent to the next AS
    V_LOCAL    = 3'd1,  // valid, delivered inside this AS
    V_PARSE    = 3'd2,  // malformed header: to CPU
    V_IFACE    = 3'd3,  // arrived on a port other than its ingress interface: to CPU
    V_MAC      = 3'd4,  // hop-field MAC mismatch: to CPU
    V_NOROUTE  = 3'd5   // no table entry for the egress interface or host: to CPU
  } verdict_e;

  // Forwarding decision handed from the ingress pipeline to the deparser.
  typedef struct packed {
    verdict_e          verdict;
    logic [PORT_W-1:0] port;
    logic              rewrite;   // replace the path meta header
    path_meta_t        new_meta;
    logic [OFF_W-1:0]  meta_off;
  } decision_t;

  // Number of info fields implied by the segment lengths.
  function automatic logic [1:0] num_inf(input path_meta_t m);
    if (m.seg2_len != 0) return 2'd3;
    if (m.seg1_len != 0) return 2'd2;
    if (m.seg0_len != 0) return 2'd1;
    return 2'd0;
  endfunction

  // Total number of hop fields (7 bits: three 6-bit lengths may exceed 64).
  function automatic logic [7:0] num_hf(input path_meta_t m);
    return 8'(m.seg0_len) + 8'(m.seg1_len) + 8'(m.seg2_len);
  endfunction

  // Index one past the last hop field of segment s.
  function automatic logic [7:0] seg_end(input path_meta_t m, input logic [1:0] s);
    logic [7:0] e;
    e = 8'(m.seg0_len);
    if (s >= 2'd1) e = e + 8'(m.seg1_len);
    if (s >= 2'd2) e = e + 8'(m.seg2_len);
    return e;
  endfunction

endpackage
