// pkt_gen_pkg: builds SCION/EPIC packets as byte queues for the testbenches and works
// out, independently of the RTL, the MAC a hop field must carry and the path meta header
// the next hop must see.
package pkt_gen_pkg;
  import sem_ref_pkg::*;

  typedef logic [7:0] bytes_q[$];

  typedef struct {
    logic [3:0]  version;
    logic [7:0]  path_type;     // 1 SCION, 3 EPIC
    logic [1:0]  dl, sl;
    int          hdr_len_adj;   // added to the correct HdrLen field (0 = correct)
    logic [15:0] dst_isd, src_isd;
    logic [47:0] dst_as, src_as;
    logic [7:0]  dst_host[16];
    logic [7:0]  src_host[16];
    logic [31:0] ts_rel, pck_id;
    logic [1:0]  curr_inf;
    logic [5:0]  curr_hf;
    logic [5:0]  seg[3];
    logic [63:0] inf[3];
    logic [95:0] hop[64];
    int          payload_len;
    int          truncate_at;   // keep only this many bytes (-1: whole packet)
  } pkt_t;

  function automatic int n_inf(input pkt_t p);
    return (p.seg[0] != 0) + (p.seg[1] != 0) + (p.seg[2] != 0);
  endfunction

  function automatic int n_hf(input pkt_t p);
    return int'(p.seg[0]) + int'(p.seg[1]) + int'(p.seg[2]);
  endfunction

  function automatic int hdr_bytes(input pkt_t p);
    return 12 + 16 + 4*(int'(p.dl)+1) + 4*(int'(p.sl)+1) + (p.path_type == 3 ? 16 : 0)
           + 4 + 8*n_inf(p) + 12*n_hf(p);
  endfunction

  function automatic int meta_offset(input pkt_t p);
    return 12 + 16 + 4*(int'(p.dl)+1) + 4*(int'(p.sl)+1) + (p.path_type == 3 ? 16 : 0);
  endfunction

  function automatic logic [31:0] meta_word(input pkt_t p);
    return {p.curr_inf, p.curr_hf, 6'd0, p.seg[0], p.seg[1], p.seg[2]};
  endfunction

  function automatic logic [31:0] first4(input logic [7:0] a[16]);
    return {a[0], a[1], a[2], a[3]};
  endfunction

  // MAC input block of the current hop, as the router must form it.
  function automatic logic [127:0] mac_block(input pkt_t p);
    logic [47:0] prev;
    logic [95:0] h;
    h    = p.hop[p.curr_hf];
    prev = (p.curr_hf != 0) ? p.hop[p.curr_hf - 1][47:0] : 48'd0;
    if (p.path_type == 3)
      return {p.ts_rel, first4(p.src_host), h[79:64], h[63:48], prev[47:16]};
    else
      return {p.inf[p.curr_inf][31:0], h[87:80], h[79:64], h[63:48], prev, 8'h00};
  endfunction

  function automatic logic [47:0] ref_mac(input pkt_t p, input logic [127:0] key);
    logic [127:0] c;
    c = ref_sem(mac_block(p), key);
    return c[127:80];
  endfunction

  // Path meta header after this hop: next hop field, next info field at a segment end.
  function automatic logic [31:0] next_meta(input pkt_t p);
    int hf, inf, bound;
    hf  = int'(p.curr_hf) + 1;
    inf = int'(p.curr_inf);
    bound = 0;
    for (int s = 0; s <= inf; s++) bound += int'(p.seg[s]);
    if (hf == bound && inf < 3) inf++;
    return {2'(inf), 6'(hf), 6'd0, p.seg[0], p.seg[1], p.seg[2]};
  endfunction

  function automatic bytes_q build(input pkt_t p);
    bytes_q q;
    int hl;
    hl = hdr_bytes(p) / 4 + p.hdr_len_adj;
    q.push_back({p.version, 4'h0});
    q.push_back(8'h00); q.push_back(8'h00); q.push_back(8'h01);
    q.push_back(8'd17);
    q.push_back(8'(hl));
    q.push_back(8'(p.payload_len >> 8)); q.push_back(8'(p.payload_len));
    q.push_back(p.path_type);
    q.push_back({2'b00, p.dl, 2'b00, p.sl});
    q.push_back(8'h00); q.push_back(8'h00);
    for (int i = 0; i < 2; i++) q.push_back(p.dst_isd[15 - 8*i -: 8]);
    for (int i = 0; i < 6; i++) q.push_back(p.dst_as[47 - 8*i -: 8]);
    for (int i = 0; i < 2; i++) q.push_back(p.src_isd[15 - 8*i -: 8]);
    for (int i = 0; i < 6; i++) q.push_back(p.src_as[47 - 8*i -: 8]);
    for (int i = 0; i < 4*(int'(p.dl)+1); i++) q.push_back(p.dst_host[i]);
    for (int i = 0; i < 4*(int'(p.sl)+1); i++) q.push_back(p.src_host[i]);
    if (p.path_type == 3) begin
      for (int i = 0; i < 4; i++) q.push_back(p.ts_rel[31 - 8*i -: 8]);
      for (int i = 0; i < 4; i++) q.push_back(p.pck_id[31 - 8*i -: 8]);
      for (int i = 0; i < 8; i++) q.push_back(8'hA5);   // PHVF, LHVF
    end
    for (int i = 0; i < 4; i++) q.push_back(meta_word(p)[31 - 8*i -: 8]);
    for (int n = 0; n < n_inf(p); n++)
      for (int i = 0; i < 8; i++) q.push_back(p.inf[n][63 - 8*i -: 8]);
    for (int n = 0; n < n_hf(p); n++)
      for (int i = 0; i < 12; i++) q.push_back(p.hop[n][95 - 8*i -: 8]);
    for (int i = 0; i < p.payload_len; i++) q.push_back(8'(i * 13 + 5));
    if (p.truncate_at >= 0)
      while (q.size() > p.truncate_at) void'(q.pop_back());
    return q;
  endfunction

  function automatic logic [31:0] r32();
    return $urandom;
  endfunction

  // Random well-formed packet. The current hop field's MAC is set right for key.
  function automatic pkt_t random_pkt(input logic [127:0] key, input bit epic, input int max_hf);
    pkt_t p;
    int total, s0, s1, s2;
    p.version = 0;
    p.path_type = epic ? 8'd3 : 8'd1;
    p.dl = 2'($urandom_range(0, 3));
    p.sl = 2'($urandom_range(0, 3));
    p.hdr_len_adj = 0;
    p.dst_isd = 16'(r32()); p.src_isd = 16'(r32());
    p.dst_as = {r32(), 16'(r32())}; p.src_as = {r32(), 16'(r32())};
    for (int i = 0; i < 16; i++) begin p.dst_host[i] = 8'(r32()); p.src_host[i] = 8'(r32()); end
    p.ts_rel = r32(); p.pck_id = r32();
    s0 = $urandom_range(1, (max_hf > 3) ? max_hf / 3 : 1);
    s1 = $urandom_range(0, 1) ? $urandom_range(1, (max_hf > 3) ? max_hf / 3 : 1) : 0;
    s2 = (s1 != 0 && $urandom_range(0, 1)) ? $urandom_range(1, (max_hf > 3) ? max_hf / 3 : 1) : 0;
    p.seg[0] = 6'(s0); p.seg[1] = 6'(s1); p.seg[2] = 6'(s2);
    total = s0 + s1 + s2;
    p.curr_hf = 6'($urandom_range(0, total - 1));
    if (p.curr_hf < s0) p.curr_inf = 0;
    else if (p.curr_hf < s0 + s1) p.curr_inf = 1;
    else p.curr_inf = 2;
    for (int i = 0; i < 3; i++) p.inf[i] = {7'd0, 1'($urandom_range(0, 1)), 8'd0, 16'(r32()), r32()};
    for (int i = 0; i < 64; i++) p.hop[i] = {8'd0, 8'(r32()), 16'(r32() % 200 + 1), 16'(r32() % 200 + 1), r32(), 16'(r32())};
    p.payload_len = $urandom_range(0, 40);
    p.truncate_at = -1;
    p.hop[p.curr_hf][47:0] = ref_mac(p, key);
    return p;
  endfunction

endpackage
