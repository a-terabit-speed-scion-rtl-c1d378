// tb_scion_router: end-to-end test of the router at its default sizes.
//
// Configures this AS, its key, the interface table and the host table, then sends a
// mix of SCION (L0 MAC) and EPIC (L1 MAC) packets through the byte-stream input and
// checks every packet that comes out: its bytes (with the path meta header advanced
// for packets forwarded to another AS), its port and its verdict. The traffic makes
// every mechanism happen and counts it: forwarding with a header rewrite, a move to
// the next info field at a segment end, local delivery, and the four ways to the CPU
// (parse error, interface mismatch, MAC mismatch, no route); input back-pressure from a
// full packet buffer and from a full decision queue, while the output is held; and a
// phase with the output always ready in which the router must keep up with one byte
// per cycle (the input may stall for at most 40 cycles in that phase).
module tb_scion_router;
  import scion_pkg::*;
  import pkt_gen_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_last;
  logic [7:0] in_data;
  logic [PORT_W-1:0] in_port;
  logic out_valid, out_ready, out_last;
  logic [7:0] out_data;
  logic [PORT_W-1:0] out_port;
  verdict_e out_verdict;
  logic [15:0] cfg_isd;
  logic [47:0] cfg_as;
  logic [127:0] cfg_key;
  logic ift_wr_en, ift_wr_set, host_wr_en, host_wr_set;
  logic [15:0] ift_wr_ifid;
  logic [31:0] host_wr_addr;
  logic [PORT_W-1:0] ift_wr_port, host_wr_port;

  scion_router dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int seen[6];
  int n_cross = 0, n_epic = 0, n_scion = 0;
  int stall_buf = 0, stall_dec = 0, out_stall = 0;
  int line_stalls = 0;
  bit line_phase = 0;

  typedef struct {
    bytes_q    data;
    verdict_e  verdict;
    int        port;
  } exp_t;
  exp_t exp_q[$];
  bytes_q cur;       // bytes of the packet now leaving
  int if_port[int];
  int host_port[int];
  int pkts_out = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // input-side stall accounting
  always @(posedge clk) if (rst_n && in_valid && !in_ready) begin
    if (dut.buf_full) stall_buf++; else stall_dec++;
    if (line_phase) line_stalls++;
  end
  always @(posedge clk) if (rst_n && out_valid && !out_ready) out_stall++;

  // output checker
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    cur.push_back(out_data);
    if (out_last) begin
      exp_t e;
      chk(exp_q.size() > 0, "unexpected packet");
      if (exp_q.size() > 0) begin
        e = exp_q.pop_front();
        seen[int'(out_verdict)]++;
        chk(out_verdict == e.verdict, $sformatf("pkt %0d verdict %s exp %s", pkts_out, out_verdict.name(), e.verdict.name()));
        chk(int'(out_port) == e.port, $sformatf("pkt %0d port %0d exp %0d", pkts_out, out_port, e.port));
        chk(cur == e.data, $sformatf("pkt %0d bytes differ (len %0d exp %0d)", pkts_out, cur.size(), e.data.size()));
      end
      cur.delete();
      pkts_out++;
    end
  end

  task automatic wr_if(input int ifid, input int port);
    @(negedge clk);
    ift_wr_en = 1; ift_wr_set = 1; ift_wr_ifid = 16'(ifid); ift_wr_port = PORT_W'(port);
    @(negedge clk); ift_wr_en = 0;
    if_port[ifid] = port;
  endtask

  task automatic wr_host(input logic [31:0] a, input int port);
    @(negedge clk);
    host_wr_en = 1; host_wr_set = 1; host_wr_addr = a; host_wr_port = PORT_W'(port);
    @(negedge clk); host_wr_en = 0;
    host_port[int'(a)] = port;
  endtask

  // Drive one packet; kind picks the case. Returns after its last byte is accepted.
  task automatic send(input int kind, input bit epic);
    pkt_t p;
    bytes_q q, o;
    exp_t e;
    int port, in_if, eg_if;
    bit cdir, local_dst;
    logic [31:0] nm;
    p = random_pkt(cfg_key, epic, 24);
    if (kind == 6) begin   // forwarded at the end of a segment
      p.seg[0] = 3; p.seg[1] = 2; p.seg[2] = 0; p.curr_inf = 0; p.curr_hf = 2;
      p.hop[2][47:0] = ref_mac(p, cfg_key);
    end
    local_dst = (kind == 4);
    if (local_dst) begin
      p.dst_isd = cfg_isd; p.dst_as = cfg_as;
      host_port[int'(first4(p.dst_host))] = -1;
    end
    cdir = p.inf[p.curr_inf][56];
    in_if = cdir ? int'(p.hop[p.curr_hf][79:64]) : int'(p.hop[p.curr_hf][63:48]);
    eg_if = cdir ? int'(p.hop[p.curr_hf][63:48]) : int'(p.hop[p.curr_hf][79:64]);
    port = if_port.exists(in_if) ? if_port[in_if] : 9;
    if (kind == 1) port = (port + 1) % 128;
    if (kind == 2) p.hop[p.curr_hf][5] = ~p.hop[p.curr_hf][5];
    if (kind == 3) p.hdr_len_adj = -1;
    if (kind == 7) p.truncate_at = 3;
    if (kind == 8) p.payload_len = 700;   // long packet, otherwise a normal forward
    q = build(p);
    // model
    if (kind == 3 || kind == 7) e.verdict = V_PARSE;
    else if (in_if != 0 && !(if_port.exists(in_if) && if_port[in_if] == port)) e.verdict = V_IFACE;
    else if (p.hop[p.curr_hf][47:0] != ref_mac(p, cfg_key)) e.verdict = V_MAC;
    else if (local_dst) e.verdict = V_LOCAL;   // host entry written below
    else if (!(eg_if != 0 && if_port.exists(eg_if))) e.verdict = V_NOROUTE;
    else e.verdict = V_FORWARD;
    if (local_dst && e.verdict == V_LOCAL) wr_host(first4(p.dst_host), 64 + $urandom_range(0, 40));
    e.port = (e.verdict == V_FORWARD) ? if_port[eg_if]
           : (e.verdict == V_LOCAL)   ? host_port[int'(first4(p.dst_host))] : int'(CPU_PORT);
    o = q;
    if (e.verdict == V_FORWARD) begin
      nm = next_meta(p);
      if (nm[31:30] != p.curr_inf) n_cross++;
      for (int i = 0; i < 4; i++) o[meta_offset(p) + i] = nm[31 - 8*i -: 8];
    end
    e.data = o;
    exp_q.push_back(e);
    if (epic) n_epic++; else n_scion++;
    for (int i = 0; i < q.size(); i++) begin
      @(negedge clk);
      in_valid = 1; in_data = q[i]; in_last = (i == q.size() - 1); in_port = PORT_W'(port);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0; in_last = 0;
  endtask

  initial begin
    int t0, bytes_sent;
    in_valid = 0; in_last = 0; in_data = 0; in_port = 0; out_ready = 1;
    cfg_isd = 16'h0042; cfg_as = 48'h0000_ffaa_0107;
    cfg_key = 128'h000102030405060708090a0b0c0d0e0f;
    ift_wr_en = 0; ift_wr_set = 0; ift_wr_ifid = 0; ift_wr_port = 0;
    host_wr_en = 0; host_wr_set = 0; host_wr_addr = 0; host_wr_port = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 1; i <= 160; i++) wr_if(i, (i * 5) % 128);   // 161..201 have no entry

    // phase 1: every case, output randomly stalled
    fork
      begin
        for (int n = 0; n < 160; n++) send(n % 8 == 5 ? 0 : n % 8, n % 2 == 0);
      end
      begin
        repeat (30000) begin @(negedge clk) out_ready = $urandom_range(0, 3) != 0; end
        out_ready = 1;
      end
    join_any
    wait (exp_q.size() == 0);
    @(negedge clk) out_ready = 1;

    // phase 2: output held while a long burst arrives: the packet buffer fills
    out_ready = 0;
    fork
      for (int n = 0; n < 12; n++) send(8, n % 2 == 1);
      begin repeat (8000) @(negedge clk); out_ready = 1; end
    join
    wait (exp_q.size() == 0);

    // phase 3: output held while tiny packets arrive: the decision queue fills
    @(negedge clk) out_ready = 0;
    fork
      for (int n = 0; n < 40; n++) send(7, 0);
      begin repeat (600) @(negedge clk); out_ready = 1; end
    join
    wait (exp_q.size() == 0);

    // phase 4: output always ready, measure throughput over back-to-back packets
    repeat (20) @(negedge clk);
    t0 = cycle; bytes_sent = 0;
    line_phase = 1;
    for (int n = 0; n < 60; n++) send(0, n % 2 == 0);
    line_phase = 0;
    wait (exp_q.size() == 0);
    $display("line-rate phase: %0d cycles, input stalls %0d", cycle - t0, line_stalls);
    chk(line_stalls <= 40, "input stalled while the output was always ready");

    repeat (20) @(posedge clk);
    $display("packets: SCION %0d EPIC %0d out %0d", n_scion, n_epic, pkts_out);
    $display("forward %0d local %0d parse %0d iface %0d mac %0d noroute %0d",
             seen[0], seen[1], seen[2], seen[3], seen[4], seen[5]);
    $display("segment crossings %0d, stalls: buffer full %0d, decision queue %0d, output %0d",
             n_cross, stall_buf, stall_dec, out_stall);
    for (int v = 0; v < 6; v++) chk(seen[v] > 0, $sformatf("verdict %0d never happened", v));
    chk(n_cross > 0, "no segment crossing");
    chk(stall_buf > 0, "packet buffer never filled");
    chk(stall_dec > 0, "decision queue never filled");
    chk(out_stall > 0, "output never stalled");
    chk(n_epic > 0 && n_scion > 0, "both path types");
    chk(exp_q.size() == 0, "packets missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
