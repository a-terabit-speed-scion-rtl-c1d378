// tb_ingress_pipe: sends header vectors back to back (one per cycle, with occasional
// gaps) into the ingress pipeline and checks each decision against a model: forward,
// local delivery, interface mismatch, MAC mismatch, missing route, parse error; the
// output port, the rewritten path meta header, and that every decision leaves exactly 8
// cycles after its header vector. Table entries are written, then one is deleted.
module tb_ingress_pipe;
  import scion_pkg::*;
  import pkt_gen_pkg::*;

  logic clk = 0, rst_n = 0;
  logic phv_valid;
  phv_t phv;
  logic [15:0] cfg_isd;
  logic [47:0] cfg_as;
  logic [127:0] cfg_key;
  logic ift_wr_en, ift_wr_set, host_wr_en, host_wr_set;
  logic [15:0] ift_wr_ifid;
  logic [31:0] host_wr_addr;
  logic [PORT_W-1:0] ift_wr_port, host_wr_port;
  logic dec_valid;
  decision_t dec;

  int checks = 0, failures = 0, cycle = 0;
  int seen[6];

  decision_t exp_q[$];
  int        t_q[$];
  int        if_port[int];     // model of the interface table
  int        host_port[int];   // model of the host table (key: first 4 bytes)

  ingress_pipe dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n && dec_valid) begin
    decision_t e; int t;
    chk(exp_q.size() > 0, "unexpected decision");
    if (exp_q.size() > 0) begin
      e = exp_q.pop_front(); t = t_q.pop_front();
      seen[int'(dec.verdict)]++;
      chk(dec.verdict == e.verdict, $sformatf("verdict %s exp %s", dec.verdict.name(), e.verdict.name()));
      chk(dec.port == e.port, $sformatf("port %0d exp %0d", dec.port, e.port));
      chk(dec.rewrite == e.rewrite, "rewrite");
      if (e.rewrite) chk(dec.new_meta == e.new_meta, "new meta");
      chk(dec.meta_off == e.meta_off, "meta_off");
      chk(cycle - t == 8, $sformatf("latency %0d", cycle - t));
    end
  end

  function automatic phv_t to_phv(input pkt_t p, input int port);
    phv_t f;
    f = '0;
    f.epic = (p.path_type == 3);
    f.in_port = PORT_W'(port);
    f.dst_isd = p.dst_isd; f.dst_as = p.dst_as; f.src_isd = p.src_isd; f.src_as = p.src_as;
    f.dst_host = first4(p.dst_host); f.src_host = first4(p.src_host);
    f.ts_rel = p.ts_rel; f.pck_id = p.pck_id;
    f.meta = meta_word(p);
    f.meta_off = OFF_W'(meta_offset(p));
    f.inf = p.inf[p.curr_inf];
    f.hf = p.hop[p.curr_hf];
    f.has_prev = (p.curr_hf != 0);
    if (p.curr_hf != 0) f.prev_hf = p.hop[p.curr_hf - 1];
    return f;
  endfunction

  task automatic wr_if(input int ifid, input int port, input bit set);
    @(negedge clk);
    ift_wr_en = 1; ift_wr_set = set; ift_wr_ifid = 16'(ifid); ift_wr_port = PORT_W'(port);
    @(negedge clk); ift_wr_en = 0;
    if (set) if_port[ifid] = port; else if_port.delete(ifid);
  endtask

  task automatic wr_host(input logic [31:0] a, input int port);
    @(negedge clk);
    phv_valid = 0;
    host_wr_en = 1; host_wr_set = 1; host_wr_addr = a; host_wr_port = PORT_W'(port);
    @(negedge clk); host_wr_en = 0;
    host_port[int'(a)] = port;
  endtask

  initial begin
    pkt_t p;
    int kind, port, in_if, eg_if;
    bit cdir, local_dst;
    decision_t e;
    phv_valid = 0; phv = '0;
    cfg_isd = 16'h0011; cfg_as = 48'h0000_ffaa_0001;
    cfg_key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    ift_wr_en = 0; host_wr_en = 0; ift_wr_set = 0; host_wr_set = 0;
    ift_wr_ifid = 0; ift_wr_port = 0; host_wr_addr = 0; host_wr_port = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // interfaces 1..200 sit behind port (ifid * 3) mod 128; 150..200 left out
    for (int i = 1; i < 150; i++) wr_if(i, (i * 3) % 128, 1);
    wr_if(7, 0, 0);   // delete one entry
    for (int n = 0; n < 400; n++) begin
      p = random_pkt(cfg_key, n % 3 != 0, 30);
      kind = n % 6;
      local_dst = (kind == 4);
      if (local_dst) begin
        p.dst_isd = cfg_isd; p.dst_as = cfg_as;
        if (n % 12 == 4) wr_host(first4(p.dst_host), 100 + n % 20);
      end
      cdir = p.inf[p.curr_inf][56];
      in_if = cdir ? int'(p.hop[p.curr_hf][79:64]) : int'(p.hop[p.curr_hf][63:48]);
      eg_if = cdir ? int'(p.hop[p.curr_hf][63:48]) : int'(p.hop[p.curr_hf][79:64]);
      port = if_port.exists(in_if) ? if_port[in_if] : 5;
      if (kind == 1) port = (port + 1) % 128;                 // wrong arrival port
      if (kind == 2) p.hop[p.curr_hf][0] = ~p.hop[p.curr_hf][0]; // corrupted MAC
      if (kind == 3) begin p.ts_rel ^= 32'h1; if (p.path_type == 1) p.inf[p.curr_inf][0] ^= 1'b1; end
      // model
      e = '0;
      e.meta_off = OFF_W'(meta_offset(p));
      if (kind == 5) e.verdict = V_PARSE;
      else if (in_if != 0 && !(if_port.exists(in_if) && if_port[in_if] == port)) e.verdict = V_IFACE;
      else if (p.hop[p.curr_hf][47:0] != ref_mac(p, cfg_key)) e.verdict = V_MAC;
      else if (local_dst ? !host_port.exists(int'(first4(p.dst_host)))
                         : !(eg_if != 0 && if_port.exists(eg_if))) e.verdict = V_NOROUTE;
      else if (local_dst) e.verdict = V_LOCAL;
      else e.verdict = V_FORWARD;
      if (e.verdict == V_FORWARD) e.port = PORT_W'(if_port[eg_if]);
      else if (e.verdict == V_LOCAL) e.port = PORT_W'(host_port[int'(first4(p.dst_host))]);
      else e.port = CPU_PORT;
      e.rewrite = (e.verdict == V_FORWARD);
      e.new_meta = next_meta(p);
      @(negedge clk);
      if (n % 17 == 16) begin phv_valid = 0; @(negedge clk); end
      phv_valid = 1;
      phv = to_phv(p, port);
      if (kind == 5) phv.parse_err = 1;
      exp_q.push_back(e); t_q.push_back(cycle + 1);
    end
    @(negedge clk) phv_valid = 0;
    repeat (12) @(posedge clk);
    chk(exp_q.size() == 0, "missing decisions");
    for (int v = 0; v < 6; v++) begin
      $display("verdict %0d seen %0d times", v, seen[v]);
      chk(seen[v] > 0, $sformatf("verdict %0d never produced", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
