// tb_pkt_parser: feeds well-formed SCION and EPIC packets and packets with one defect
// each (version, path type, empty first segment, segment gap, CurrHF out of range,
// CurrINF not matching CurrHF, more than 64 hop fields, wrong HdrLen, truncated header)
// through the parser with random idle cycles, and checks every extracted field, the
// error flag, one header vector per packet, and that a good packet's vector appears
// one cycle after its last header byte.
module tb_pkt_parser;
  import scion_pkg::*;
  import pkt_gen_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_fire, in_last;
  logic [7:0] in_data;
  logic [PORT_W-1:0] in_port;
  logic phv_valid;
  phv_t phv;

  int checks = 0, failures = 0, cycle = 0;
  int n_good = 0, n_bad = 0;

  pkt_t  exp_p[$];
  bit    exp_err[$];
  int    exp_port[$];
  int    exp_t[$];
  int    hdr_end_cycle;

  pkt_parser dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n && phv_valid) begin
    pkt_t p; bit e; int prt, t;
    chk(exp_p.size() > 0, "unexpected phv");
    if (exp_p.size() > 0) begin
      p = exp_p.pop_front(); e = exp_err.pop_front(); prt = exp_port.pop_front(); t = exp_t.pop_front();
      chk(phv.parse_err == e, $sformatf("parse_err %0d exp %0d", phv.parse_err, e));
      if (!e && !phv.parse_err) begin
        chk(cycle == t + 1, $sformatf("phv timing %0d vs %0d", cycle, t + 1));
        chk(phv.epic == (p.path_type == 3), "epic");
        chk(phv.in_port == PORT_W'(prt), "in_port");
        chk(phv.dst_isd == p.dst_isd && phv.dst_as == p.dst_as, "dst isd-as");
        chk(phv.src_isd == p.src_isd && phv.src_as == p.src_as, "src isd-as");
        chk(phv.dst_host == first4(p.dst_host), "dst host");
        chk(phv.src_host == first4(p.src_host), "src host");
        if (p.path_type == 3) chk(phv.ts_rel == p.ts_rel && phv.pck_id == p.pck_id, "timestamp");
        chk(phv.meta == meta_word(p), "meta");
        chk(int'(phv.meta_off) == meta_offset(p), "meta_off");
        chk(phv.inf == p.inf[p.curr_inf], "info field");
        chk(phv.hf == p.hop[p.curr_hf], "hop field");
        chk(phv.has_prev == (p.curr_hf != 0), "has_prev");
        if (p.curr_hf != 0) chk(phv.prev_hf == p.hop[p.curr_hf - 1], "prev hop field");
      end
    end
  end

  task automatic send(input pkt_t p, input bit err, input int port);
    bytes_q q;
    int hb;
    q  = build(p);
    hb = hdr_bytes(p);
    exp_p.push_back(p); exp_err.push_back(err); exp_port.push_back(port);
    for (int i = 0; i < q.size(); i++) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) begin in_fire = 0; @(negedge clk); end
      in_fire = 1; in_data = q[i]; in_last = (i == q.size() - 1); in_port = PORT_W'(port);
      if (i == hb - 1) exp_t.push_back(cycle + 1);
    end
    if (q.size() < hb) exp_t.push_back(0);
    @(negedge clk); in_fire = 0; in_last = 0;
  endtask

  initial begin
    logic [127:0] key;
    pkt_t p;
    key = 128'h0123456789abcdef_fedcba9876543210;
    in_fire = 0; in_last = 0; in_data = 0; in_port = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 120; n++) begin
      p = random_pkt(key, n % 2 == 0, 64);
      if (n % 10 == 0) begin p.seg[0] = 6'd22; p.seg[1] = 6'd21; p.seg[2] = 6'd21; p.curr_inf = 2; p.curr_hf = 63; end
      send(p, 0, n % 128);
      n_good++;
    end
    for (int n = 0; n < 90; n++) begin
      p = random_pkt(key, n % 2 == 1, 30);
      case (n % 9)
        0: p.version = 4'd1;
        1: p.path_type = 8'd2;
        2: begin p.seg[0] = 0; p.seg[1] = 3; p.seg[2] = 0; p.curr_inf = 0; p.curr_hf = 0; end
        3: begin p.seg[0] = 2; p.seg[1] = 0; p.seg[2] = 3; p.curr_inf = 0; p.curr_hf = 0; end
        4: begin p.seg[0] = 2; p.seg[1] = 0; p.seg[2] = 0; p.curr_inf = 0; p.curr_hf = 2; end
        5: begin p.seg[0] = 2; p.seg[1] = 2; p.seg[2] = 0; p.curr_inf = 0; p.curr_hf = 3; end
        6: begin p.seg[0] = 30; p.seg[1] = 30; p.seg[2] = 30; p.curr_inf = 0; p.curr_hf = 0; end
        7: p.hdr_len_adj = 1;
        8: p.truncate_at = hdr_bytes(p) - 1 - $urandom_range(0, 20);
        default: ;
      endcase
      send(p, 1, 3);
      n_bad++;
    end
    repeat (5) @(posedge clk);
    chk(exp_p.size() == 0, "missing header vectors");
    $display("good packets %0d, malformed packets %0d", n_good, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
