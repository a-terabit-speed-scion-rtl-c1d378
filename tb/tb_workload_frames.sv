// tb_workload_frames: the router at its default sizes on the frame sizes and path
// lengths of the evaluation: 1500-byte and 115-byte frames, paths of up to 64 hop fields
// over three segments, SCION and EPIC packets, all valid and forwarded.
//
// The input is driven back to back and the output is always ready. Checked: every
// packet's bytes, port and verdict; the input never stalls (one byte per clock is
// sustained); the output carries every byte, with idle clocks only where a packet's
// header is still arriving (at most the 10-clock decision latency per packet); and a
// lone packet's first byte leaves exactly 10 clocks after its last header byte went in.
module tb_workload_frames;
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
  int in_stalls = 0, out_bytes = 0, first_out = -1, last_out = 0;
  int hdr_last_cycle = 0;
  bytes_q exp_data[$];
  int     exp_port[$];
  bytes_q cur;

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
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n && in_valid && !in_ready) in_stalls++;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (first_out < 0) first_out = cycle;
    last_out = cycle;
    out_bytes++;
    cur.push_back(out_data);
    if (out_last) begin
      chk(exp_data.size() > 0, "unexpected packet");
      if (exp_data.size() > 0) begin
        chk(cur == exp_data.pop_front(), "packet bytes");
        chk(int'(out_port) == exp_port.pop_front(), "port");
        chk(out_verdict == V_FORWARD, "verdict");
      end
      cur.delete();
    end
  end

  // A valid transit packet with the given payload and path shape; returns its bytes
  // on the wire and records the expected output.
  function automatic bytes_q make(input int payload, input int s0, input int s1, input int s2,
                                  input int hf, input bit epic, output int port,
                                  output int hdr_len);
    pkt_t p;
    bytes_q q, o;
    logic [31:0] nm;
    p = random_pkt(cfg_key, epic, 3);
    p.seg[0] = 6'(s0); p.seg[1] = 6'(s1); p.seg[2] = 6'(s2);
    p.curr_hf = 6'(hf);
    p.curr_inf = (hf < s0) ? 2'd0 : (hf < s0 + s1) ? 2'd1 : 2'd2;
    p.payload_len = payload;
    for (int i = 0; i < 64; i++) begin
      p.hop[i][79:64] = 16'(1 + (i * 7) % 100);     // ConsIngress
      p.hop[i][63:48] = 16'(1 + (i * 11 + 3) % 100); // ConsEgress
    end
    p.hop[hf][47:0] = ref_mac(p, cfg_key);
    q = build(p);
    o = q;
    nm = next_meta(p);
    for (int i = 0; i < 4; i++) o[meta_offset(p) + i] = nm[31 - 8*i -: 8];
    exp_data.push_back(o);
    exp_port.push_back(int'(p.inf[p.curr_inf][56] ? p.hop[hf][63:48] : p.hop[hf][79:64]) % 128);
    port = int'(p.inf[p.curr_inf][56] ? p.hop[hf][79:64] : p.hop[hf][63:48]) % 128;
    hdr_len = hdr_bytes(p);
    return q;
  endfunction

  initial begin
    bytes_q stream;
    int     pkt_port[$];
    int     pkt_len[$];
    int     port, hl, t0, n_pkts, total;
    in_valid = 0; in_last = 0; in_data = 0; in_port = 0; out_ready = 1;
    cfg_isd = 16'h0001; cfg_as = 48'h0000_ffaa_0001;
    cfg_key = 128'hfedcba98765432100123456789abcdef;
    ift_wr_en = 0; ift_wr_set = 0; ift_wr_ifid = 0; ift_wr_port = 0;
    host_wr_en = 0; host_wr_set = 0; host_wr_addr = 0; host_wr_port = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // interface i sits behind port i mod 128
    for (int i = 1; i <= 100; i++) begin
      @(negedge clk); ift_wr_en = 1; ift_wr_set = 1; ift_wr_ifid = 16'(i); ift_wr_port = PORT_W'(i % 128);
    end
    @(negedge clk) ift_wr_en = 0;

    // latency of a lone packet: last header byte in -> first byte out
    stream = make(40, 2, 0, 0, 1, 1, port, hl);
    first_out = -1;
    for (int i = 0; i < stream.size(); i++) begin
      @(negedge clk); in_valid = 1; in_data = stream[i]; in_last = (i == stream.size() - 1); in_port = PORT_W'(port);
      if (i == hl - 1) hdr_last_cycle = cycle + 1;
    end
    @(negedge clk) in_valid = 0;
    wait (exp_data.size() == 0);
    $display("header-to-output latency %0d clocks", first_out - hdr_last_cycle);
    chk(first_out - hdr_last_cycle == 10, "latency of 10 clocks");

    // back-to-back frames: 1500 B and 115 B, long and short paths, both path types
    stream.delete();
    n_pkts = 0;
    for (int n = 0; n < 24; n++) begin
      bytes_q q;
      int flen, s0, s1, s2, hf, base;
      s0 = (n % 3 == 0) ? 22 : 2; s1 = (n % 3 == 0) ? 21 : 1; s2 = (n % 3 == 0) ? 21 : 0;
      hf = (n % 3 == 0) ? (n % 64) : (n % 3);
      q = make(0, s0, s1, s2, hf, n % 2 == 0, port, hl);
      flen = (n % 2 == 0) ? 1500 : 115;
      base = q.size();
      if (base < flen) begin
        // pad the payload to reach the frame size, and fix the expected copy too
        void'(exp_data.pop_back()); void'(exp_port.pop_back());
        q = make(flen - base, s0, s1, s2, hf, n % 2 == 0, port, hl);
      end
      foreach (q[i]) stream.push_back(q[i]);
      pkt_len.push_back(q.size());
      pkt_port.push_back(port);
      n_pkts++;
    end
    total = stream.size();
    first_out = -1; out_bytes = 0; in_stalls = 0;
    t0 = cycle;
    begin
      int k, left;
      k = 0; left = pkt_len[0];
      for (int i = 0; i < stream.size(); i++) begin
        @(negedge clk);
        in_valid = 1; in_data = stream[i]; in_port = PORT_W'(pkt_port[k]);
        in_last = (left == 1);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        left--;
        if (left == 0 && k + 1 < pkt_len.size()) begin k++; left = pkt_len[k]; end
      end
      @(negedge clk) in_valid = 0; in_last = 0;
    end
    wait (exp_data.size() == 0);
    repeat (5) @(posedge clk);
    $display("%0d frames, %0d bytes: done after %0d clocks, output span %0d clocks, input stalls %0d",
             n_pkts, total, cycle - t0, last_out - first_out + 1, in_stalls);
    chk(in_stalls == 0, "input stalled");
    chk(out_bytes == total, "byte count");
    chk(last_out - first_out + 1 <= total + 10 * n_pkts, "output slower than one byte per clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
