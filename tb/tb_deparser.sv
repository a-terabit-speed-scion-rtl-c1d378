// tb_deparser: queues decisions and packet bytes, applies random output back-pressure,
// and checks each output byte: port and verdict of its packet's decision, the path meta
// header replaced at meta_off only when rewrite is set, the last-byte flag, and that
// back-to-back packets leave without an idle cycle when the output is always ready.
module tb_deparser;
  import scion_pkg::*;

  logic clk = 0, rst_n = 0;
  logic dec_valid, dec_pop, buf_valid, buf_last, buf_pop;
  decision_t dec;
  logic [7:0] buf_data;
  logic out_valid, out_ready, out_last;
  logic [7:0] out_data;
  logic [PORT_W-1:0] out_port;
  verdict_e out_verdict;

  int checks = 0, failures = 0, cycle = 0;
  decision_t dq[$];
  logic [8:0] bq[$];
  logic [7:0] eq[$];      // expected output bytes
  int         pq[$];      // expected port per byte
  int n_rewrite = 0, bubbles = 0, bytes_out = 0;
  bit stream_phase = 0;

  deparser dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sources: front of the queues, first-word-fall-through
  always_comb begin
    dec_valid = dq.size() > 0;
    dec       = dq.size() > 0 ? dq[0] : '0;
    buf_valid = bq.size() > 0;
    {buf_last, buf_data} = bq.size() > 0 ? bq[0] : 9'd0;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      bytes_out++;
      checks++;
      if (out_data != eq[0] || int'(out_port) != pq[0]) begin
        failures++; $display("byte %h exp %h port %0d exp %0d", out_data, eq[0], out_port, pq[0]);
      end
      checks++;
      if (out_verdict != dq[0].verdict) failures++;
      void'(eq.pop_front()); void'(pq.pop_front());
      void'(bq.pop_front());
      if (buf_last) void'(dq.pop_front());
    end else if (stream_phase && (bq.size() > 0)) bubbles++;
  end

  task automatic add_packet(input int len, input bit rw, input int moff);
    decision_t d;
    logic [31:0] nm;
    nm = $urandom;
    d = '0;
    d.verdict = rw ? V_FORWARD : verdict_e'($urandom_range(1, 5));
    d.port = PORT_W'($urandom_range(0, 128));
    d.rewrite = rw;
    d.new_meta = nm;
    d.meta_off = OFF_W'(moff);
    dq.push_back(d);
    if (rw) n_rewrite++;
    for (int i = 0; i < len; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      bq.push_back({(i == len - 1), b});
      if (rw && i >= moff && i < moff + 4) eq.push_back(nm[31 - 8*(i - moff) -: 8]);
      else eq.push_back(b);
      pq.push_back(int'(d.port));
    end
  endtask

  initial begin
    out_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // phase 1: random back-pressure
    for (int n = 0; n < 60; n++) add_packet($urandom_range(1, 90), n % 2, $urandom_range(0, 60));
    while (bq.size() > 0) begin
      @(negedge clk) out_ready = $urandom_range(0, 2) != 0;
    end
    // phase 2: always ready, count idle cycles between packets
    @(negedge clk) out_ready = 1;
    for (int n = 0; n < 30; n++) add_packet($urandom_range(1, 60), n % 2, $urandom_range(0, 50));
    stream_phase = 1;
    while (bq.size() > 0) @(negedge clk);
    stream_phase = 0;
    checks++;
    if (bubbles != 0) begin failures++; $display("%0d idle cycles while streaming", bubbles); end
    checks++;
    if (dq.size() != 0 || eq.size() != 0) begin failures++; $display("leftover"); end
    $display("bytes %0d rewritten packets %0d", bytes_out, n_rewrite);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
