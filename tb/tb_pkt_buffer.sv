// tb_pkt_buffer: writes and reads with random enables, fills the buffer to full and
// drains it, and checks byte order, the end-of-packet flag, full and rd_valid.
module tb_pkt_buffer;
  logic clk = 0, rst_n = 0;
  logic wr_en, wr_last, full, rd_valid, rd_last, rd_pop;
  logic [7:0] wr_data, rd_data;
  int checks = 0, failures = 0, n_full = 0;
  logic [8:0] model[$];

  pkt_buffer #(.DEPTH(1024)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_last = 0; wr_data = 0; rd_pop = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 12000; n++) begin
      int phase;
      phase = (n / 2500) % 2;   // alternately mostly writing and mostly reading
      @(negedge clk);
      checks++;
      if (full != (model.size() == 1024) || rd_valid != (model.size() != 0)) begin
        failures++; $display("flags: full %0d valid %0d size %0d", full, rd_valid, model.size());
      end
      if (full) n_full++;
      if (rd_valid) begin
        checks++;
        if ({rd_last, rd_data} != model[0]) begin failures++; $display("data %h exp %h", {rd_last, rd_data}, model[0]); end
      end
      wr_en = !full && ($urandom_range(0, 9) < (phase ? 3 : 8));
      rd_pop = rd_valid && ($urandom_range(0, 9) < (phase ? 8 : 3));
      wr_data = 8'($urandom); wr_last = ($urandom_range(0, 30) == 0);
      @(posedge clk);
      if (rd_pop) void'(model.pop_front());
      if (wr_en) model.push_back({wr_last, wr_data});
    end
    checks++;
    if (n_full == 0) begin failures++; $display("never full"); end
    $display("cycles full %0d", n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
