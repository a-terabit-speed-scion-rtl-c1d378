// tb_sem_mac: streams one block per cycle through the SEM pipeline, with the key changed
// between blocks, and checks each result against the reference model and that it comes
// out exactly five cycles after it went in.
module tb_sem_mac;
  import sem_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic [127:0] in_block, in_key, out_mac;
  logic out_valid;
  int checks = 0, failures = 0;
  int cycle = 0;

  logic [127:0] exp_q[$];
  int           t_q[$];

  sem_mac dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      logic [127:0] e; int t;
      e = exp_q.pop_front(); t = t_q.pop_front();
      if (out_mac !== e) begin failures++; $display("mac %h exp %h", out_mac, e); end
      checks++;
      if (cycle - t != 5) begin failures++; $display("latency %0d", cycle - t); end
    end
  end

  initial begin
    in_valid = 0; in_block = 0; in_key = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      in_valid = (n % 7) != 3;
      in_block = {$urandom, $urandom, $urandom, $urandom};
      if (n % 5 == 0) in_key = {$urandom, $urandom, $urandom, $urandom};
      if (in_valid) begin
        exp_q.push_back(ref_sem(in_block, in_key));
        t_q.push_back(cycle + 1);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
