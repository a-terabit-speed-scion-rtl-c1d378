// tb_lookup_table: random inserts, overwrites and deletes against an associative-array
// model; checks hit and data on both read ports, including keys that share an index
// with a stored key but differ in the tag.
module tb_lookup_table;
  logic clk = 0, rst_n = 0;
  logic wr_en, wr_set;
  logic [15:0] wr_key;
  logic [7:0] wr_data;
  logic [15:0] rd_key [2];
  logic rd_hit [2];
  logic [7:0] rd_data [2];
  int checks = 0, failures = 0;
  int model_data[int];
  int n_hit = 0, n_miss = 0;

  lookup_table #(.KEY_W(16), .IDX_W(6), .DATA_W(8), .NRD(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void forget_slot(input int key);
    // a direct-mapped slot holds one key: writing evicts any other key of that index
    int ks[$];
    foreach (model_data[k]) if ((k % 64) == (key % 64) && k != key) ks.push_back(k);
    foreach (ks[i]) model_data.delete(ks[i]);
  endfunction

  initial begin
    wr_en = 0; wr_set = 0; wr_key = 0; wr_data = 0; rd_key[0] = 0; rd_key[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      wr_en = ($urandom_range(0, 2) == 0);
      wr_set = ($urandom_range(0, 4) != 0);
      wr_key = 16'($urandom_range(0, 300));
      wr_data = 8'($urandom);
      rd_key[0] = 16'($urandom_range(0, 300));
      rd_key[1] = 16'($urandom_range(0, 300));
      #1;
      for (int r = 0; r < 2; r++) begin
        checks++;
        if (rd_hit[r] != model_data.exists(int'(rd_key[r]))) begin
          failures++; $display("hit mismatch key %0d", rd_key[r]);
        end else if (rd_hit[r]) begin
          n_hit++;
          checks++;
          if (rd_data[r] != 8'(model_data[int'(rd_key[r])])) begin failures++; $display("data mismatch"); end
        end else n_miss++;
      end
      @(posedge clk);
      if (wr_en) begin
        forget_slot(int'(wr_key));
        if (wr_set) model_data[int'(wr_key)] = int'(wr_data);
        else model_data.delete(int'(wr_key));
      end
    end
    checks++;
    if (n_hit < 50 || n_miss < 50) begin failures++; $display("poor coverage"); end
    $display("hits %0d misses %0d", n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
