// tb_sem_sbox_layer: checks both S-box layers against the reference model, including
// the known AES values S(00)=63, S(01)=7C, S(53)=ED, for every byte value at every
// byte position.
module tb_sem_sbox_layer;
  import sem_ref_pkg::*;

  logic [127:0] din, d0, d1;
  int checks = 0, failures = 0;

  sem_sbox_layer #(.LAYER(0)) u0 (.din(din), .dout(d0));
  sem_sbox_layer #(.LAYER(1)) u1 (.din(din), .dout(d1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // known AES S-box values
    checks += 3;
    if (ref_sbox(8'h00) != 8'h63 || ref_sbox(8'h01) != 8'h7c || ref_sbox(8'h53) != 8'hed) begin
      failures += 3; $display("reference S-box wrong");
    end
    // Byte 0 of layer 0 has offset 11: input 11 selects S(0) = 63.
    din = {8'd11, 120'd0}; #1;
    checks++; if (d0[127:120] != 8'h63) begin failures++; $display("layer0 byte0 %h", d0[127:120]); end
    for (int v = 0; v < 256; v++) begin
      for (int p = 0; p < 16; p++) din[127-8*p -: 8] = 8'(v + 7*p);
      #1;
      checks++;
      if (d0 !== ref_layer(din, 0)) begin failures++; $display("layer0 v=%0d %h", v, d0); end
      checks++;
      if (d1 !== ref_layer(din, 1)) begin failures++; $display("layer1 v=%0d %h", v, d1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
