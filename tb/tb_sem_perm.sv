// tb_sem_perm: drives single-bit and random inputs through the permutation and compares
// with the reference GIFT-128 index; also checks a few hand-worked positions.
module tb_sem_perm;
  import sem_ref_pkg::*;

  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  sem_perm dut (.din(din), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // hand-worked: bit 0 -> 0, bit 1 -> 33, bit 4 -> 96, bit 16 -> 4, bit 127 -> 31
    int src[5] = '{0, 1, 4, 16, 127};
    int dst[5] = '{0, 33, 96, 4, 31};
    for (int n = 0; n < 5; n++) begin
      din = 128'd1 << src[n]; #1;
      checks++;
      if (dout != (128'd1 << dst[n])) begin failures++; $display("bit %0d -> %h", src[n], dout); end
    end
    for (int i = 0; i < 128; i++) begin
      din = 128'd1 << i; #1;
      checks++;
      if (dout != ref_perm(din)) begin failures++; $display("single bit %0d", i); end
    end
    for (int n = 0; n < 200; n++) begin
      din = {$urandom, $urandom, $urandom, $urandom}; #1;
      checks++;
      if (dout != ref_perm(din)) begin failures++; $display("random %h", din); end
      checks++;
      if ($countones(dout) != $countones(din)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
