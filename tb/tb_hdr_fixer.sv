// tb_hdr_fixer: every legal (segment lengths, CurrINF, CurrHF) combination of small
// paths plus random large ones; checks CurrHF + 1, the move to the next info field at a
// segment end, and that the segment lengths pass unchanged.
module tb_hdr_fixer;
  import scion_pkg::*;
  path_meta_t mi, mo;
  int checks = 0, failures = 0, crossings = 0;

  hdr_fixer dut (.meta_in(mi), .meta_out(mo));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int s0, input int s1, input int s2, input int hf);
    int inf, exp_inf;
    inf = (hf < s0) ? 0 : (hf < s0 + s1) ? 1 : 2;
    mi = '{curr_inf: 2'(inf), curr_hf: 6'(hf), rsv: 6'd0,
           seg0_len: 6'(s0), seg1_len: 6'(s1), seg2_len: 6'(s2)};
    #1;
    exp_inf = (hf + 1 == s0 || hf + 1 == s0 + s1 || hf + 1 == s0 + s1 + s2) ? inf + 1 : inf;
    if (exp_inf != inf) crossings++;
    checks++;
    if (mo.curr_hf != 6'(hf + 1) || mo.curr_inf != 2'(exp_inf)
        || mo.seg0_len != 6'(s0) || mo.seg1_len != 6'(s1) || mo.seg2_len != 6'(s2)) begin
      failures++;
      $display("FAIL %0d %0d %0d hf=%0d -> inf %0d hf %0d", s0, s1, s2, hf, mo.curr_inf, mo.curr_hf);
    end
  endtask

  initial begin
    for (int s0 = 1; s0 <= 4; s0++)
      for (int s1 = 0; s1 <= 4; s1++)
        for (int s2 = 0; s2 <= (s1 == 0 ? 0 : 4); s2++)
          for (int hf = 0; hf < s0 + s1 + s2; hf++) one(s0, s1, s2, hf);
    for (int n = 0; n < 500; n++) begin
      int s0, s1, s2;
      s0 = $urandom_range(1, 21); s1 = $urandom_range(0, 21); s2 = s1 ? $urandom_range(0, 21) : 0;
      one(s0, s1, s2, $urandom_range(0, s0 + s1 + s2 - 1));
    end
    checks++;
    if (crossings == 0) failures++;
    $display("segment crossings %0d", crossings);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
