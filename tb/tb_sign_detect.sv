// tb_sign_detect: checks the sign detection of the carry-save sum.
// For effective subtraction with the exponents not deciding (eq_exp = 1),
// comp must equal the sign of the true sum s + c, where one word is
// negative and the other positive as in the real datapath. Sums of
// random magnitude, sums of exactly 0 and -1, and equal words are
// included. With eq_exp = 0, comp must follow d_pos; it must be 0 for an
// effective addition.
module tb_sign_detect;
  logic [162:0] s = '0, c = '0;
  logic eq_exp = 1'b0, d_pos = 1'b0, sub = 1'b0, comp, expc;
  logic signed [162:0] x, neg;
  int checks = 0, failures = 0;

  sign_detect dut (.s(s), .c(c), .eq_exp(eq_exp), .d_pos(d_pos), .sub(sub), .comp(comp));

  initial begin
    #10ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8000; i++) begin
      x = 163'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom}) >> (13 + $urandom % 150);
      if ($urandom % 2) x = -x;
      if ($urandom % 16 == 0) x = ($urandom % 2) ? 163'sd0 : -163'sd1;
      neg = -(163'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom}) >> (2 + $urandom % 150)) - 1;
      if ($urandom % 2) begin s = neg; c = x - neg; end
      else begin c = neg; s = x - neg; end
      sub = ($urandom % 8) != 0;
      eq_exp = ($urandom % 4) != 0;
      d_pos = $urandom % 2;
      #1ns;
      expc = sub & (eq_exp ? x[162] : d_pos);
      checks++;
      if (comp !== expc) begin
        failures++;
        if (failures < 10) $display("FAIL s=%h c=%h eq=%b d_pos=%b sub=%b comp=%b", s, c,
                                    eq_exp, d_pos, sub, comp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
