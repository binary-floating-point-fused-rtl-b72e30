// tb_norm_shifter: checks the two-step normalization shifter. Reference:
// both words are shifted left by 54*pre + shamt with zeros entering from
// the right (bits leaving the 163-bit frame are dropped). All 128 shamt
// values occur with and without the coarse pre-shift.
module tb_norm_shifter;
  logic [162:0] p_i = '0, g_i = '0, p_o, g_o;
  logic pre = 1'b0;
  logic [6:0] shamt = '0;
  int checks = 0, failures = 0, amt;

  norm_shifter dut (.p_i(p_i), .g_i(g_i), .pre(pre), .shamt(shamt), .p_o(p_o), .g_o(g_o));

  initial begin
    #10ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      p_i = 163'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      g_i = 163'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      pre = (i < 256) ? i[7] : 1'($urandom);
      shamt = (i < 256) ? i[6:0] : 7'($urandom);
      #1ns;
      amt = 54 * int'(pre) + int'(shamt);
      checks++;
      if (p_o !== (p_i << amt) || g_o !== (g_i << amt)) begin
        failures++;
        if (failures < 10) $display("FAIL pre=%b shamt=%0d", pre, shamt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
