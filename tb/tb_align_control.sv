// tb_align_control: checks the exponent/alignment control against integer
// arithmetic. With subnormal exponent fields read as 1:
//   E0  = max(Eb + Ec - 1023 + 56, Ea, 2)   exponent of frame bit 161
//   sh  = min(E0 - Ea, 161)                 addend right shift
//   pre = shift is 55 or more and E0 >= 56  (top 54 bits hold no result)
//   e_base = E0 - 54*pre; lim_en/lim_pos = the shift limit e_base - 1 < 108
//   eq_exp = shift 55 or 56 or a subnormal operand; d_pos = shift <= 54.
// Exponent fields are random over the full range, biased towards
// d = Ea - (Eb + Ec - 1023) near 0 and towards subnormal fields.
module tb_align_control;
  logic [10:0] ea = '0, eb = '0, ec = '0;
  logic [7:0]  sh;
  logic        eq_exp, d_pos, pre, lim_en;
  logic signed [13:0] e_base;
  logic [6:0]  lim_pos;
  int checks = 0, failures = 0;
  int xa, xb, xc, e0, shr, esh, eb_exp, npre;
  logic any_den;

  align_control dut (.ea(ea), .eb(eb), .ec(ec), .sh(sh), .eq_exp(eq_exp), .d_pos(d_pos),
                     .pre(pre), .e_base(e_base), .lim_en(lim_en), .lim_pos(lim_pos));

  initial begin
    #10ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic logic [10:0] pick();
    case ($urandom % 4)
      0: return '0;
      1: return 11'($urandom % 120);
      default: return 11'($urandom % 2047);
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 20000; i++) begin
      eb = pick(); ec = pick();
      if ($urandom % 2) ea = 11'(int'(eb) + int'(ec) - 1023 + int'($urandom % 9) - 4);
      else ea = pick();
      #1ns;
      xa = (ea == 0) ? 1 : int'(ea);
      xb = (eb == 0) ? 1 : int'(eb);
      xc = (ec == 0) ? 1 : int'(ec);
      any_den = (ea == 0) || (eb == 0) || (ec == 0);
      e0  = xb + xc - 1023 + 56;
      if (xa > e0) e0 = xa;
      if (e0 < 2) e0 = 2;
      shr = e0 - xa;
      esh = (shr > 161) ? 161 : shr;
      npre = (shr >= 55 && e0 >= 56) ? 1 : 0;
      eb_exp = e0 - 54 * npre;
      checks++;
      if (int'(sh) != esh || pre != npre[0] || int'(e_base) != eb_exp
          || eq_exp != (shr == 55 || shr == 56 || any_den) || d_pos != (shr <= 54)
          || lim_en != (eb_exp - 1 < 108) || (lim_en && int'(lim_pos) != eb_exp - 1)) begin
        failures++;
        if (failures < 10) $display("FAIL ea=%0d eb=%0d ec=%0d sh=%0d pre=%b e_base=%0d",
                                    ea, eb, ec, sh, pre, e_base);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
