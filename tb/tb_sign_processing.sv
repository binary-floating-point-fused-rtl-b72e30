// tb_sign_processing: exhaustive check of the sign logic over all 64 input
// combinations. Reference: the product sign is sb^sc^op; the operation is
// an effective subtraction when it differs from sa (a zero addend never
// makes it one); the result takes the product sign, or the addend sign
// when the sum was complemented.
module tb_sign_processing;
  logic sa = 0, sb = 0, sc = 0, op = 0, a_zero = 0, comp = 0, eff_sub, sw, sp;
  int checks = 0, failures = 0;

  sign_processing dut (.sa(sa), .sb(sb), .sc(sc), .op(op), .a_zero(a_zero), .comp(comp),
                       .eff_sub(eff_sub), .sw(sw));

  initial begin
    #1ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      {sa, sb, sc, op, a_zero, comp} = 6'(i);
      #1ns;
      sp = sb ^ sc ^ op;
      checks++;
      if (eff_sub !== ((sa != sp) && !a_zero) || sw !== (comp ? sa : sp)) begin
        failures++;
        $display("FAIL inputs %b: eff_sub=%b sw=%b", 6'(i), eff_sub, sw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
