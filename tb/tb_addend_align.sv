// tb_addend_align: checks the 161-bit addend alignment shifter.
// Reference: the significand is placed at the top of a 322-bit field and
// shifted right by sh; the upper 161 bits are the aligned addend (inverted
// for an effective subtraction), and st1 is the OR of the magnitude bits
// that left the 161-bit window. All shift amounts 0..161 occur.
module tb_addend_align;
  logic [52:0]  ma = '0;
  logic         sub = 1'b0;
  logic [7:0]   sh = '0;
  logic [160:0] as_o, kept, exp_as;
  logic [321:0] full;
  logic         st1, exp_st;
  int checks = 0, failures = 0;

  addend_align dut (.ma(ma), .sub(sub), .sh(sh), .as_o(as_o), .st1(st1));

  initial begin
    #10ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6000; i++) begin
      ma  = ($urandom % 5 == 0) ? 53'(1) << ($urandom % 53) : {1'b1, 52'({$urandom, $urandom})};
      sub = $urandom % 2;
      sh  = (i < 324) ? 8'(i % 162) : 8'($urandom % 162);
      #1ns;
      full   = {ma, 269'h0} >> sh;
      kept   = full[321:161];
      exp_as = sub ? ~kept : kept;
      exp_st = full[160:0] != 0;
      checks++;
      if (as_o !== exp_as || st1 !== exp_st) begin
        failures++;
        if (failures < 10) $display("FAIL ma=%h sub=%b sh=%0d got %h/%b exp %h/%b",
                                    ma, sub, sh, as_o, st1, exp_as, exp_st);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
