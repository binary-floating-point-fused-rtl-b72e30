// tb_addend_csa: checks the 3:2 carry-save adder that merges the aligned
// addend with the two product words. The product words are a random split
// of a random 106-bit product (so their raw sum may wrap past 2^108, as the
// Booth tree's words do). Property, in the 163-bit frame:
//   s + c == signext(as_i) + product + inj   (mod 2^163).
module tb_addend_csa;
  logic [107:0] ps = '0, pc = '0, prod;
  logic [160:0] as_i = '0;
  logic         sub = 1'b0, inj = 1'b0;
  logic [162:0] s, c, expv;
  int checks = 0, failures = 0;

  addend_csa dut (.ps(ps), .pc(pc), .as_i(as_i), .sub(sub), .inj(inj), .s(s), .c(c));

  initial begin
    #10ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      prod = 108'({$urandom, $urandom, $urandom, $urandom}) >> (2 + $urandom % 60);
      ps   = 108'({$urandom, $urandom, $urandom, $urandom});
      if ($urandom % 4 == 0) ps = prod;
      pc   = prod - ps;
      sub  = $urandom % 2;
      inj  = $urandom % 2;
      as_i = 161'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      #1ns;
      expv = {{2{sub}}, as_i} + 163'(prod) + 163'(inj);
      checks++;
      if (s + c !== expv) begin
        failures++;
        if (failures < 10) $display("FAIL ps=%h pc=%h as=%h sub=%b", ps, pc, as_i, sub);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
