// tb_adder_anticipation: checks the half-adder row with its inverted-input
// duplicate. Property, mod 2^163:
//   p + y == s + c + cin          when comp = 0
//   p + y == ~s + ~c + 1 + cin    when comp = 1  (i.e. -(s + c) for cin = 1)
// and p is the bit-wise propagate of the selected half adder row.
module tb_adder_anticipation;
  logic [162:0] s = '0, c = '0, p, y, expv;
  logic comp = 1'b0, cin = 1'b0;
  int checks = 0, failures = 0;

  adder_anticipation dut (.s(s), .c(c), .comp(comp), .cin(cin), .p(p), .y(y));

  initial begin
    #10ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      s = 163'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      c = 163'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      if ($urandom % 4 == 0) c = ~s;
      comp = $urandom % 2;
      cin  = $urandom % 2;
      #1ns;
      expv = comp ? (~s + ~c + 163'd1 + 163'(cin)) : (s + c + 163'(cin));
      checks++;
      if (p + y !== expv) begin
        failures++;
        if (failures < 10) $display("FAIL s=%h c=%h comp=%b cin=%b", s, c, comp, cin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
