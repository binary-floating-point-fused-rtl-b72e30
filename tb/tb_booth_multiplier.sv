// tb_booth_multiplier: checks the radix-4 Booth multiplier with its CSA tree.
// Property: the two output words add up to the exact product,
// (ps + pc) mod 2^108 == mb * mc, for random and corner-case 53-bit
// significands (zero, all ones, single bits, hidden bit set or clear).
// The block is combinational: inputs are applied, settled for 1 ns, checked.
module tb_booth_multiplier;
  logic [52:0]  mb = '0, mc = '0;
  logic [107:0] ps, pc, prod;
  int checks = 0, failures = 0;

  booth_multiplier dut (.mb(mb), .mc(mc), .ps(ps), .pc(pc));

  initial begin
    #10ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic logic [52:0] pick();
    case ($urandom % 6)
      0: return '0;
      1: return '1;
      2: return 53'(1) << ($urandom % 53);
      3: return {1'b1, 52'({$urandom, $urandom})};
      default: return 53'({$urandom, $urandom});
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 5000; i++) begin
      mb = pick(); mc = pick();
      #1ns;
      prod = 108'(mb) * 108'(mc);
      checks++;
      if (ps + pc != prod) begin
        failures++;
        if (failures < 10) $display("FAIL %h * %h: %h + %h != %h", mb, mc, ps, pc, prod);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
