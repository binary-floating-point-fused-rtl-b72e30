// tb_basic_cpa: random check of the basic unit's carry propagate adder.
// Reference: the sum is built 32 bits at a time with an explicit carry
// chain, and the sign is the top bit of that sum.  Operands include random
// words, words with long runs of ones (long carries) and complementary
// pairs (sum of all ones, then plus one).
module tb_basic_cpa;
  import fma_pkg::*;
  logic [FW-1:0] s = '0, c = '0, sum, ref_sum;
  logic neg;
  int checks = 0, failures = 0;

  basic_cpa dut (.s(s), .c(c), .sum(sum), .neg(neg));

  initial begin
    #10ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic logic [FW-1:0] rnd_word();
    logic [FW-1:0] v;
    for (int k = 0; k < FW; k += 32) v[k +: 32] = $urandom;
    return v;
  endfunction

  function automatic logic [FW-1:0] chain_add(logic [FW-1:0] x, logic [FW-1:0] y);
    logic [FW-1:0] r;
    logic [32:0] part;
    logic cy;
    cy = 1'b0;
    for (int k = 0; k < FW; k += 32) begin
      part = 33'(32'(x >> k)) + 33'(32'(y >> k)) + 33'(cy);
      for (int j = 0; j < 32 && k + j < FW; j++) r[k+j] = part[j];
      cy = part[32];
    end
    return r;
  endfunction

  initial begin
    for (int i = 0; i < 20000; i++) begin
      s = rnd_word();
      case (i % 4)
        0: c = rnd_word();
        1: c = ~s;
        2: c = ~s + FW'(1);
        default: begin
          c = rnd_word() | ((~'0) << ($urandom % FW));
        end
      endcase
      #1ns;
      ref_sum = chain_add(s, c);
      checks++;
      if (sum !== ref_sum || neg !== ref_sum[FW-1]) begin
        failures++;
        if (failures <= 10) $display("FAIL s=%h c=%h sum=%h neg=%b", s, c, sum, neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
