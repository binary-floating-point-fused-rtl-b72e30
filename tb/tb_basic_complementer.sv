// tb_basic_complementer: random check of the magnitude step of the basic
// unit.  Reference: a negative result is negated (two's complement) and,
// when addend bits were lost in the alignment (st1), reduced by one more
// unit; a positive result passes unchanged.  Negative inputs include values
// just below zero and the most negative frame values.
module tb_basic_complementer;
  import fma_pkg::*;
  logic [FW-1:0] sum = '0, mag, ref_mag;
  logic neg = 1'b0, st1 = 1'b0;
  int checks = 0, failures = 0;

  basic_complementer dut (.sum(sum), .neg(neg), .st1(st1), .mag(mag));

  initial begin
    #10ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      for (int k = 0; k < FW; k += 32) sum[k +: 32] = $urandom;
      case (i % 4)
        0: ;
        1: sum = -(FW'($urandom % 8));                   // just below zero
        2: sum = sum >> ($urandom % FW);                 // positive, any size
        default: sum[FW-1 -: 3] = 3'b110;                // large negative
      endcase
      neg = sum[FW-1];
      st1 = $urandom % 2;
      #1ns;
      ref_mag = neg ? (FW'(0) - sum - FW'(st1)) : sum;
      checks++;
      if (mag !== ref_mag) begin
        failures++;
        if (failures <= 10) $display("FAIL sum=%h st1=%b mag=%h exp %h", sum, st1, mag, ref_mag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
