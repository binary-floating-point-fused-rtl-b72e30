// tb_basic_normalizer: random check of the basic unit's normalizer.
// Stimulus: a magnitude with its leading one at a random position, and a
// shift amount that is exact (leading one to bit 161), one short (leading
// one to bit 160, correction needed), or capped lower (subnormal case,
// leading one below 160).  Reference: the shifted value must have its
// leading one at 161, or below 160 with no correction; the bits must be the
// input shifted by the total amount (54*pre + shamt + corr).
module tb_basic_normalizer;
  import fma_pkg::*;
  logic [FW-1:0] mag = '0, n, ref_n;
  logic pre = 1'b0, corr, ref_corr;
  logic [LSW-1:0] shamt = '0;
  int checks = 0, failures = 0, n_corr = 0;

  basic_normalizer dut (.mag(mag), .pre(pre), .shamt(shamt), .n(n), .corr(corr));

  initial begin
    #10ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int lead, want, kind;
    for (int i = 0; i < 20000; i++) begin
      pre  = $urandom % 2;
      // leading one inside the 108-bit window the anticipator looks at
      lead = pre ? ($urandom % 107) : (54 + $urandom % 107);
      for (int k = 0; k < FW; k += 32) mag[k +: 32] = $urandom;
      mag = mag & ((FW'(1) << lead) - 1);
      mag[lead] = 1'b1;
      want = 161 - lead - (pre ? 54 : 0);
      if (want < 0) want = 0;
      kind = $urandom % 3;
      if (kind == 1 && want > 0) want--;                        // one short
      if (kind == 2 && want > 1) want = $urandom % (want - 1);  // capped
      shamt = LSW'(want);
      #1ns;
      ref_n = mag << ((pre ? 54 : 0) + want);
      ref_corr = ~ref_n[FW-1] & ~ref_n[FW-2] & ref_n[FW-3];
      if (ref_corr) ref_n = ref_n << 1;
      checks++;
      if (n !== ref_n || corr !== ref_corr || (!ref_n[FW-2] && ref_n[FW-3])) begin
        failures++;
        if (failures <= 10)
          $display("FAIL mag=%h pre=%b shamt=%0d n=%h corr=%b", mag, pre, shamt, n, corr);
      end
      if (corr) n_corr++;
    end
    checks++;
    if (n_corr == 0) begin
      failures++;
      $display("FAIL correction never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
