// tb_lza_encoder: checks the leading-one encoder with its shift limit.
// Reference: shamt = index, counted from the MSB (bit 107 = index 0), of
// the first 1 of f; when lim_en is set the limit position counts as a 1,
// so shamt = min(first one, lim_pos); with no 1 at all shamt = 127.
// f has its first 1 at every position, followed by random bits.
module tb_lza_encoder;
  localparam int W = 108;
  logic [W-1:0] f = '0;
  logic lim_en = 1'b0;
  logic [6:0] lim_pos = '0, shamt;
  int checks = 0, failures = 0, first, expv;

  lza_encoder dut (.f(f), .lim_en(lim_en), .lim_pos(lim_pos), .shamt(shamt));

  initial begin
    #10ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6000; i++) begin
      first = (i < 2 * (W + 1)) ? i % (W + 1) : int'($urandom % (W + 1));
      f = W'({$urandom, $urandom, $urandom, $urandom});
      if (first == W) f = '0;
      else begin
        f = f >> (first + 1);
        f[W-1-first] = 1'b1;
      end
      lim_en  = ($urandom % 3) == 0;
      lim_pos = 7'($urandom % W);
      #1ns;
      expv = (first == W) ? 127 : first;
      if (lim_en && int'(lim_pos) < expv) expv = int'(lim_pos);
      checks++;
      if (int'(shamt) != expv) begin
        failures++;
        if (failures < 10) $display("FAIL f=%h lim=%b/%0d shamt=%0d exp %0d", f, lim_en,
                                    lim_pos, shamt, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
