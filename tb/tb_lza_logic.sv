// tb_lza_logic: checks the leading-zero anticipation string (eq. 3-1).
// Let V = a + b (108 bits, two's complement) and q the index, counted from
// the MSB, of the first 1 in f. For V >= 0 with z leading zeros, and for
// V < 0 with z leading ones, the anticipation may be exact or one short:
// q == z - 1 or q == z (q = z - 1 only possible when z > 0, q >= 0).
// This is the one-position error that add_round corrects later. Operand
// pairs are a random split of sums with a random number of leading sign
// bits, both signs.
module tb_lza_logic;
  localparam int W = 108;
  logic [W-1:0] a = '0, b = '0, f, v, u;
  int checks = 0, failures = 0, q, z, nexact, nshort;

  lza_logic #(.W(W)) dut (.a(a), .b(b), .f(f));

  initial begin
    #10ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic int lead(logic [W-1:0] x);
    for (int i = W - 1; i >= 0; i--) if (x[i]) return W - 1 - i;
    return W;
  endfunction

  initial begin
    nexact = 0; nshort = 0;
    for (int i = 0; i < 20000; i++) begin
      v = W'({$urandom, $urandom, $urandom, $urandom}) >> ($urandom % (W - 1));
      if (v == 0) v = 1;
      if ($urandom % 2) v = ~v;
      a = W'({$urandom, $urandom, $urandom, $urandom});
      if ($urandom % 3 == 0) a = a >> ($urandom % W);
      b = v - a;
      #1ns;
      u = v[W-1] ? ~v : v;
      z = lead(u);
      q = lead(f);
      checks++;
      if (q == z) nexact++;
      else if (q == z - 1) nshort++;
      else begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h v=%h q=%0d z=%0d", a, b, v, q, z);
      end
    end
    $display("exact %0d, one short %0d", nexact, nshort);
    checks++;
    if (nexact == 0 || nshort == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
