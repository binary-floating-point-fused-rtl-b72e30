// tb_add_round: checks the combined addition and rounding.
// A normalized value V (163 bits) is drawn with its leading one at bit 161
// or 160 (LZA exact or one short) or lower (subnormal limit), including
// all-ones runs that round up to the next power of two and exact ties.
// It is split into two words p + y as the half-adder row produces them
// (p = hs ^ hc, y = (hs & hc) << 1 plus a carry-in). The reference rounds V
// directly: LSB at bit 109 if V has its leading one at 161 or above, else
// at bit 108; R is the bit below, the sticky is the OR of all lower bits
// and st1. The rounded value gives adj (position 162/161/160 of its
// leading one), frac, hidden, inexact = R | S and tiny = V < 2^160.
module tb_add_round;
  import fma_pkg::*;
  logic [162:0] p = '0, y = '0, v, hs, hc, vr;
  logic st1 = 1'b0, sign = 1'b0, cin;
  logic [1:0] mode = 2'b00;
  logic [51:0] frac, e_frac;
  logic [1:0] adj, e_adj;
  logic hidden, inexact, tiny, e_hidden, e_inexact, e_tiny, rb, sb, inc;
  logic [54:0] mant;
  int checks = 0, failures = 0, lsb, top, nties, ncarry;

  add_round dut (.p(p), .y(y), .st1(st1), .mode(rnd_mode_e'(mode)), .sign(sign),
                 .frac(frac), .adj(adj), .hidden(hidden), .inexact(inexact), .tiny(tiny));

  initial begin
    #10ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    nties = 0; ncarry = 0;
    for (int i = 0; i < 20000; i++) begin
      v = 163'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      case ($urandom % 8)
        0: top = 160 - int'($urandom % 100);
        1, 2, 3: top = 160;
        default: top = 161;
      endcase
      v = v & ((163'd1 << top) - 1);
      v[top] = 1'b1;
      case ($urandom % 6)
        0: v[top -: 56] = '1;                                  // carry out
        1: begin v[top-53] = 1'b1; v = v & ~((163'd1 << (top - 53)) - 1); end   // tie
        2: v = v & ~((163'd1 << (top - 60)) - 1);
        default: ;
      endcase
      st1  = ($urandom % 4) == 0;
      if ($urandom % 2) st1 = 1'b0;
      sign = $urandom % 2;
      mode = $urandom % 4;
      cin  = $urandom % 2;
      hs = 163'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      hc = v - hs - 163'(cin);
      hc[0] = 1'b0;
      hs = v - hc - 163'(cin);
      p = hs ^ hc;
      y = {hs[161:0] & hc[161:0], cin};
      #1ns;
      lsb  = v[161] ? 109 : 108;
      mant = 55'(v >> lsb);
      rb   = v[lsb-1];
      sb   = ((v << (163 - (lsb - 1))) != 0) || st1;
      case (mode)
        2'b11: inc = rb & (sb | mant[0]);
        2'b01: inc = !sign & (rb | sb);
        2'b10: inc = sign & (rb | sb);
        default: inc = 1'b0;
      endcase
      vr = 163'(mant + 55'(inc)) << lsb;
      if (rb && !sb && mode == 2'b11) nties++;
      e_hidden = 1'b1;
      if (vr[162]) begin e_adj = 2; e_frac = vr[161:110]; end
      else if (vr[161]) begin e_adj = 1; e_frac = vr[160:109]; end
      else begin e_adj = 0; e_frac = vr[159:108]; e_hidden = vr[160]; end
      if (vr[161] && !v[161]) ncarry++;
      e_inexact = rb | sb;
      e_tiny = v[162:160] == 0;
      checks++;
      if (frac !== e_frac || adj !== e_adj || hidden !== e_hidden || inexact !== e_inexact
          || tiny !== e_tiny) begin
        failures++;
        if (failures < 10)
          $display("FAIL v=%h st1=%b sign=%b mode=%0d got %h/%0d/%b/%b/%b exp %h/%0d/%b/%b/%b",
                   v, st1, sign, mode, frac, adj, hidden, inexact, tiny,
                   e_frac, e_adj, e_hidden, e_inexact, e_tiny);
      end
    end
    $display("ties %0d, carries into the next binade %0d", nties, ncarry);
    checks++;
    if (nties == 0 || ncarry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
