// tb_basic_rounder: random check of the basic unit's rounder in all four
// rounding modes and both signs.  Stimulus: normalized values (leading one
// at 161, sometimes 162), subnormal-range values (leading one at or below
// 160), all-ones significands (rounding carry-out) and exact ties.
// Reference: the value is split into the kept part and the remainder; the
// remainder is compared with half a unit (the addend sticky counts as a
// tiny extra amount) to decide the increment; a kept part that grows by
// one position is renormalized.
module tb_basic_rounder;
  import fma_pkg::*;
  logic [FW-1:0] n = '0, rem, half;
  logic st1 = 1'b0, sign = 1'b0;
  rnd_mode_e mode = RND_RZ;
  logic [FRW-1:0] frac;
  logic [1:0] adj;
  logic hidden, inexact, tiny;
  int checks = 0, failures = 0, n_carry = 0, n_tie = 0;

  basic_rounder dut (.n(n), .st1(st1), .mode(mode), .sign(sign), .frac(frac), .adj(adj),
                     .hidden(hidden), .inexact(inexact), .tiny(tiny));

  initial begin
    #10ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int pos, lsb, kind;
    logic [MW:0] kept;
    logic gt, eq, nz, up, e_inx, e_hid, e_tiny;
    logic [1:0] e_adj;
    logic [FRW-1:0] e_frac;
    for (int i = 0; i < 40000; i++) begin
      for (int k = 0; k < FW; k += 32) n[k +: 32] = $urandom;
      kind = $urandom % 8;
      case (kind)
        0: n = n >> 1;                                     // leading one at 162
        1, 2: n = n >> (3 + $urandom % 60);               // subnormal range
        3: begin n = n >> 2; n[161 -: MW] = '1; end       // all-ones significand
        4: begin n = n >> 2; n[161] = 1'b1; n[108] = 1'b1; n[107:0] = '0; end  // exact tie
        default: begin n = n >> 2; n[161] = 1'b1; end
      endcase
      st1  = ($urandom % 4) == 0;
      sign = $urandom % 2;
      mode = rnd_mode_e'($urandom % 4);
      #1ns;
      pos  = n[162] ? 2 : (n[161] ? 1 : 0);
      lsb  = 108 + pos;
      kept = (MW+1)'(n >> lsb);
      rem  = n & ((FW'(1) << lsb) - 1);
      half = FW'(1) << (lsb - 1);
      gt = (rem > half) || (rem == half && st1);
      eq = (rem == half) && !st1;
      nz = (rem != 0) || st1;
      case (mode)
        RND_RN: up = gt || (eq && kept[0]);
        RND_RP: up = !sign && nz;
        RND_RM: up = sign && nz;
        default: up = 1'b0;
      endcase
      kept = kept + (MW+1)'(up);
      if (kept[MW]) begin
        e_adj = 2'(pos + 1); e_frac = '0; e_hid = 1'b1;
      end else begin
        e_adj = 2'(pos); e_frac = kept[FRW-1:0]; e_hid = kept[FRW];
      end
      e_inx  = nz;
      e_tiny = (n >> 160) == 0;
      checks++;
      if (frac !== e_frac || adj !== e_adj || hidden !== e_hid || inexact !== e_inx
          || tiny !== e_tiny) begin
        failures++;
        if (failures <= 10)
          $display("FAIL n=%h st1=%b mode=%0d sign=%b got %h/%0d/%b/%b exp %h/%0d/%b/%b",
                   n, st1, mode, sign, frac, adj, hidden, inexact, e_frac, e_adj, e_hid, e_inx);
      end
      if (kept[MW]) n_carry++;
      if (eq && mode == RND_RN) n_tie++;
    end
    checks += 2;
    if (n_carry == 0) begin failures++; $display("FAIL no rounding carry-out"); end
    if (n_tie == 0)   begin failures++; $display("FAIL no exact tie"); end
    $display("carry-outs %0d, ties %0d", n_carry, n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
