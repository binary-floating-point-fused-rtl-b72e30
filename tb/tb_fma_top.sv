// tb_fma_top: end-to-end self-checking testbench of the fused multiply-add
// unit at its default parameters. It doubles as the full-size testbench.
// Each vector's result and flags are compared bit-exactly with the
// wide-integer reference model of fma_ref_pkg. The stimulus mixes
// categories: random bit patterns, close exponents, near-total
// cancellation, tiny and subnormal results, overflow, special values, and
// exact rounding ties. Internal nodes of the unit are probed to count how
// often each datapath mechanism was exercised. Four published example
// vectors (one per rounding mode) are also checked against their stated results. A mechanism that never
// occurs fails the test, because then its checks prove nothing.
// The unit is combinational, so each vector is applied, settled for 1 ns,
// and checked.
module tb_fma_top;
  import fma_ref_pkg::*;

  localparam int NVEC = 40000;

  logic [63:0] a = '0, b = '0, c = '0, w, w_ref;
  logic        op = 1'b0;
  logic [1:0]  rnd_mode = 2'b00;
  logic [3:0]  f_ref;
  fma_pkg::fp_flags_t flags;
  int checks = 0, failures = 0;

  fma_top dut (.a(a), .b(b), .c(c), .op(op), .rnd_mode(rnd_mode), .w(w), .flags(flags));

  // mechanism counters
  typedef enum int {
    M_COMP, M_NOCOMP, M_PRE, M_FAR, M_ADJ0, M_ADJ1, M_RCARRY, M_LIMIT, M_ST1,
    M_TIE, M_ROUNDUP, M_RZ, M_RP, M_RM, M_RN, M_OVF, M_UNF, M_INV, M_NAN,
    M_ZERO_CANCEL, M_SUBNORMAL, M_EQEXP, M_OPNEG, M_NMECH
  } mech_e;
  int mech [M_NMECH];
  string mname [M_NMECH] = '{"complement", "no_complement", "pre_shift", "far_addend",
    "lza_adj0", "lza_adj1", "round_carry_out", "subnormal_limit", "addend_sticky",
    "rn_tie_lsb_fix", "round_increment", "mode_rz", "mode_rp", "mode_rm", "mode_rn",
    "overflow", "underflow", "invalid", "nan_propagation", "exact_cancellation",
    "subnormal_result", "equal_exp_compare", "op_negate"};

  initial begin
    #200ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  function automatic logic [63:0] mk(logic s, int e, logic [51:0] f);
    if (e < 0) e = 0;
    if (e > 2047) e = 2047;
    return {s, 11'(e), f};
  endfunction

  function automatic logic [51:0] rfrac();
    logic [51:0] f = {$urandom, $urandom};
    case ($urandom % 6)
      0: f = '0;
      1: f = '1;
      2: f = f & ~52'((64'h1 << ($urandom % 52)) - 1);
      default: ;
    endcase
    return f;
  endfunction

  function automatic logic [63:0] special();
    case ($urandom % 12)
      0: return 64'h0;
      1: return 64'h8000_0000_0000_0000;
      2: return 64'h7FF0_0000_0000_0000;
      3: return 64'hFFF0_0000_0000_0000;
      4: return 64'h7FF8_0000_0000_0001 | {$urandom % 2, 63'h0};
      5: return 64'h7FF0_0000_0000_0001 | 64'({$urandom} << 8);
      6: return {$urandom % 2 == 1, 11'h0, rfrac()};
      7: return 64'h0010_0000_0000_0000 | {$urandom % 2, 63'h0};
      8: return 64'h7FEF_FFFF_FFFF_FFFF | {$urandom % 2, 63'h0};
      9: return 64'h3FF0_0000_0000_0000 | {$urandom % 2, 63'h0};
      default: return {$urandom, $urandom};
    endcase
  endfunction

  task automatic gen(int cat);
    int eb, ec, ea, ep;
    logic [3:0] fdummy;
    logic [63:0] prod;
    op = $urandom % 2;
    rnd_mode = $urandom % 4;
    case (cat)
      0: begin a = {$urandom, $urandom}; b = {$urandom, $urandom}; c = {$urandom, $urandom}; end
      1: begin   // close exponents
        eb = 900 + $urandom % 250; ec = 900 + $urandom % 250;
        ea = eb + ec - 1023 + int'($urandom % 241) - 120;
        a = mk($urandom % 2, ea, rfrac()); b = mk($urandom % 2, eb, rfrac());
        c = mk($urandom % 2, ec, rfrac());
      end
      2: begin   // addend nearly cancels the product
        eb = 700 + $urandom % 650; ec = 700 + $urandom % 650;
        b = mk($urandom % 2, eb, rfrac()); c = mk($urandom % 2, ec, rfrac());
        fma_ref(64'h0, b, c, op, 2'($urandom % 4), prod, fdummy);
        a = prod ^ 64'h8000_0000_0000_0000;
        case ($urandom % 4)
          0: ;
          1: a = a + 64'($urandom % 8);
          2: a = a - 64'($urandom % 8);
          default: a = a ^ 64'($urandom % 1024);
        endcase
      end
      3: begin   // results near or below the normal range
        eb = 1 + $urandom % 1023; ep = -1100 + int'($urandom % 140);
        ec = ep - eb + 1023;
        if (ec < 0) begin ec = 0; end
        b = mk($urandom % 2, eb, rfrac()); c = mk($urandom % 2, ec, rfrac());
        ea = ($urandom % 2) ? 0 : int'($urandom % 60);
        a = mk($urandom % 2, ea, rfrac());
        if ($urandom % 4 == 0) a = {$urandom % 2 == 1, 63'h0};
      end
      4: begin   // results near the overflow threshold
        eb = 1024 + $urandom % 1023; ep = 2030 + int'($urandom % 30);
        ec = ep - eb + 1023;
        b = mk($urandom % 2, eb, rfrac()); c = mk($urandom % 2, ec, rfrac());
        ea = 2030 + $urandom % 17;
        a = mk($urandom % 2, ea, rfrac());
      end
      5: begin a = special(); b = special(); c = special(); end
      6: begin   // exact ties and near ties of the rounding position
        eb = 1023 + int'($urandom % 5) - 2; ec = 600 + $urandom % 800;
        b = mk(1'b0, eb, '0); c = mk($urandom % 2, ec, rfrac());
        ep = eb + ec - 1023 - 53 + int'($urandom % 3) - 1;
        a = mk($urandom % 2, ep, ($urandom % 2) ? 52'h0 : {51'h0, 1'b1} << ($urandom % 52));
      end
      8: begin   // all-ones addend plus a small product: rounding carries out
        ea = 200 + $urandom % 1600; eb = 1023 + int'($urandom % 11) - 5;
        ec = ea - eb + 1023 - 50 - int'($urandom % 12);
        a = mk($urandom % 2, ea, '1);
        b = mk($urandom % 2, eb, rfrac()); c = mk(a[63] ^ b[63] ^ op, ec, rfrac());
      end
      default: begin   // full-range random finite operands
        a = mk($urandom % 2, $urandom % 2047, rfrac());
        b = mk($urandom % 2, $urandom % 2047, rfrac());
        c = mk($urandom % 2, $urandom % 2047, rfrac());
      end
    endcase
  endtask

  task automatic check(string tag);
    logic datapath;
    #1ns;
    fma_ref(a, b, c, op, rnd_mode, w_ref, f_ref);
    checks++;
    if (w !== w_ref || flags !== f_ref) begin
      failures++;
      if (failures <= 20)
        $display("FAIL %s a=%h b=%h c=%h op=%0d rm=%0d got %h/%b exp %h/%b", tag,
                 a, b, c, op, rnd_mode, w, flags, w_ref, f_ref);
    end
    datapath = !is_nan(a) && !is_nan(b) && !is_nan(c) && !is_inf(a) && !is_inf(b)
            && !is_inf(c) && !is_zero(b) && !is_zero(c);
    if (datapath) begin
      mech[dut.comp ? M_COMP : M_NOCOMP]++;
      if (dut.pre) mech[M_PRE]++; else mech[M_FAR]++;
      if (dut.adj == 0 && dut.hidden) mech[M_ADJ0]++;
      if (dut.adj == 1) mech[M_ADJ1]++;
      if (dut.u_ar.inc && dut.frac == 0 && dut.inexact) mech[M_RCARRY]++;
      if (dut.lim_en && dut.adj == 0 && !dut.hidden && w[62:52] == 0 && w[51:0] != 0)
        mech[M_LIMIT]++;
      if (dut.st1) mech[M_ST1]++;
      if (dut.u_ar.tie && rnd_mode == 2'b11) mech[M_TIE]++;
      if (dut.u_ar.inc) mech[M_ROUNDUP]++;
      if (f_ref[0]) mech[M_RZ + int'(rnd_mode)]++;
      if (w[62:0] == 0 && !is_zero(a) && !f_ref[0]) mech[M_ZERO_CANCEL]++;
      if (w[62:52] == 0 && w[51:0] != 0) mech[M_SUBNORMAL]++;
      if (dut.eq_exp && dut.comp) mech[M_EQEXP]++;
      if (op) mech[M_OPNEG]++;
    end
    if (f_ref[2]) mech[M_OVF]++;
    if (f_ref[1]) mech[M_UNF]++;
    if (f_ref[3]) mech[M_INV]++;
    if (is_nan(a) || is_nan(b) || is_nan(c)) mech[M_NAN]++;
  endtask

  // published example vectors: B, C, A, mode, expected W and flags
  // {invalid, overflow, underflow, inexact}
  task automatic published(logic [63:0] pb, pc_, pa, logic [1:0] rm, logic [63:0] ew,
                           logic [3:0] ef);
    a = pa; b = pb; c = pc_; op = 1'b0; rnd_mode = rm;
    check("published");
    checks++;
    if (w !== ew || flags !== ef) begin
      failures++;
      $display("FAIL published vector: got %h/%b expected %h/%b", w, flags, ew, ef);
    end
  endtask

  initial begin
    foreach (mech[i]) mech[i] = 0;
    published(64'hC44722533BBD52C9, 64'h00C7E4456C3BA9E7, 64'h04C0EECCFEFA972A, 2'b11,
              64'h852101F7604041E9, 4'b0001);
    published(64'h8601FB6F60C50CF5, 64'hB46D1769D2CE4A5A, 64'h8000000000000000, 2'b00,
              64'h0000000000000000, 4'b0011);
    published(64'h63422049A8BCB6B9, 64'h5DB011030A85CFD8, 64'hFE62B5DAF250D6A3, 2'b01,
              64'h7FF0000000000000, 4'b0101);
    published(64'hFFF0000000000000, 64'hC22200EFAD00230B, 64'hFFF0000000000000, 2'b10,
              64'hFFF8000000000000, 4'b1000);
    // directed: 1*1+1, 2*3-6 (exact zero), 1+2^-53 tie, max*2 overflow,
    // min_normal*0.5 (subnormal), inf*0
    a = 64'h3FF0_0000_0000_0000; b = a; c = a; op = 0; rnd_mode = 2'b11; check("d1");
    a = 64'h4018_0000_0000_0000; b = 64'h4000_0000_0000_0000; c = 64'h4008_0000_0000_0000;
    op = 1; check("d2");
    rnd_mode = 2'b10; check("d2rm");
    a = 64'h3FF0_0000_0000_0000; b = 64'h3CA0_0000_0000_0000; c = a; op = 0;
    rnd_mode = 2'b11; check("d3");
    a = 64'h0; b = 64'h7FEF_FFFF_FFFF_FFFF; c = 64'h4000_0000_0000_0000; check("d4");
    rnd_mode = 2'b00; check("d4rz");
    a = 64'h0; b = 64'h0010_0000_0000_0000; c = 64'h3FE0_0000_0000_0000; check("d5");
    a = 64'h0; b = 64'h7FF0_0000_0000_0000; c = 64'h0; check("d6");
    for (int i = 0; i < NVEC; i++) begin
      gen(i % 9);
      check($sformatf("r%0d", i));
    end
    $display("mechanism counts:");
    foreach (mech[i]) begin
      $display("  %-20s %0d", mname[i], mech[i]);
      checks++;
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never exercised", mname[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
