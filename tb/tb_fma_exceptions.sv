// tb_fma_exceptions: checks result selection, packing and flags.
// Part 1: operands with NaN, infinity or a zero factor. The datapath inputs
// are random and must be ignored; result and flags must match the
// reference model of fma_ref_pkg (NaN propagation order A, B, C, quieting,
// invalid for signalling NaN, inf*0 and inf-inf, signed zeros).
// Part 2: finite operands with a nonzero product. The block must pack the
// datapath result: exponent e_no + adj (0 for a subnormal, i.e. adj = 0
// and hidden = 0), overflow to infinity or to the largest finite number by
// rounding mode, an exact zero signed by the mode, and
// underflow = tiny & inexact.
module tb_fma_exceptions;
  import fma_pkg::*;
  import fma_ref_pkg::*;
  logic [63:0] a = '0, b = '0, c = '0, e_w, rw;
  logic op = 1'b0, sw = 1'b0, hidden = 1'b0, inexact = 1'b0, tiny = 1'b0, away;
  logic [1:0] mode = 2'b00, adj = 2'b00;
  logic signed [13:0] e_no = '0;
  logic [51:0] frac = '0;
  logic [3:0] e_f, rf;
  fp64_t w;
  fp_flags_t flags;
  int checks = 0, failures = 0, e_fin, nspecial, ndata;

  fma_exceptions dut (.a(a), .b(b), .c(c), .op(op), .mode(rnd_mode_e'(mode)), .sw(sw),
                      .e_no(e_no), .adj(adj), .frac(frac), .hidden(hidden),
                      .inexact(inexact), .tiny(tiny), .w(w), .flags(flags));

  initial begin
    #10ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic logic [63:0] opnd(bit allow_special);
    logic [63:0] x = {$urandom, $urandom};
    if (x[62:52] == 11'h7FF) x[62] = 1'b0;
    if (allow_special)
      case ($urandom % 6)
        0: x = {x[63], 63'h0};
        1: x = {x[63], 11'h7FF, 52'h0};
        2: x = {x[63], 11'h7FF, 1'b1, x[50:0]};
        3: x = {x[63], 11'h7FF, 1'b0, x[50:1], 1'b1};
        default: ;
      endcase
    else if (x[62:0] == 0) x[0] = 1'b1;
    return x;
  endfunction

  task automatic randomize_datapath();
    op = $urandom % 2; mode = $urandom % 4; sw = $urandom % 2;
    e_no = 14'($urandom % 2100) - 14'sd20;
    adj = $urandom % 3; hidden = $urandom % 2; inexact = $urandom % 2; tiny = $urandom % 2;
    frac = ($urandom % 4 == 0) ? '0 : 52'({$urandom, $urandom});
  endtask

  task automatic compare();
    checks++;
    if (w !== e_w || flags !== e_f) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h c=%h op=%b mode=%0d e_no=%0d adj=%0d got %h/%b exp %h/%b",
                                  a, b, c, op, mode, e_no, adj, w, flags, e_w, e_f);
    end
  endtask

  initial begin
    nspecial = 0; ndata = 0;
    for (int i = 0; i < 20000; i++) begin
      randomize_datapath();
      if (i % 2 == 0) begin
        a = opnd(1); b = opnd(1); c = opnd(1);
        if (!(is_nan(a) || is_nan(b) || is_nan(c) || is_inf(a) || is_inf(b) || is_inf(c)
              || is_zero(b) || is_zero(c))) b = {b[63], 63'h0};
        #1ns;
        fma_ref(a, b, c, op, mode, e_w, e_f);
        nspecial++;
        compare();
      end else begin
        a = opnd(0); b = opnd(0); c = opnd(0);
        if ($urandom % 4 == 0) a = {a[63], 63'h0};
        #1ns;
        away = (mode == 2'b11) || (mode == 2'b01 && !sw) || (mode == 2'b10 && sw);
        e_fin = int'(e_no) + int'(adj);
        e_f = {1'b0, 1'b0, tiny & inexact, inexact};
        if (adj == 0 && !hidden && frac == 0)
          e_w = {inexact ? sw : (mode == 2'b10), 63'h0};
        else if (e_fin >= 2047) begin
          e_f[2] = 1'b1; e_f[0] = 1'b1;
          e_w = away ? {sw, 11'h7FF, 52'h0} : {sw, 11'h7FE, {52{1'b1}}};
        end else
          e_w = {sw, (adj == 0 && !hidden) ? 11'h0 : 11'(e_fin), frac};
        ndata++;
        compare();
      end
    end
    $display("special %0d, datapath %0d", nspecial, ndata);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
