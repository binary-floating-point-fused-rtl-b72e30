// csa_tree: reduces N words to two (sum and carry) with levels of 3:2
// carry-save adders.  At each level the rows are taken three at a time; the
// rows left over pass to the next level unchanged.  For 27 partial products
// the row count goes 27-18-12-8-6-4-3-2 (seven CSA levels).
// Result: sum + carry == sum of all inputs (mod 2^W).  Combinational.
module csa_tree #(
  parameter int unsigned N = 27,
  parameter int unsigned W = 108
) (
  input  logic [W-1:0] in [N],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  function automatic int unsigned rows_at(int unsigned lvl);
    int unsigned n = N;
    for (int unsigned i = 0; i < lvl; i++) n = n - n / 3;
    return n;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned n = N, l = 0;
    while (n > 2) begin
      n = n - n / 3;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned NL = num_levels();

  // Each level keeps its own row array (a single array for all levels would
  // look like a combinational loop to a simulator that schedules whole
  // variables).
  for (genvar l = 0; l < NL; l++) begin : g_lvl
    localparam int unsigned NIN  = rows_at(l);
    localparam int unsigned NG   = NIN / 3;
    localparam int unsigned NOUT = NIN - NG;
    logic [W-1:0] cur [NIN];
    logic [W-1:0] nxt [NOUT];
    if (l == 0) begin : g_src
      for (genvar r = 0; r < NIN; r++) begin : g_r
        assign cur[r] = in[r];
      end
    end else begin : g_src
      for (genvar r = 0; r < NIN; r++) begin : g_r
        assign cur[r] = g_lvl[l-1].nxt[r];
      end
    end
    for (genvar k = 0; k < NG; k++) begin : g_csa
      csa_row #(.W(W)) u_csa (
        .a(cur[3*k]), .b(cur[3*k+1]), .c(cur[3*k+2]),
        .sum(nxt[2*k]), .carry(nxt[2*k+1])
      );
    end
    for (genvar r = 3*NG; r < NIN; r++) begin : g_pass
      assign nxt[2*NG + r - 3*NG] = cur[r];
    end
  end

  assign sum   = g_lvl[NL-1].nxt[0];
  assign carry = g_lvl[NL-1].nxt[1];
endmodule
