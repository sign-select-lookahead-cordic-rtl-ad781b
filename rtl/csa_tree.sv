// csa_tree: multi-operand adder built from carry-save (3:2) compressors and a
// single carry-propagate adder at the end.
//
// The SSL-CORDIC forms every lookahead candidate as a sum of several shifted
// copies of the group inputs; this block adds them with only one carry
// propagation, which is what keeps a 4-iteration lookahead step about as fast
// as one ordinary iteration. Each level groups its operands in threes and
// turns every group into a sum word and a carry word; leftover operands pass
// to the next level unchanged. Levels repeat until two words are left, which
// the final adder sums. The number of operands on each level is fixed at
// elaboration (n -> 2*floor(n/3) + n mod 3).
//
// Interface: NOPS operands of W bits in, their sum modulo 2^W out. Purely
// combinational. The compressor tree itself is this design's choice; the
// architecture only asks for carry-save addition of the candidate terms.
module csa_tree #(
  parameter int W    = 16,
  parameter int NOPS = 4
) (
  input  logic [W-1:0] ops [NOPS],
  output logic [W-1:0] sum
);

  // operands left after l compressor levels
  function automatic int n_at(input int l);
    int n;
    n = NOPS;
    for (int i = 0; i < l; i++) if (n > 2) n = 2 * (n / 3) + n % 3;
    return n;
  endfunction

  function automatic int num_levels();
    int l;
    l = 0;
    while (n_at(l) > 2) l++;
    return l;
  endfunction

  localparam int NL = num_levels();

  for (genvar l = 0; l <= NL; l++) begin : g_lvl
    localparam int N = n_at(l);
    logic [W-1:0] v [N];
    if (l == 0) begin : g_src
      for (genvar i = 0; i < N; i++) begin : g_i
        assign v[i] = ops[i];
      end
    end else begin : g_cmp
      localparam int NP   = n_at(l - 1);
      localparam int NG   = NP / 3;
      localparam int NREM = NP - 3 * NG;
      for (genvar g = 0; g < NG; g++) begin : g_fa
        logic [W-1:0] a, b, c;
        assign a = g_lvl[l-1].v[3*g];
        assign b = g_lvl[l-1].v[3*g+1];
        assign c = g_lvl[l-1].v[3*g+2];
        assign v[2*g]   = a ^ b ^ c;
        assign v[2*g+1] = ((a & b) | (a & c) | (b & c)) << 1;
      end
      for (genvar r = 0; r < NREM; r++) begin : g_pass
        assign v[2*NG+r] = g_lvl[l-1].v[3*NG+r];
      end
    end
  end

  if (n_at(NL) == 1) begin : g_one
    assign sum = g_lvl[NL].v[0];
  end else begin : g_cpa
    assign sum = g_lvl[NL].v[0] + g_lvl[NL].v[1];
  end

endmodule
