// la_cand: one lookahead candidate of the SSL-CORDIC, i.e. the x or y
// component a vector would have after J micro-rotations under one assumed
// sign pattern.
//
// The product of J CORDIC micro-rotations (I + s_m 2^-k_m Jr), with Jr the
// 90 degree rotation matrix, expands into one term per subset S of the
// iterations: the product of the signs and shifts in S, times Jr^|S|.
// Even subsets contribute to the diagonal (x from x0, y from y0), odd subsets
// to the off-diagonal (x from -y0, y from x0), and Jr^2 = -I flips the sign of
// every second order. When the group holds the first (90 degree) iteration,
// that iteration has no identity part, so only subsets containing it appear.
// Every term is therefore a constant shift of x0 or y0, added or subtracted:
// subtracted terms are formed as one's complements, and the missing +1 of each
// is collected into one constant operand. All terms go to one carry-save tree.
// Terms shifted past the word width are dropped.
//
// The sign pattern is an input (combo, bit m set = iteration m of the group
// rotates in the + direction, i.e. its y input was negative); the lookahead
// step ties it to a constant, one value per candidate, so after constant
// propagation every term sign is fixed wiring. One module thus serves all
// 2^J candidates. Parameters: IW word width, J number of iterations covered,
// FIRST_ITER the global index of the group's first iteration, OUT_X selects
// the x (1) or y (0) component. Purely combinational.
module la_cand
  import ssl_pkg::*;
#(
  parameter int IW         = 22,
  parameter int J          = 2,
  parameter int FIRST_ITER = 1,
  parameter bit OUT_X      = 1'b0
) (
  input  logic [J-1:0]         combo,
  input  logic signed [IW-1:0] x0,
  input  logic signed [IW-1:0] y0,
  output logic signed [IW-1:0] v
);

  localparam int NSUB = 1 << J;

  // Shift of group-local iteration m (0 for the 90 degree step).
  function automatic int sh_of(input int m);
    int s;
    s = iter_shift(FIRST_ITER + m);
    return (s < 0) ? 0 : s;
  endfunction

  function automatic int popc(input int s);
    int n;
    n = 0;
    for (int m = 0; m < J; m++) if (s[m]) n++;
    return n;
  endfunction

  function automatic int sub_shift(input int s);
    int t;
    t = 0;
    for (int m = 0; m < J; m++) if (s[m]) t += sh_of(m);
    return t;
  endfunction

  // Term of subset s is present: the 90 degree step has no identity part,
  // and terms shifted past the word width are dropped.
  function automatic bit sub_used(input int s);
    return ((FIRST_ITER != 1) || (s % 2 == 1)) && (sub_shift(s) < IW);
  endfunction

  // Sign of the term of subset s when all its iterations rotate in the
  // + direction: Jr^|S| sign, and -y0 feeding x for odd subsets.
  function automatic bit base_neg(input int s);
    int n;
    n = popc(s);
    return (((n / 2) % 2) == 1) ^ (OUT_X && (n % 2 == 1));
  endfunction

  logic [IW-1:0] ops [NSUB+1];
  logic [NSUB-1:0] neg;

  for (genvar s = 0; s < NSUB; s++) begin : g_term
    localparam bit USED = sub_used(s);
    localparam int SH   = sub_shift(s);
    localparam bit BNEG = base_neg(s);
    // even subsets feed x from x0 and y from y0; odd ones cross over
    localparam bit SRCX = ((popc(s) % 2) == 0) ? OUT_X : !OUT_X;
    localparam logic [J-1:0] MASK = J'(s);
    if (USED) begin : g_on
      logic signed [IW-1:0] t;
      // every iteration of the subset that rotates in the - direction
      // flips the sign of the term
      assign neg[s] = BNEG ^ (^(MASK & ~combo));
      assign t      = (SRCX ? x0 : y0) >>> SH;
      assign ops[s] = neg[s] ? ~t : t;
    end else begin : g_off
      assign neg[s] = 1'b0;
      assign ops[s] = '0;
    end
  end

  // +1 for every one's-complemented term
  always_comb begin
    ops[NSUB] = '0;
    for (int s = 0; s < NSUB; s++) ops[NSUB] += IW'(neg[s]);
  end

  csa_tree #(.W(IW), .NOPS(NSUB + 1)) u_csa (.ops(ops), .sum(v));

endmodule
