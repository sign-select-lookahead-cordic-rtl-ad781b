// ssl_qrd: pipelined QR decomposition of a complex N x N channel matrix H
// (default 4 x 4) for MIMO detection, built entirely from Sign-Select
// Lookahead CORDICs (SSL-CORDIC).
//
// H = Q R with Q unitary and R upper triangular with a real, non-negative
// diagonal. The pipeline computes R = Q^H H by a sequence of unitary row
// operations, one stage per clock cycle:
//   column k, stage 0:   every row r >= k is multiplied by exp(-j*arg h[r][k]),
//                        which turns column k real (phase stage);
//   column k, stage l>0: rows are paired as a binary tree and Givens-rotated,
//                        each pair zeroing its lower element (elimination).
// Each row operation is one SSL-CORDIC in vectoring mode on the element being
// reduced, with the rest of the row (or row pair) rotated by the shared sign
// bits. The number of stages, hence the latency in cycles, is
// sum_k (1 + ceil(log2(N-k))): 3, 6 and 9 for N = 2, 3 and 4.
//
// Interface: h_re/h_im[row][col] are W-bit signed integers, sampled together
// with in_valid; r_re/r_im hold R when out_valid is high, exactly STAGES
// cycles later. A new matrix may be presented every cycle. Elements below the
// diagonal and the imaginary parts of the diagonal are exact zeros.
// Reset is synchronous and active low. The CORDIC gain is compensated, so R
// has the scale of H; the column norms of H must stay below about
// 2^(W-1)/1.7 for the result to fit in W bits.
// The 2 x 2 data flow, the 12-iteration 4-step lookahead CORDIC and the cycle
// counts follow the design; word width, gain compensation and the tree order
// of eliminations for N > 2 are this implementation's choices.
module ssl_qrd
  import ssl_pkg::*;
#(
  parameter int N    = 4,
  parameter int W    = 16,
  parameter int ITER = 12,
  parameter int LA   = 4,
  parameter int G    = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] h_re  [N][N],
  input  logic signed [W-1:0] h_im  [N][N],
  output logic                out_valid,
  output logic signed [W-1:0] r_re  [N][N],
  output logic signed [W-1:0] r_im  [N][N]
);

  localparam int STAGES = num_stages(N);

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int          COL  = stage_col(N, s);
    localparam int          POS  = stage_pos(N, s);
    localparam stage_kind_e KIND = (POS == 0) ? ST_PHASE : ST_ELIM;
    localparam int          LVL  = (POS == 0) ? 0 : POS - 1;

    logic                v_in, v_out;
    logic signed [W-1:0] d_re  [N][N];
    logic signed [W-1:0] d_im  [N][N];
    logic signed [W-1:0] q_re  [N][N];
    logic signed [W-1:0] q_im  [N][N];

    if (s == 0) begin : g_src
      assign v_in = in_valid;
      assign d_re = h_re;
      assign d_im = h_im;
    end else begin : g_chain
      assign v_in = g_stage[s-1].v_out;
      assign d_re = g_stage[s-1].q_re;
      assign d_im = g_stage[s-1].q_im;
    end

    qr_stage #(
      .N(N), .W(W), .ITER(ITER), .LA(LA), .G(G),
      .KIND(KIND), .COL(COL), .LEVEL(LVL)
    ) u_stage (
      .clk, .rst_n,
      .in_valid(v_in), .in_re(d_re), .in_im(d_im),
      .out_valid(v_out), .out_re(q_re), .out_im(q_im)
    );
  end

  assign out_valid = g_stage[STAGES-1].v_out;
  assign r_re      = g_stage[STAGES-1].q_re;
  assign r_im      = g_stage[STAGES-1].q_im;

endmodule
