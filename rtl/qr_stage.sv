// qr_stage: one clock cycle of the QR decomposition pipeline, a column of
// SSL-CORDICs working in parallel on the rows of the matrix, followed by the
// pipeline register.
//
// The matrix arrives as real and imaginary parts, in_re[row][col] and
// in_im[row][col]. Two kinds of stage exist (KIND):
//   ST_PHASE  for every row r >= COL, multiply the row by exp(-j*arg(a[r][COL])):
//             one SSL-CORDIC vectors (re, im) of a[r][COL] to its magnitude
//             and rotates (re, im) of every a[r][j], j > COL, with the same
//             signs. Column COL then holds real, non-negative values.
//   ST_ELIM   Givens rotation of row pairs (t, t + 2^LEVEL) with
//             t - COL a multiple of 2^(LEVEL+1): one SSL-CORDIC vectors the
//             two real column-COL values, leaving the magnitude in row t and
//             a zero in the partner row, and rotates the pairs
//             (re a[t][j], re a[p][j]) and (im a[t][j], im a[p][j]) for j > COL.
// Rows not involved pass unchanged; values that are zero by construction
// (the imaginary part of a vectored element, the eliminated element) are
// written as exact zeros.
//
// Timing: the CORDICs are combinational; out_* and out_valid are registered,
// so a stage adds one cycle of latency and accepts a new matrix every cycle.
// Data registers load only when in_valid is high. Reset (rst_n low,
// synchronous) clears out_valid and the data registers.
// The two operations and their CORDIC mapping follow the design's 2x2
// architecture; the pairwise-tree order of eliminations for larger matrices
// and the register placement are this implementation's choices.
module qr_stage
  import ssl_pkg::*;
#(
  parameter int          N     = 4,
  parameter int          W     = 16,
  parameter int          ITER  = 12,
  parameter int          LA    = 4,
  parameter int          G     = 4,
  parameter stage_kind_e KIND  = ST_PHASE,
  parameter int          COL   = 0,
  parameter int          LEVEL = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re  [N][N],
  input  logic signed [W-1:0] in_im  [N][N],
  output logic                out_valid,
  output logic signed [W-1:0] out_re [N][N],
  output logic signed [W-1:0] out_im [N][N]
);

  localparam int STRIDE = 1 << LEVEL;
  localparam int NJ     = N - 1 - COL;      // elements right of the column

  // role of a row in this stage
  function automatic int role(input int r);
    if (r < COL) return 0;                                  // pass
    if (KIND == ST_PHASE) return 1;                         // phase removal
    if (((r - COL) % (2 * STRIDE)) == 0 && (r + STRIDE) < N) return 2;  // pair top
    if (((r - COL) % (2 * STRIDE)) == STRIDE) return 3;     // pair bottom
    return 0;
  endfunction

  logic signed [W-1:0] nxt_re [N][N];
  logic signed [W-1:0] nxt_im [N][N];

  for (genvar r = 0; r < N; r++) begin : g_row
    localparam int ROLE = role(r);
    logic signed [W-1:0] nre [N];
    logic signed [W-1:0] nim [N];

    if (ROLE == 1) begin : g_phase
      localparam int NR  = NJ;
      localparam int NRA = (NR > 0) ? NR : 1;
      logic signed [W-1:0] cx [NRA];
      logic signed [W-1:0] cy [NRA];
      logic signed [W-1:0] ox [NRA];
      logic signed [W-1:0] oy [NRA];
      logic signed [W-1:0] mag;
      logic [ITER-1:0]     sig;
      for (genvar i = 0; i < NRA; i++) begin : g_c
        if (i < NR) begin : g_on
          assign cx[i] = in_re[r][COL+1+i];
          assign cy[i] = in_im[r][COL+1+i];
        end else begin : g_off
          assign cx[i] = '0;
          assign cy[i] = '0;
        end
      end
      ssl_cordic #(.W(W), .ITER(ITER), .LA(LA), .NROT(NR), .G(G)) u_cordic (
        .x_in(in_re[r][COL]), .y_in(in_im[r][COL]),
        .rx_in(cx), .ry_in(cy),
        .mag(mag), .rx_out(ox), .ry_out(oy), .sigma(sig)
      );
      for (genvar c = 0; c < N; c++) begin : g_col
        if (c < COL) begin : g_l
          assign nre[c] = in_re[r][c];
          assign nim[c] = in_im[r][c];
        end else if (c == COL) begin : g_d
          assign nre[c] = mag;
          assign nim[c] = '0;
        end else begin : g_rt
          assign nre[c] = ox[c-COL-1];
          assign nim[c] = oy[c-COL-1];
        end
      end

    end else if (ROLE == 2) begin : g_top
      localparam int P   = r + STRIDE;
      localparam int NR  = 2 * NJ;
      localparam int NRA = (NR > 0) ? NR : 1;
      logic signed [W-1:0] cx [NRA];
      logic signed [W-1:0] cy [NRA];
      logic signed [W-1:0] ox [NRA];
      logic signed [W-1:0] oy [NRA];
      logic signed [W-1:0] mag;
      logic [ITER-1:0]     sig;
      logic signed [W-1:0] bre [N];     // next values of the partner row
      logic signed [W-1:0] bim [N];
      for (genvar i = 0; i < NRA; i++) begin : g_c
        if (i < NR) begin : g_on
          localparam int CJ = COL + 1 + i / 2;
          if (i % 2 == 0) begin : g_re
            assign cx[i] = in_re[r][CJ];
            assign cy[i] = in_re[P][CJ];
          end else begin : g_im
            assign cx[i] = in_im[r][CJ];
            assign cy[i] = in_im[P][CJ];
          end
        end else begin : g_off
          assign cx[i] = '0;
          assign cy[i] = '0;
        end
      end
      ssl_cordic #(.W(W), .ITER(ITER), .LA(LA), .NROT(NR), .G(G)) u_cordic (
        .x_in(in_re[r][COL]), .y_in(in_re[P][COL]),
        .rx_in(cx), .ry_in(cy),
        .mag(mag), .rx_out(ox), .ry_out(oy), .sigma(sig)
      );
      for (genvar c = 0; c < N; c++) begin : g_col
        if (c < COL) begin : g_l
          assign nre[c] = in_re[r][c];
          assign nim[c] = in_im[r][c];
          assign bre[c] = in_re[P][c];
          assign bim[c] = in_im[P][c];
        end else if (c == COL) begin : g_d
          assign nre[c] = mag;
          assign nim[c] = '0;
          assign bre[c] = '0;
          assign bim[c] = '0;
        end else begin : g_rt
          assign nre[c] = ox[2*(c-COL-1)];
          assign nim[c] = ox[2*(c-COL-1)+1];
          assign bre[c] = oy[2*(c-COL-1)];
          assign bim[c] = oy[2*(c-COL-1)+1];
        end
      end

    end else if (ROLE == 3) begin : g_bot
      assign nre = g_row[r-STRIDE].g_top.bre;
      assign nim = g_row[r-STRIDE].g_top.bim;

    end else begin : g_pass
      assign nre = in_re[r];
      assign nim = in_im[r];
    end
    assign nxt_re[r] = nre;
    assign nxt_im[r] = nim;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int r = 0; r < N; r++) begin
        for (int c = 0; c < N; c++) begin
          out_re[r][c] <= '0;
          out_im[r][c] <= '0;
        end
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_re <= nxt_re;
        out_im <= nxt_im;
      end
    end
  end

endmodule
