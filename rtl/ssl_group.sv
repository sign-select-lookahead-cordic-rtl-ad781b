// ssl_group: one sign-select lookahead step of the SSL-CORDIC, covering DEPTH
// consecutive iterations (4 in the main configuration, 3 in the smaller one).
//
// Vectoring mode drives the y component of the input vector (x_in, y_in)
// towards zero; the direction of each iteration is the MSB of the y value
// before it. Instead of running DEPTH dependent add steps:
//   * stage 1 is an ordinary iteration whose y result gives the second sign;
//   * stage j (2 <= j < DEPTH) computes all 2^j possible y_j values in
//     parallel from the group input, each with a carry-save tree, and a
//     2^j-to-1 multiplexer picks one with the signs found so far; its MSB is
//     the next sign;
//   * the last stage computes all 2^DEPTH possible (x, y) results and selects
//     one with all DEPTH signs.
// The same 2^DEPTH candidates are formed for each companion vector
// (rx_in, ry_in) and selected by the same signs, which rotates the companions
// by the angle the vectoring path removes (sign-bit sharing, no angle table).
// The structure follows the lookahead CORDIC figure of the design (1 stage
// iteration, 4/8/16 CSA candidates, 4/8/16-to-1 multiplexers) generalised to
// any DEPTH and any position in the iteration sequence; building stage 1 as a
// plain adder and the constant one's-complement correction are this design's
// choices.
//
// sgn[m] = 1 means iteration FIRST_ITER+m rotated in the + direction (its y
// input was negative). Purely combinational; DEPTH must be at least 2.
module ssl_group
  import ssl_pkg::*;
#(
  parameter  int IW         = 22,
  parameter  int DEPTH      = 4,
  parameter  int FIRST_ITER = 1,
  parameter  int NROT       = 1,
  localparam int NRA        = (NROT > 0) ? NROT : 1
) (
  input  logic signed [IW-1:0] x_in,
  input  logic signed [IW-1:0] y_in,
  input  logic signed [IW-1:0] rx_in  [NRA],
  input  logic signed [IW-1:0] ry_in  [NRA],
  output logic signed [IW-1:0] x_out,
  output logic signed [IW-1:0] y_out,
  output logic signed [IW-1:0] rx_out [NRA],
  output logic signed [IW-1:0] ry_out [NRA],
  output logic [DEPTH-1:0]     sgn
);

  if (DEPTH < 2) begin : g_bad_depth
    $error("ssl_group: DEPTH must be at least 2");
  end

  localparam int NC = 1 << DEPTH;
  localparam int SH0 = iter_shift(FIRST_ITER);

  // ---- stage 1: ordinary iteration, only y is needed for the next sign ----
  logic signed [IW-1:0] y1;
  assign sgn[0] = y_in[IW-1];
  if (SH0 < 0) begin : g_st1_90
    assign y1 = sgn[0] ? x_in : -x_in;
  end else begin : g_st1
    assign y1 = sgn[0] ? (y_in + (x_in >>> SH0)) : (y_in - (x_in >>> SH0));
  end
  assign sgn[1] = y1[IW-1];

  // ---- stages 2 .. DEPTH-1: y candidates and sign selection ----
  for (genvar j = 2; j < DEPTH; j++) begin : g_mid
    localparam int NCJ = 1 << j;
    logic signed [IW-1:0] ycand [NCJ];
    logic signed [IW-1:0] ysel;
    for (genvar c = 0; c < NCJ; c++) begin : g_c
      la_cand #(.IW(IW), .J(j), .FIRST_ITER(FIRST_ITER), .OUT_X(1'b0))
        u_y (.combo(j'(c)), .x0(x_in), .y0(y_in), .v(ycand[c]));
    end
    assign ysel   = ycand[sgn[j-1:0]];
    assign sgn[j] = ysel[IW-1];
  end

  // ---- final stage: full (x, y) candidates for the vector and companions ----
  logic signed [IW-1:0] xc [NC];
  logic signed [IW-1:0] yc [NC];
  for (genvar c = 0; c < NC; c++) begin : g_last
    la_cand #(.IW(IW), .J(DEPTH), .FIRST_ITER(FIRST_ITER), .OUT_X(1'b1))
      u_x (.combo(DEPTH'(c)), .x0(x_in), .y0(y_in), .v(xc[c]));
    la_cand #(.IW(IW), .J(DEPTH), .FIRST_ITER(FIRST_ITER), .OUT_X(1'b0))
      u_y (.combo(DEPTH'(c)), .x0(x_in), .y0(y_in), .v(yc[c]));
  end
  assign x_out = xc[sgn];
  assign y_out = yc[sgn];

  for (genvar r = 0; r < NRA; r++) begin : g_rot
    if (r < NROT) begin : g_on
      logic signed [IW-1:0] rxc [NC];
      logic signed [IW-1:0] ryc [NC];
      for (genvar c = 0; c < NC; c++) begin : g_c
        la_cand #(.IW(IW), .J(DEPTH), .FIRST_ITER(FIRST_ITER), .OUT_X(1'b1))
          u_x (.combo(DEPTH'(c)), .x0(rx_in[r]), .y0(ry_in[r]), .v(rxc[c]));
        la_cand #(.IW(IW), .J(DEPTH), .FIRST_ITER(FIRST_ITER), .OUT_X(1'b0))
          u_y (.combo(DEPTH'(c)), .x0(rx_in[r]), .y0(ry_in[r]), .v(ryc[c]));
      end
      assign rx_out[r] = rxc[sgn];
      assign ry_out[r] = ryc[sgn];
    end else begin : g_none
      // NROT = 0: the single placeholder lane carries nothing
      assign rx_out[r] = '0;
      assign ry_out[r] = '0;
    end
  end

endmodule
