// ssl_cordic: complete Sign-Select Lookahead CORDIC, ITER iterations (12 by
// default) built from ceil(ITER/LA) cascaded lookahead groups of LA
// iterations (4 by default).
//
// The vector (x_in, y_in) is rotated onto the positive x axis (vectoring
// mode); mag is its length. Each companion vector (rx_in[r], ry_in[r]) is
// rotated by the same angle, using the sign bits of the vectoring path, so it
// comes out as (rx*c + ry*s, -rx*s + ry*c) with c, s the cosine and sine of
// atan2(y_in, x_in) (rotation mode with shared signs, no angle table). The
// sign bits themselves are output as sigma, which encodes the angle:
// atan2(y_in, x_in) = sum_i -(2*sigma[i-1]-1) * a_i, a_1 = 90 degrees,
// a_i = atan(2^(2-i)).
//
// Inputs are W-bit two's-complement integers. Internally two guard bits on the
// top and G fraction bits at the bottom are added. The CORDIC gain K of the
// shift-add iterations is removed at the end by a constant multiplication
// with 1/K (16 fraction bits), followed by rounding and saturation to W
// bits. The iteration recurrence, the group structure and the default sizes
// follow the design; word widths, guard bits, gain compensation and
// saturation are this implementation's choices. For the results to be
// meaningful |x|, |y| of every input vector should stay below about
// 2^(W-1)/1.7 so that the compensated output fits.
//
// Purely combinational: one evaluation is one clock cycle of the QR pipeline.
// NROT = 0 gives the vectoring-only unit (one placeholder companion lane,
// driven to zero).
module ssl_cordic
  import ssl_pkg::*;
#(
  parameter  int W    = 16,
  parameter  int ITER = 12,
  parameter  int LA   = 4,
  parameter  int NROT = 1,
  parameter  int G    = 4,
  localparam int NRA  = (NROT > 0) ? NROT : 1
) (
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  input  logic signed [W-1:0] rx_in  [NRA],
  input  logic signed [W-1:0] ry_in  [NRA],
  output logic signed [W-1:0] mag,
  output logic signed [W-1:0] rx_out [NRA],
  output logic signed [W-1:0] ry_out [NRA],
  output logic [ITER-1:0]     sigma
);

  localparam int IW = W + 2 + G;
  localparam int NG = (ITER + LA - 1) / LA;
  localparam int PW = IW + KINV_FRAC + 2;
  localparam logic signed [PW-1:0] KINV = PW'(kinv_q(ITER));

  if (ITER - (NG - 1) * LA < 2) begin : g_bad_split
    $error("ssl_cordic: the last lookahead group would cover a single iteration");
  end

  function automatic logic signed [IW-1:0] widen(input logic signed [W-1:0] v);
    return IW'(v) <<< G;
  endfunction

  // Gain compensation, rounding and saturation back to W bits.
  function automatic logic signed [W-1:0] finish(input logic signed [IW-1:0] v);
    logic signed [PW-1:0] p;
    logic signed [PW-1:0] q;
    p = PW'(v) * KINV + (PW'(1) <<< (KINV_FRAC + G - 1));
    q = p >>> (KINV_FRAC + G);
    if (q > PW'((1 <<< (W - 1)) - 1)) return {1'b0, {(W-1){1'b1}}};
    if (q < -PW'(1 <<< (W - 1)))      return {1'b1, {(W-1){1'b0}}};
    return q[W-1:0];
  endfunction

  // Each group's results live in its own generate scope; group g reads the
  // outputs of group g-1.
  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int FIRST = g * LA + 1;
    localparam int DEP   = (ITER - g * LA < LA) ? (ITER - g * LA) : LA;
    logic signed [IW-1:0] xi, yi, xo, yo;
    logic signed [IW-1:0] rxi [NRA];
    logic signed [IW-1:0] ryi [NRA];
    logic signed [IW-1:0] rxo [NRA];
    logic signed [IW-1:0] ryo [NRA];
    if (g == 0) begin : g_first
      assign xi = widen(x_in);
      assign yi = widen(y_in);
      for (genvar r = 0; r < NRA; r++) begin : g_in
        assign rxi[r] = (r < NROT) ? widen(rx_in[r]) : '0;
        assign ryi[r] = (r < NROT) ? widen(ry_in[r]) : '0;
      end
    end else begin : g_next
      assign xi  = g_grp[g-1].xo;
      assign yi  = g_grp[g-1].yo;
      assign rxi = g_grp[g-1].rxo;
      assign ryi = g_grp[g-1].ryo;
    end
    ssl_group #(.IW(IW), .DEPTH(DEP), .FIRST_ITER(FIRST), .NROT(NROT)) u_grp (
      .x_in  (xi),  .y_in  (yi),
      .rx_in (rxi), .ry_in (ryi),
      .x_out (xo),  .y_out (yo),
      .rx_out(rxo), .ry_out(ryo),
      .sgn   (sigma[FIRST-1 +: DEP])
    );
  end

  // The final y residual (close to zero) is not needed by the QR datapath.
  assign mag = finish(g_grp[NG-1].xo);
  for (genvar r = 0; r < NRA; r++) begin : g_out
    assign rx_out[r] = finish(g_grp[NG-1].rxo[r]);
    assign ry_out[r] = finish(g_grp[NG-1].ryo[r]);
  end

endmodule
