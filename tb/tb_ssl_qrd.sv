// tb_ssl_qrd: end-to-end test of the QR decomposition pipeline for the 2x2
// and 3x3 matrix sizes. The 2x2 pipeline runs the CORDIC at its default
// 12 iterations with the 4-step lookahead; the 3x3 pipeline keeps the 12
// iterations but uses a 2-step lookahead, which gives the same arithmetic
// results within rounding and a much smaller simulation model. Stimulus and checks come from qr_checker: every R is compared
// with a floating-point QR, the latency must be 3 and 6 cycles, and both
// back-to-back and gapped input streams must occur.
module tb_ssl_qrd;
  localparam int W = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  // ---- 2x2, default CORDIC ----
  logic                rst2, iv2, ov2, done2;
  logic signed [W-1:0] h2r [2][2], h2i [2][2], r2r [2][2], r2i [2][2];
  int                  c2, f2;

  ssl_qrd #(.N(2)) u_qrd2 (
    .clk, .rst_n(rst2), .in_valid(iv2), .h_re(h2r), .h_im(h2i),
    .out_valid(ov2), .r_re(r2r), .r_im(r2i));
  qr_checker #(.N(2), .NB2B(40), .NGAP(40), .TOL_REL(0.006), .SEED(11)) u_chk2 (
    .clk, .rst_n(rst2), .in_valid(iv2), .h_re(h2r), .h_im(h2i),
    .out_valid(ov2), .r_re(r2r), .r_im(r2i), .done(done2), .checks(c2), .failures(f2));

  // ---- 3x3, 2-step lookahead CORDIC ----
  logic                rst3, iv3, ov3, done3;
  logic signed [W-1:0] h3r [3][3], h3i [3][3], r3r [3][3], r3i [3][3];
  int                  c3, f3;

  ssl_qrd #(.N(3), .LA(2)) u_qrd3 (
    .clk, .rst_n(rst3), .in_valid(iv3), .h_re(h3r), .h_im(h3i),
    .out_valid(ov3), .r_re(r3r), .r_im(r3i));
  qr_checker #(.N(3), .NB2B(30), .NGAP(30), .TOL_REL(0.008), .SEED(23)) u_chk3 (
    .clk, .rst_n(rst3), .in_valid(iv3), .h_re(h3r), .h_im(h3i),
    .out_valid(ov3), .r_re(r3r), .r_im(r3i), .done(done3), .checks(c3), .failures(f3));

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c3, f2 + f3 + 1);
    $finish;
  end

  initial begin
    wait (done2 && done3);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c3, f2 + f3);
    $finish;
  end
endmodule
