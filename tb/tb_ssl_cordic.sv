// tb_ssl_cordic: self-checking test of the complete SSL-CORDIC.
// Three instances: the main configuration (12 iterations, 4-step lookahead,
// two companion vectors), the 3-step lookahead variant (one companion) and a
// vectoring-only unit (no companion). Random vectors in all four quadrants,
// plus axis-aligned corner cases, are compared with floating-point results
// computed in the testbench:
//   mag   = sqrt(x^2 + y^2)
//   rx'   =  rx*cos(t) + ry*sin(t),  ry' = -rx*sin(t) + ry*cos(t),
//            t = atan2(y, x)
//   angle encoded by sigma = t
// Companion rotations are checked only for vectors longer than 1000 LSB,
// where the quantised input defines the angle well enough. Tolerances follow from the 12-iteration resolution: the last micro-rotation
// is atan(2^-10), about 1e-3 rad, so errors of up to ~1.5e-3 of the vector
// length plus a few LSBs are accepted.
module tb_ssl_cordic;
  localparam int W = 16;
  localparam int ITER = 12;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic signed [W-1:0] x, y;
  logic signed [W-1:0] rx2 [2], ry2 [2], ox2 [2], oy2 [2];
  logic signed [W-1:0] rx1 [1], ry1 [1], ox1 [1], oy1 [1];
  logic signed [W-1:0] rx0 [1], ry0 [1], ox0 [1], oy0 [1];
  logic signed [W-1:0] m4, m3, m0;
  logic [ITER-1:0] s4, s3, s0;

  ssl_cordic #(.W(W), .ITER(ITER), .LA(4), .NROT(2)) u_la4 (
    .x_in(x), .y_in(y), .rx_in(rx2), .ry_in(ry2),
    .mag(m4), .rx_out(ox2), .ry_out(oy2), .sigma(s4));
  ssl_cordic #(.W(W), .ITER(ITER), .LA(3), .NROT(1)) u_la3 (
    .x_in(x), .y_in(y), .rx_in(rx1), .ry_in(ry1),
    .mag(m3), .rx_out(ox1), .ry_out(oy1), .sigma(s3));
  ssl_cordic #(.W(W), .ITER(ITER), .LA(4), .NROT(0)) u_vec (
    .x_in(x), .y_in(y), .rx_in(rx0), .ry_in(ry0),
    .mag(m0), .rx_out(ox0), .ry_out(oy0), .sigma(s0));

  assign rx0[0] = '0;
  assign ry0[0] = '0;

  function automatic logic signed [W-1:0] rnd(input int amp);
    return W'($signed($urandom_range(2 * amp)) - amp);
  endfunction

  task automatic near(input string name, input real got, input real exp, input real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s: got %0.2f expected %0.2f (x=%0d y=%0d)", name, got, exp, x, y);
    end
  endtask

  function automatic real sig_angle(input logic [ITER-1:0] s);
    real a;
    a = 0.0;
    for (int i = 1; i <= ITER; i++) begin
      real al;
      al = (i == 1) ? PI / 2.0 : $atan(2.0 ** (-(i - 2)));
      a += s[i-1] ? -al : al;
    end
    return a;
  endfunction

  // angle difference wrapped to (-pi, pi]
  function automatic real wrap(input real a);
    while (a > PI) a -= 2.0 * PI;
    while (a <= -PI) a += 2.0 * PI;
    return a;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real t, c, s, mg, e, tolv;
    for (int n = 0; n < 3000; n++) begin
      if (n < 8) begin
        // corner cases: vectors on the axes and diagonals
        case (n)
          0: begin x = 16'sd12000;  y = 16'sd0;      end
          1: begin x = 16'sd0;      y = 16'sd12000;  end
          2: begin x = -16'sd12000; y = 16'sd0;      end
          3: begin x = 16'sd0;      y = -16'sd12000; end
          4: begin x = 16'sd9000;   y = 16'sd9000;   end
          5: begin x = -16'sd9000;  y = -16'sd9000;  end
          6: begin x = 16'sd1;      y = -16'sd1;     end
          default: begin x = 16'sd0; y = 16'sd0;     end
        endcase
      end else begin
        x = rnd(13000); y = rnd(13000);
      end
      foreach (rx2[k]) begin rx2[k] = rnd(13000); ry2[k] = rnd(13000); end
      rx1[0] = rnd(13000); ry1[0] = rnd(13000);
      #1;
      mg = $sqrt(real'(x) * real'(x) + real'(y) * real'(y));
      t  = $atan2(real'(y), real'(x));
      c  = $cos(t); s = $sin(t);
      tolv = 4.0 + 1.5e-3 * mg;
      near("la4.mag", real'(m4), mg, tolv);
      near("la3.mag", real'(m3), mg, tolv);
      near("vec.mag", real'(m0), mg, tolv);
      if (mg > 2000.0) begin
        e = wrap(sig_angle(s4) - t);
        near("la4.angle", e, 0.0, 2.0e-3);
        e = wrap(sig_angle(s3) - t);
        near("la3.angle", e, 0.0, 2.0e-3);
      end
      foreach (rx2[k]) begin
        real len;
        len = $sqrt(real'(rx2[k]) ** 2 + real'(ry2[k]) ** 2);
        tolv = 4.0 + 1.5e-3 * len;
        if (mg > 1000.0) begin
          near("la4.rx", real'(ox2[k]), real'(rx2[k]) * c + real'(ry2[k]) * s, tolv);
          near("la4.ry", real'(oy2[k]), -real'(rx2[k]) * s + real'(ry2[k]) * c, tolv);
        end
      end
      if (mg > 1000.0) begin
        real len;
        len = $sqrt(real'(rx1[0]) ** 2 + real'(ry1[0]) ** 2);
        tolv = 4.0 + 1.5e-3 * len;
        near("la3.rx", real'(ox1[0]), real'(rx1[0]) * c + real'(ry1[0]) * s, tolv);
        near("la3.ry", real'(oy1[0]), -real'(rx1[0]) * s + real'(ry1[0]) * c, tolv);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
