// tb_ssl_group: self-checking test of one sign-select lookahead step.
// Three configurations are tested: the first group of the CORDIC (90 degree
// step plus shifts 0..2, 4 iterations), a later 4-iteration group (shifts
// 3..6) and a 3-iteration group (shifts 0..2 after the 90 degree step of a
// 3-step lookahead). For every random input the testbench replays the
// iterations in real arithmetic with the sign bits the block chose and checks
//   * each sign agrees with the sign of the exact y value before that
//     iteration (unless |y| is within the truncation tolerance), and
//   * x_out, y_out and the companion outputs match the exact rotation
//     within a few LSBs (each lookahead term is truncated separately).
module tb_ssl_group;
  localparam int IW  = 22;
  localparam int TOL = 24;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic signed [IW-1:0] xa, ya, rxa [1], rya [1], xoa, yoa, rxoa [1], ryoa [1];
  logic signed [IW-1:0] xb, yb, rxb [2], ryb [2], xob, yob, rxob [2], ryob [2];
  logic signed [IW-1:0] xc, yc, rxc [1], ryc [1], xoc, yoc, rxoc [1], ryoc [1];
  logic [3:0] sa, sb;
  logic [2:0] sc;

  ssl_group #(.IW(IW), .DEPTH(4), .FIRST_ITER(1), .NROT(1)) u_a (
    .x_in(xa), .y_in(ya), .rx_in(rxa), .ry_in(rya),
    .x_out(xoa), .y_out(yoa), .rx_out(rxoa), .ry_out(ryoa), .sgn(sa));
  ssl_group #(.IW(IW), .DEPTH(4), .FIRST_ITER(5), .NROT(2)) u_b (
    .x_in(xb), .y_in(yb), .rx_in(rxb), .ry_in(ryb),
    .x_out(xob), .y_out(yob), .rx_out(rxob), .ry_out(ryob), .sgn(sb));
  ssl_group #(.IW(IW), .DEPTH(3), .FIRST_ITER(1), .NROT(1)) u_c (
    .x_in(xc), .y_in(yc), .rx_in(rxc), .ry_in(ryc),
    .x_out(xoc), .y_out(yoc), .rx_out(rxoc), .ry_out(ryoc), .sgn(sc));

  function automatic logic signed [IW-1:0] rnd(input int amp);
    return IW'($signed($urandom_range(2 * amp)) - amp);
  endfunction

  task automatic near(input string name, input real got, input real exp);
    checks++;
    if (got - exp > TOL || exp - got > TOL) begin
      failures++;
      $display("FAIL %s: got %0.1f expected %0.1f", name, got, exp);
    end
  endtask

  // Replay 'depth' iterations starting at global iteration 'first' with the
  // given signs; checks sign consistency, returns the exact results.
  task automatic replay(input string name, input int first, input int depth,
                        input logic [3:0] sg, input real x0, input real y0,
                        input real cx0[], input real cy0[],
                        output real x, output real y,
                        output real cx[], output real cy[]);
    real t, nx, ny;
    x = x0; y = y0; cx = cx0; cy = cy0;
    for (int m = 0; m < depth; m++) begin
      int  i;
      real s;
      i = first + m;
      s = sg[m] ? 1.0 : -1.0;
      if (y > TOL || y < -TOL) begin
        checks++;
        if ((y < 0.0) != sg[m]) begin
          failures++;
          $display("FAIL %s: sign of iteration %0d is %0d, y = %0.1f", name, i, sg[m], y);
        end
      end
      if (i == 1) begin
        nx = -s * y; ny = s * x; x = nx; y = ny;
        foreach (cx[k]) begin nx = -s * cy[k]; ny = s * cx[k]; cx[k] = nx; cy[k] = ny; end
      end else begin
        t = 2.0 ** (-(i - 2));
        nx = x - s * t * y; ny = y + s * t * x; x = nx; y = ny;
        foreach (cx[k]) begin
          nx = cx[k] - s * t * cy[k]; ny = cy[k] + s * t * cx[k]; cx[k] = nx; cy[k] = ny;
        end
      end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real x, y, cxi[], cyi[], cxo[], cyo[];
    int  amp;
    for (int t = 0; t < 1000; t++) begin
      // group a and c: full-range inputs; group b: a residual vector whose
      // angle is within the remaining range of iterations 5..8
      amp = 300000;
      xa = rnd(amp); ya = rnd(amp); rxa[0] = rnd(amp); rya[0] = rnd(amp);
      xc = rnd(amp); yc = rnd(amp); rxc[0] = rnd(amp); ryc[0] = rnd(amp);
      xb = IW'($urandom_range(400000, 200000)); yb = rnd(60000);
      rxb[0] = rnd(amp); ryb[0] = rnd(amp); rxb[1] = rnd(amp); ryb[1] = rnd(amp);
      #1;
      cxi = new[1]; cyi = new[1];
      cxi[0] = real'(rxa[0]); cyi[0] = real'(rya[0]);
      replay("a", 1, 4, sa, real'(xa), real'(ya), cxi, cyi, x, y, cxo, cyo);
      near("a.x", real'(xoa), x); near("a.y", real'(yoa), y);
      near("a.rx", real'(rxoa[0]), cxo[0]); near("a.ry", real'(ryoa[0]), cyo[0]);

      cxi[0] = real'(rxc[0]); cyi[0] = real'(ryc[0]);
      replay("c", 1, 3, {1'b0, sc}, real'(xc), real'(yc), cxi, cyi, x, y, cxo, cyo);
      near("c.x", real'(xoc), x); near("c.y", real'(yoc), y);
      near("c.rx", real'(rxoc[0]), cxo[0]); near("c.ry", real'(ryoc[0]), cyo[0]);

      cxi = new[2]; cyi = new[2];
      foreach (cxi[k]) begin cxi[k] = real'(rxb[k]); cyi[k] = real'(ryb[k]); end
      replay("b", 5, 4, sb, real'(xb), real'(yb), cxi, cyi, x, y, cxo, cyo);
      near("b.x", real'(xob), x); near("b.y", real'(yob), y);
      foreach (cxo[k]) begin
        near("b.rx", real'(rxob[k]), cxo[k]); near("b.ry", real'(ryob[k]), cyo[k]);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
