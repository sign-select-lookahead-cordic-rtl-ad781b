// tb_qr_stage: self-checking test of single QR pipeline stages on 3x3 complex
// matrices. Four stages are instantiated side by side on the same input:
//   phase stage of column 2 (vectoring-only unit), elimination of column 0
//   at tree levels 0 (pair 0/1, row 2 idle) and 1 (pair 0/2, row 1 idle), and
//   elimination of column 1 (pair 1/2, row 0 idle). To keep the build small
//   the CORDICs run 8 iterations (two 4-step lookahead groups) and the
//   tolerance is widened accordingly (last micro-rotation atan(2^-6), about
//   1.6% of the vector length); the phase stage with companions is
//   covered by the full pipeline test.
// The input has a real, non-negative column 0 and column 1 where the
// elimination stages need it. The testbench computes each stage's unitary
// row operation in floating point and compares every element after exactly
// one clock edge; it also checks that the registers hold while in_valid is
// low, and that out_valid follows in_valid with one cycle of delay.
module tb_qr_stage
  import ssl_pkg::*;
;
  localparam int N = 3;
  localparam int W = 16;
  localparam int NDUT = 4;
  localparam int ITER = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic rst_n, in_valid;
  logic signed [W-1:0] h_re [N][N];
  logic signed [W-1:0] h_im [N][N];
  logic                vo   [NDUT];
  logic signed [W-1:0] o_re [NDUT][N][N];
  logic signed [W-1:0] o_im [NDUT][N][N];

  // stage descriptors: kind, column, level
  localparam stage_kind_e KINDS [NDUT] = '{ST_PHASE, ST_ELIM, ST_ELIM, ST_ELIM};
  localparam int          COLS  [NDUT] = '{2, 0, 0, 1};
  localparam int          LVLS  [NDUT] = '{0, 0, 1, 0};

  for (genvar d = 0; d < NDUT; d++) begin : g_dut
    qr_stage #(.N(N), .W(W), .ITER(ITER), .KIND(KINDS[d]), .COL(COLS[d]), .LEVEL(LVLS[d])) u_dut (
      .clk, .rst_n, .in_valid, .in_re(h_re), .in_im(h_im),
      .out_valid(vo[d]), .out_re(o_re[d]), .out_im(o_im[d]));
  end

  typedef real mat_t [N][N];

  function automatic logic signed [W-1:0] rnd(input int amp);
    return W'($signed($urandom_range(2 * amp)) - amp);
  endfunction

  // floating-point model of one stage
  task automatic ref_stage(input stage_kind_e kind, input int col, input int lvl,
                           input mat_t ar, input mat_t ai,
                           output mat_t br, output mat_t bi);
    br = ar; bi = ai;
    if (kind == ST_PHASE) begin
      for (int r = col; r < N; r++) begin
        real t, c, s;
        t = $atan2(ai[r][col], ar[r][col]); c = $cos(t); s = $sin(t);
        for (int j = col; j < N; j++) begin
          br[r][j] = ar[r][j] * c + ai[r][j] * s;
          bi[r][j] = ai[r][j] * c - ar[r][j] * s;
        end
      end
    end else begin
      int st;
      st = 1 << lvl;
      for (int r = col; r + st < N; r += 2 * st) begin
        int  p;
        real t, c, s;
        p = r + st;
        t = $atan2(ar[p][col], ar[r][col]); c = $cos(t); s = $sin(t);
        for (int j = col; j < N; j++) begin
          br[r][j] =  c * ar[r][j] + s * ar[p][j];
          bi[r][j] =  c * ai[r][j] + s * ai[p][j];
          br[p][j] = -s * ar[r][j] + c * ar[p][j];
          bi[p][j] = -s * ai[r][j] + c * ai[p][j];
        end
      end
    end
  endtask

  task automatic near(input string name, input real got, input real exp);
    checks++;
    if (got - exp > 350.0 || exp - got > 350.0) begin
      failures++;
      $display("FAIL %s: got %0.1f expected %0.1f", name, got, exp);
    end
  endtask

  task automatic check_all();
    mat_t ar, ai, br, bi;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        ar[r][c] = real'(h_re[r][c]); ai[r][c] = real'(h_im[r][c]);
      end
    for (int d = 0; d < NDUT; d++) begin
      ref_stage(KINDS[d], COLS[d], LVLS[d], ar, ai, br, bi);
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          near($sformatf("dut%0d re[%0d][%0d]", d, r, c), real'(o_re[d][r][c]), br[r][c]);
          near($sformatf("dut%0d im[%0d][%0d]", d, r, c), real'(o_im[d][r][c]), bi[r][c]);
        end
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] held;
    rst_n = 1'b0; in_valid = 1'b0;
    foreach (h_re[r, c]) begin h_re[r][c] = '0; h_im[r][c] = '0; end
    repeat (3) @(posedge clk);
    #1;
    for (int d = 0; d < NDUT; d++) begin
      checks++;
      if (vo[d] !== 1'b0) begin failures++; $display("FAIL out_valid not cleared by reset"); end
    end
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          h_re[r][c] = rnd(9000); h_im[r][c] = rnd(9000);
        end
      // columns 0 and 1 real and non-negative below the diagonal, as the
      // elimination stages expect after a phase stage
      for (int r = 0; r < N; r++) begin
        h_re[r][0] = W'($urandom_range(9000)); h_im[r][0] = '0;
        if (r >= 1) begin h_re[r][1] = W'($urandom_range(9000)); h_im[r][1] = '0; end
      end
      in_valid = 1'b1;
      @(posedge clk);
      #1;
      for (int d = 0; d < NDUT; d++) begin
        checks++;
        if (vo[d] !== 1'b1) begin failures++; $display("FAIL out_valid missing one cycle after in_valid"); end
      end
      check_all();
      // one idle cycle: outputs must hold, out_valid must drop
      @(negedge clk);
      in_valid = 1'b0;
      held = o_re[0][0][0];
      h_re[0][0] = h_re[0][0] ^ 16'sh1234;
      @(posedge clk);
      #1;
      checks++;
      if (vo[0] !== 1'b0 || o_re[0][0][0] !== held) begin
        failures++;
        $display("FAIL stage register changed or stayed valid without in_valid");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
