// qr_checker: stimulus and checking for the QR decomposition pipeline, shared
// by the end-to-end testbenches. It drives reset and random complex N x N
// matrices into a pipeline instance, and checks every result against a
// floating-point modified Gram-Schmidt QR of the same matrix (R upper
// triangular with a real, non-negative diagonal, which makes R unique):
//   * below-diagonal elements and diagonal imaginary parts must be exactly 0;
//   * all other elements within TOL_ABS + TOL_REL * (largest column norm);
//   * each result must appear exactly 3*(N-1) clock edges after its matrix
//     was sampled (the cycle counts for 2x2, 3x3 and 4x4 are 3, 6 and 9);
//   * results must come back in order, none missing, none extra.
// The stimulus has three phases: NB2B matrices back to back (one per
// cycle), NGAP matrices with random idle cycles between them, and a few
// structured matrices (identity, diagonal with negative and imaginary
// entries, a matrix whose first column is already real). Back-to-back
// acceptance and idle cycles inside a stream are counted; a mechanism that
// never happened counts as a failure. done goes high when all results are in.
module qr_checker #(
  parameter int  N       = 2,
  parameter int  W       = 16,
  parameter int  NB2B    = 20,
  parameter int  NGAP    = 20,
  parameter real TOL_ABS = 8.0,
  parameter real TOL_REL = 0.006,
  parameter int  SEED    = 1
) (
  input  logic                clk,
  output logic                rst_n,
  output logic                in_valid,
  output logic signed [W-1:0] h_re [N][N],
  output logic signed [W-1:0] h_im [N][N],
  input  logic                out_valid,
  input  logic signed [W-1:0] r_re [N][N],
  input  logic signed [W-1:0] r_im [N][N],
  output logic                done,
  output int                  checks,
  output int                  failures
);

  localparam int LAT = 3 * (N - 1);

  typedef struct {
    real rr [N][N];
    real ri [N][N];
    real scale;
    int  cyc;
  } exp_t;

  exp_t q [$];
  int   cyc = 0;
  int   sent = 0;
  int   got = 0;
  int   n_b2b = 0;
  int   n_gap = 0;
  logic prev_valid = 1'b0;
  bit   stim_done = 1'b0;

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
  end

  // floating-point reference: modified Gram-Schmidt on the columns of H
  function automatic exp_t reference();
    exp_t e;
    real vr [N][N];
    real vi [N][N];
    e.scale = 0.0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        vr[r][c] = real'(h_re[r][c]); vi[r][c] = real'(h_im[r][c]);
        e.rr[r][c] = 0.0; e.ri[r][c] = 0.0;
      end
    for (int c = 0; c < N; c++) begin
      real nrm;
      nrm = 0.0;
      for (int r = 0; r < N; r++) nrm += vr[r][c] ** 2 + vi[r][c] ** 2;
      if ($sqrt(nrm) > e.scale) e.scale = $sqrt(nrm);
    end
    for (int k = 0; k < N; k++) begin
      real nrm;
      nrm = 0.0;
      for (int r = 0; r < N; r++) nrm += vr[r][k] ** 2 + vi[r][k] ** 2;
      nrm = $sqrt(nrm);
      e.rr[k][k] = nrm;
      if (nrm > 0.0)
        for (int r = 0; r < N; r++) begin vr[r][k] /= nrm; vi[r][k] /= nrm; end
      for (int j = k + 1; j < N; j++) begin
        real pr, pi;
        pr = 0.0; pi = 0.0;
        // <q_k, v_j> = sum conj(q) * v
        for (int r = 0; r < N; r++) begin
          pr += vr[r][k] * vr[r][j] + vi[r][k] * vi[r][j];
          pi += vr[r][k] * vi[r][j] - vi[r][k] * vr[r][j];
        end
        e.rr[k][j] = pr; e.ri[k][j] = pi;
        for (int r = 0; r < N; r++) begin
          vr[r][j] -= pr * vr[r][k] - pi * vi[r][k];
          vi[r][j] -= pr * vi[r][k] + pi * vr[r][k];
        end
      end
    end
    return e;
  endfunction

  function automatic logic signed [W-1:0] rnd(input int amp);
    return W'($signed($urandom_range(2 * amp)) - amp);
  endfunction

  task automatic load_random();
    int amp;
    amp = int'(19000.0 / $sqrt(2.0 * N));
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        h_re[r][c] = rnd(amp); h_im[r][c] = rnd(amp);
      end
  endtask

  task automatic load_special(input int kind);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        h_re[r][c] = '0; h_im[r][c] = '0;
      end
    case (kind)
      0: for (int r = 0; r < N; r++) h_re[r][r] = 16'sd8000;             // identity
      1: for (int r = 0; r < N; r++) begin                               // rotated diagonal
           h_re[r][r] = (r % 2 == 0) ? -16'sd5000 : 16'sd0;
           h_im[r][r] = (r % 2 == 0) ? 16'sd3000 : -16'sd6000;
         end
      default: begin                                                     // real first column
        load_random();
        for (int r = 0; r < N; r++) begin
          h_re[r][0] = W'($urandom_range(4000, 1000)); h_im[r][0] = '0;
        end
      end
    endcase
  endtask

  // stimulus, driven on the falling edge
  initial begin
    void'($urandom(SEED));
    rst_n = 1'b0;
    in_valid = 1'b0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin h_re[r][c] = '0; h_im[r][c] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < NB2B; n++) begin
      load_random(); in_valid = 1'b1;
      @(negedge clk);
    end
    for (int n = 0; n < NGAP; n++) begin
      in_valid = 1'b0;
      repeat ($urandom_range(3, 1)) @(negedge clk);
      load_random(); in_valid = 1'b1;
      @(negedge clk);
    end
    for (int k = 0; k < 3; k++) begin
      load_special(k); in_valid = 1'b1;
      @(negedge clk);
    end
    in_valid = 1'b0;
    stim_done = 1'b1;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL N=%0d: %s", N, what);
    end
  endtask

  // monitor: values sampled before the registers update at this edge
  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_valid) begin
      exp_t e;
      e = reference();
      e.cyc = cyc;
      q.push_back(e);
      sent++;
      if (prev_valid) n_b2b++;
    end
    if (rst_n && !in_valid && sent > 0 && !stim_done) n_gap++;
    prev_valid = rst_n && in_valid;

    // out_valid is only meaningful once reset has cleared the pipeline
    if (rst_n && out_valid) begin
      got++;
      if (q.size() == 0) begin
        chk(1'b0, "result without a matrix");
      end else begin
        exp_t e;
        real tol;
        e = q.pop_front();
        tol = TOL_ABS + TOL_REL * e.scale;
        chk(cyc - e.cyc == LAT, $sformatf("latency %0d cycles, expected %0d", cyc - e.cyc, LAT));
        for (int r = 0; r < N; r++)
          for (int c = 0; c < N; c++) begin
            if (r > c) begin
              chk(r_re[r][c] == 0 && r_im[r][c] == 0,
                  $sformatf("R[%0d][%0d] below diagonal is %0d + %0dj", r, c, r_re[r][c], r_im[r][c]));
            end else begin
              real dr, di;
              dr = real'(r_re[r][c]) - e.rr[r][c];
              di = real'(r_im[r][c]) - e.ri[r][c];
              if (r == c) chk(r_im[r][c] == 0 && r_re[r][c] >= 0,
                              $sformatf("R[%0d][%0d] diagonal not real non-negative", r, c));
              chk(dr <= tol && dr >= -tol && di <= tol && di >= -tol,
                  $sformatf("R[%0d][%0d] = %0d + %0dj, expected %0.1f + %0.1fj", r, c,
                            r_re[r][c], r_im[r][c], e.rr[r][c], e.ri[r][c]));
            end
          end
      end
    end

    if (stim_done && q.size() == 0 && !done) begin
      chk(got == sent, $sformatf("%0d results for %0d matrices", got, sent));
      chk(n_b2b > 0, "no back-to-back matrices were accepted");
      chk(n_gap > 0, "no idle cycle inside the stream");
      $display("N=%0d: %0d matrices, %0d back-to-back, %0d idle cycles in stream",
               N, sent, n_b2b, n_gap);
      done = 1'b1;
    end
  end

endmodule
