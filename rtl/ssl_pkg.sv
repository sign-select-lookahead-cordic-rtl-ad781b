// ssl_pkg: constants and elaboration-time helper functions shared by the
// Sign-Select Lookahead (SSL) CORDIC and the QR decomposition pipeline built
// from it.
//
// CORDIC iteration numbering follows the recurrence used throughout the design:
// iteration 1 is a +/-90 degree rotation (x1 = -s*y0, y1 = s*x0), and
// iteration i >= 2 is a shift-add micro-rotation by atan(2^(2-i)), i.e. with a
// right shift of i-2 bits. The sign s of every iteration is decided in
// vectoring mode from the MSB of the y component (s = +1 when y < 0).
//
// The QR schedule helpers describe the pipeline of the top level: for each
// column k the first stage removes the phase of the elements k..N-1 of that
// column (one SSL-CORDIC per row, in parallel), and the following
// ceil(log2(N-k)) stages zero the column below the diagonal by Givens
// rotations on row pairs arranged as a binary tree. The last column only
// needs its phase stage. For N = 2, 3, 4 this gives 3, 6 and 9 stages; each
// stage is one clock cycle. The binary-tree pairing is this design's reading
// of the cycle counts, not a drawn structure.
package ssl_pkg;

  // Kind of a QR pipeline stage.
  typedef enum logic [0:0] {
    ST_PHASE = 1'b0,   // make column elements real (complex -> magnitude)
    ST_ELIM  = 1'b1    // zero elements below the diagonal, pairwise
  } stage_kind_e;

  // Fractional bits of the constant gain-compensation factor 1/K.
  localparam int KINV_FRAC = 16;

  // Right shift of CORDIC iteration i (1-based); -1 marks the 90 degree step.
  function automatic int iter_shift(input int i);
    return (i <= 1) ? -1 : i - 2;
  endfunction

  // 1/K in Q(KINV_FRAC), where K = prod_{i=2..iter} sqrt(1 + 2^(-2(i-2)))
  // is the gain of the shift-add iterations (the 90 degree step has none).
  // Computed with integers: P = K^2 in Q28, then the largest q with
  // q^2 * P <= 2^(2*KINV_FRAC + 28).
  function automatic longint kinv_q(input int iter);
    longint p, lo, hi, mid, lim;
    p = longint'(1) <<< 28;
    for (int i = 2; i <= iter; i++) begin
      if (2 * (i - 2) < 60) p = p + (p >>> (2 * (i - 2)));
    end
    lim = longint'(1) <<< (2 * KINV_FRAC + 28);
    lo = 0;
    hi = longint'(1) <<< KINV_FRAC;
    while (lo < hi) begin
      mid = (lo + hi + 1) >>> 1;
      if (mid * mid * p <= lim) lo = mid;
      else hi = mid - 1;
    end
    return lo;
  endfunction

  // ceil(log2(m)) for m >= 1.
  function automatic int clog2i(input int m);
    int r;
    r = 0;
    while ((1 << r) < m) r++;
    return r;
  endfunction

  // Number of pipeline stages for an n x n matrix.
  function automatic int num_stages(input int n);
    int s;
    s = 0;
    for (int k = 0; k < n; k++) s += 1 + clog2i(n - k);
    return s;
  endfunction

  // Column handled by stage s.
  function automatic int stage_col(input int n, input int s);
    int idx;
    idx = 0;
    for (int k = 0; k < n; k++) begin
      if (s < idx + 1 + clog2i(n - k)) return k;
      idx += 1 + clog2i(n - k);
    end
    return n - 1;
  endfunction

  // Position of stage s inside its column: 0 is the phase stage, l >= 1 is
  // elimination level l-1 of the tree.
  function automatic int stage_pos(input int n, input int s);
    int idx;
    idx = 0;
    for (int k = 0; k < n; k++) begin
      if (s < idx + 1 + clog2i(n - k)) return s - idx;
      idx += 1 + clog2i(n - k);
    end
    return 0;
  endfunction

endpackage
