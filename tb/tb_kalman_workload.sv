// tb_kalman_workload: one complete Kalman filter step on the default 5 x 5
// array, for two filter sizes: n = m = p = 5 (the full array) and n = 5,
// p = 3, m = 2 (smaller matrices padded with zeros).
//
// The testbench acts as the external sequencer and memory. It programs every
// row with the load, multiply-accumulate and multiply-subtract microcode.
// It then runs the matrix operations of one filter step on the array, one
// after the other, each as "load A, then stream B from the bottom and C from
// the left":
//   QG^T, b = PH^T, PF^T, S = R + Hb, G(QG^T), K = bS^-1, a = FK, Fx,
//   z - Hx, F - aH, x' = Fx + a(z - Hx), P' = GQG^T + (F - aH)(PF^T).
// Operands written with ^T go through the transpose switch. Every result is
// read from the right edge of the array and used as an operand of the
// operations after it. The m x m inverse S^-1 is computed by the testbench,
// because the array cannot be microprogrammed for an inversion (every PE
// would need its own program). Operations are issued one at a time, not
// overlapped. The list of operations, their order and the two filter sizes
// are those the design is evaluated with; the test matrices, the tolerances
// and the host-side inverse are this testbench's own choices.
//
// Checks:
//   - each result against the real-number product of the operands actually
//     fed to the array (1 % of the sum of magnitudes of its terms);
//   - the final state x' and covariance P' against a filter step computed
//     entirely in real numbers (3 % of the largest magnitude);
//   - every kind of operation (product, transposed product, multiply-subtract,
//     accumulate into C) occurred.
module tb_kalman_workload;
  import lns_pkg::*;
  import tb_lns_pkg::*;

  localparam int N    = 5;
  localparam int TMAX = 64;
  localparam int SW   = $clog2(N+1);

  typedef real mat_t [N][N];

  logic                   clk = 1'b0;
  logic                   rst_n;
  logic [3:0]             opcode_in;
  logic [N-1:0][31:0]     left_in;
  lns_t [N-1:0]           bottom_in;
  logic                   tr_start;
  logic [SW-1:0]          tr_dim;
  logic [1:0]             rr_mode;
  logic [SW-1:0]          rr_m;
  lns_t [N-1:0]           top_out;
  logic [N-1:0][31:0]     right_out;
  logic                   overflow_any;

  kalman_systolic_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_ops = 0, n_transposed = 0, n_msub = 0, n_accum = 0, n_steps = 0;

  // Schedules in PE(0,0) time.
  logic [3:0]  op_s   [TMAX];
  logic [31:0] row_s  [N][TMAX];
  lns_t        col_s  [N][TMAX];
  bit          trs_s  [TMAX];
  logic [31:0] rout   [N][TMAX + 2*N + 2];
  int          ovf_cnt;
  int          t;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic clear_schedule();
    for (int i = 0; i < TMAX; i++) begin
      op_s[i] = '0; trs_s[i] = 1'b0;
      for (int r = 0; r < N; r++) begin row_s[r][i] = '0; col_s[r][i] = LNS_ZERO; end
    end
    t = 0;
  endtask

  // Run the schedule from t0 to t1 and capture the right edge per row in
  // the local time of PE(r, N-1).
  task automatic run(input int t0, input int t1);
    ovf_cnt = 0;
    for (int g = t0; g <= t1 + 2*N + 1; g++) begin
      @(negedge clk);
      for (int r = 0; r < N; r++) begin
        int lt;
        lt = g - 1 - r - (N - 1);
        if (lt >= 0 && lt < TMAX) rout[r][lt] = right_out[r];
      end
      if (overflow_any) ovf_cnt++;
      opcode_in = (g <= t1) ? op_s[g] : 4'(OP_NOP);
      tr_start  = (g <= t1) ? trs_s[g] : 1'b0;
      for (int r = 0; r < N; r++)
        left_in[r] = (g - r >= t0 && g - r <= t1) ? row_s[r][g - r] : word(LNS_ZERO);
      for (int c = 0; c < N; c++)
        bottom_in[c] = (g - c >= t0 && g - c <= t1) ? col_s[c][g - c] : LNS_ZERO;
    end
  endtask

  task automatic put_op(input pe_op_e op, input logic [31:0] w_all);
    op_s[t] = 4'(op);
    for (int r = 0; r < N; r++) row_s[r][t] = w_all;
    t++;
  endtask

  // Program all rows: group 1 load (row r keeps the (N-r)-th word),
  // group 2 multiply-accumulate, group 3 multiply-subtract.
  task automatic program_array();
    logic [31:0] lp [N][N];
    logic [31:0] mac_w, msub_w;
    for (int r = 0; r < N; r++)
      for (int k = 0; k < N; k++)
        lp[r][k] = (k == N - 1 - r)
          ? mw(3'b111, SRC_LEFT, SRC_LEFT, SRC_LEFT, SRC_LEFT, SRC_LEFT,
               SRC_LEFT, SRC_LEFT, SRC_BOTTOM, 1'b1, 3'd0)
          : 32'h0;
    mac_w  = mw(3'b111, SRC_SCRATCH, SRC_BOTTOM, SRC_LEFT, SRC_LEFT, SRC_MULDIV,
                SRC_LEFT, SRC_ADDSUB, SRC_LEFT, 1'b0, 3'd0);
    msub_w = mw(3'b110, SRC_SCRATCH, SRC_BOTTOM, SRC_LEFT, SRC_LEFT, SRC_MULDIV,
                SRC_LEFT, SRC_ADDSUB, SRC_LEFT, 1'b0, 3'd0);
    clear_schedule();
    put_op(OP_START1, 32'd0);  put_op(OP_END1, 32'(N - 1));
    put_op(OP_START2, 32'd16); put_op(OP_END2, 32'd16);
    put_op(OP_START3, 32'd17); put_op(OP_END3, 32'd17);
    for (int k = 0; k < N; k++) begin
      op_s[t] = 4'(OP_WRITE);
      for (int r = 0; r < N; r++) row_s[r][t] = lp[r][k];
      t++;
    end
    put_op(OP_START1, 32'd16); put_op(OP_END1, 32'd17);
    put_op(OP_WRITE, mac_w);   put_op(OP_WRITE, msub_w);
    put_op(OP_START1, 32'd0);  put_op(OP_END1, 32'(N - 1));
    put_op(OP_NOP, 32'h0);
    run(0, t - 1);
  endtask

  // One array operation: Z = C + A*op(B) (or C - A*op(B) when sub), with
  // op(B) = B^T when tr. Checks the result against the real product of the
  // operands as quantised to LNS.
  task automatic array_op(input string name, input mat_t Am, input mat_t Bm, input mat_t Cm,
                          input bit tr, input bit sub, output mat_t Z);
    int ts;
    clear_schedule();
    for (int k = 0; k < N; k++) begin               // load A, last row first
      op_s[t] = 4'(OP_RUN1);
      for (int c = 0; c < N; c++) col_s[c][t] = to_lns(Am[N-1-k][c]);
      for (int r = 0; r < N; r++) row_s[r][t] = word(LNS_ZERO);
      t++;
    end
    ts = t;
    for (int j = 0; j < N; j++) begin               // stream B and C
      op_s[t]  = 4'(sub ? OP_RUN3 : OP_RUN2);
      trs_s[t] = tr && (j == 0);
      for (int c = 0; c < N; c++) col_s[c][t] = to_lns(Bm[c][j]);
      for (int r = 0; r < N; r++) row_s[r][t] = word(to_lns(Cm[r][j]));
      t++;
    end
    put_op(OP_NOP, 32'h0);
    run(0, t - 1);
    check(ovf_cnt == 0, {name, ": no overflow"});
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        real e, mag, got;
        e   = to_real(to_lns(Cm[i][j]));
        mag = (e < 0.0) ? -e : e;
        for (int k = 0; k < N; k++) begin
          real p;
          p = to_real(to_lns(Am[i][k])) * to_real(to_lns(tr ? Bm[j][k] : Bm[k][j]));
          e   = sub ? e - p : e + p;
          mag += (p < 0.0) ? -p : p;
        end
        got = to_real(lns_t'(rout[i][ts + j][WORD_W-1:0]));
        Z[i][j] = got;
        check((got - e <= 0.01 * mag + 1e-4) && (e - got <= 0.01 * mag + 1e-4),
              $sformatf("%s z[%0d][%0d] got %f expected %f", name, i, j, got, e));
      end
    n_ops++;
    if (tr) n_transposed++;
    if (sub) n_msub++;
    begin
      bit any_c;
      any_c = 1'b0;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) if (Cm[i][j] != 0.0) any_c = 1'b1;
      if (any_c && !sub) n_accum++;
    end
  endtask

  // Real-number helpers for the reference filter step.
  function automatic mat_t mmul(input mat_t X, input mat_t Y);
    mat_t R;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      R[i][j] = 0.0;
      for (int k = 0; k < N; k++) R[i][j] += X[i][k] * Y[k][j];
    end
    return R;
  endfunction

  function automatic mat_t mtr(input mat_t X);
    mat_t R;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) R[i][j] = X[j][i];
    return R;
  endfunction

  function automatic mat_t madd(input mat_t X, input mat_t Y, input real s);
    mat_t R;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) R[i][j] = X[i][j] + s * Y[i][j];
    return R;
  endfunction

  // Inverse of the leading m x m block (Gauss-Jordan); zero elsewhere.
  function automatic mat_t minv(input mat_t X, input int m);
    real a [N][2*N];
    mat_t R;
    for (int i = 0; i < m; i++)
      for (int j = 0; j < 2*m; j++)
        a[i][j] = (j < m) ? X[i][j] : ((j - m == i) ? 1.0 : 0.0);
    for (int c = 0; c < m; c++) begin
      real piv;
      piv = a[c][c];
      for (int j = 0; j < 2*m; j++) a[c][j] /= piv;
      for (int i = 0; i < m; i++)
        if (i != c) begin
          real f;
          f = a[i][c];
          for (int j = 0; j < 2*m; j++) a[i][j] -= f * a[c][j];
        end
    end
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
      R[i][j] = (i < m && j < m) ? a[i][j + m] : 0.0;
    return R;
  endfunction

  // Draw a value in [lo, hi] in steps of 1/8.
  function automatic real rnd(input real lo, input real hi);
    int steps;
    steps = int'((hi - lo) * 8.0);
    return lo + real'($urandom % (steps + 1)) / 8.0;
  endfunction

  task automatic kalman_step(input int n, input int p, input int m);
    mat_t F, G, Q, H, R, P, x, z, M, ZERO;
    mat_t QGt, b, PFt, S, GQGt, Sinv, K, a, Fx, inn, FaH, xn, Pn;
    mat_t rb, rS, rK, ra, rxn, rPn;
    real  scale;
    string tag;
    tag = $sformatf("n=%0d p=%0d m=%0d", n, p, m);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      F[i][j] = 0.0; G[i][j] = 0.0; Q[i][j] = 0.0; H[i][j] = 0.0; R[i][j] = 0.0;
      x[i][j] = 0.0; z[i][j] = 0.0; M[i][j] = 0.0; ZERO[i][j] = 0.0;
    end
    for (int i = 0; i < n; i++) for (int j = 0; j < n; j++)
      F[i][j] = (i == j) ? 1.0 : rnd(-0.25, 0.25);
    for (int i = 0; i < n; i++) for (int j = 0; j < p; j++) G[i][j] = rnd(0.0, 1.0);
    for (int i = 0; i < p; i++) Q[i][i] = rnd(0.5, 1.0);
    for (int i = 0; i < m; i++) for (int j = 0; j < n; j++) H[i][j] = rnd(0.0, 1.0);
    for (int i = 0; i < m; i++) R[i][i] = rnd(1.0, 2.0);
    for (int i = 0; i < n; i++) for (int j = 0; j < n; j++) M[i][j] = rnd(-0.5, 0.5);
    P = madd(mmul(M, mtr(M)), ZERO, 0.0);
    for (int i = 0; i < n; i++) P[i][i] += 1.0;
    for (int i = 0; i < n; i++) x[i][0] = rnd(-2.0, 2.0);
    for (int i = 0; i < m; i++) z[i][0] = rnd(-2.0, 2.0);

    // On the array (Table 7 order, inverse by the host).
    array_op({tag, " QG^T"},          Q,   G,    ZERO, 1'b1, 1'b0, QGt);
    array_op({tag, " b=PH^T"},        P,   H,    ZERO, 1'b1, 1'b0, b);
    array_op({tag, " PF^T"},          P,   F,    ZERO, 1'b1, 1'b0, PFt);
    array_op({tag, " R+Hb"},          H,   b,    R,    1'b0, 1'b0, S);
    array_op({tag, " G(QG^T)"},       G,   QGt,  ZERO, 1'b0, 1'b0, GQGt);
    Sinv = minv(S, m);
    array_op({tag, " K=bS^-1"},       b,   Sinv, ZERO, 1'b0, 1'b0, K);
    array_op({tag, " a=FK"},          F,   K,    ZERO, 1'b0, 1'b0, a);
    array_op({tag, " Fx"},            F,   x,    ZERO, 1'b0, 1'b0, Fx);
    array_op({tag, " z-Hx"},          H,   x,    z,    1'b0, 1'b1, inn);
    array_op({tag, " F-aH"},          a,   H,    F,    1'b0, 1'b1, FaH);
    array_op({tag, " Fx+a(z-Hx)"},    a,   inn,  Fx,   1'b0, 1'b0, xn);
    array_op({tag, " GQG^T+(F-aH)PF^T"}, FaH, PFt, GQGt, 1'b0, 1'b0, Pn);

    // Reference step in real numbers.
    rb  = mmul(P, mtr(H));
    rS  = madd(R, mmul(H, rb), 1.0);
    rK  = mmul(rb, minv(rS, m));
    ra  = mmul(F, rK);
    rxn = madd(mmul(F, x), mmul(ra, madd(z, mmul(H, x), -1.0)), 1.0);
    rPn = madd(mmul(mmul(G, Q), mtr(G)),
               mmul(madd(F, mmul(ra, H), -1.0), mmul(P, mtr(F))), 1.0);
    scale = 0.0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
      if (rPn[i][j] > scale) scale = rPn[i][j]; else if (-rPn[i][j] > scale) scale = -rPn[i][j];
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      real d;
      d = Pn[i][j] - rPn[i][j];
      check(d <= 0.03 * scale && -d <= 0.03 * scale,
            $sformatf("%s final P[%0d][%0d] got %f expected %f", tag, i, j, Pn[i][j], rPn[i][j]));
    end
    scale = 0.0;
    for (int i = 0; i < N; i++)
      if (rxn[i][0] > scale) scale = rxn[i][0]; else if (-rxn[i][0] > scale) scale = -rxn[i][0];
    for (int i = 0; i < N; i++) begin
      real d;
      d = xn[i][0] - rxn[i][0];
      check(d <= 0.03 * scale && -d <= 0.03 * scale,
            $sformatf("%s final x[%0d] got %f expected %f", tag, i, xn[i][0], rxn[i][0]));
    end
    // Padding stays zero: nothing leaks outside the n x n and n x 1 results.
    for (int i = n; i < N; i++) check(Pn[i][i] == 0.0 && xn[i][0] == 0.0,
                                      $sformatf("%s padding row %0d stays zero", tag, i));
    $display("%s: x' = %f %f %f %f %f", tag, xn[0][0], xn[1][0], xn[2][0], xn[3][0], xn[4][0]);
    n_steps++;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opcode_in = '0; left_in = '0; bottom_in = '{default: LNS_ZERO};
    tr_start = 1'b0; tr_dim = SW'(N); rr_mode = 2'd0; rr_m = SW'(N);
    clear_schedule();
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    program_array();
    kalman_step(5, 5, 5);
    kalman_step(5, 3, 2);

    $display("operations: %0d (transposed %0d, multiply-subtract %0d, accumulate %0d), filter steps %0d",
             n_ops, n_transposed, n_msub, n_accum, n_steps);
    check(n_steps == 2, "both filter sizes ran");
    check(n_transposed > 0, "transposed products happened");
    check(n_msub > 0, "multiply-subtract happened");
    check(n_accum > 0, "accumulation into C happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
