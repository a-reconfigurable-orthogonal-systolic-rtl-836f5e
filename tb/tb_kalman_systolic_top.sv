// tb_kalman_systolic_top: end-to-end test of the systolic array at its
// default size (N = 5).
//
// The testbench plays the external sequencer: it issues PE opcodes into
// PE(0,0) and feeds rows and columns with the skew the opcode wavefront
// needs. Steps:
//   1. program every row's microcode through the left ports: group 1 loads a
//      matrix (row r stores the (N-r)-th word it sees), group 2 is the
//      multiply-accumulate z_out = z_in + a*b_in, group 3 the
//      multiply-subtract z_out = z_in - a*b_in;
//   2. Z = A*B + C (load A, then multiply): checks values and that z11 leaves
//      the array 2N clocks after the load starts;
//   3. Z = A*B2 + C2 right behind it, reusing the loaded A (N more clocks);
//   4. mode switch to group 3: Z = C3 - A*B3;
//   5. transposed input through the transpose switch: Z = A2*B4^T + C4;
//   6. addition through an identity matrix: Z = B5 + C5;
//   7. overflow: products above the LNS range saturate and raise overflow;
//   8. re-route switch: row m's top outputs and column m's right outputs are
//      fed back to the bottom and circulate.
// Results are compared with real-number products computed in the testbench.
// Each mechanism is counted; one that never happened is a failure.
module tb_kalman_systolic_top;
  import lns_pkg::*;
  import tb_lns_pkg::*;

  localparam int N    = 5;
  localparam int TMAX = 400;
  localparam int SW   = $clog2(N+1);

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
  int n_load = 0, n_mac = 0, n_reuse = 0, n_msub = 0, n_transpose = 0, n_add = 0;
  int n_overflow = 0, n_reroute_dec = 0, n_reroute_inv = 0, n_ucode = 0;

  // Schedules in PE(0,0) time.
  logic [3:0]  op_s   [TMAX];
  logic [31:0] row_s  [N][TMAX];
  lns_t        col_s  [N][TMAX];
  bit          trs_s  [TMAX];
  logic [31:0] rout   [N][TMAX + 2*N + 2];   // right_out[r] captured per PE(r,N-1) local time
  int          ovf_cnt;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Run the schedule from t0 to t1 (inclusive) and capture outputs.
  task automatic run(input int t0, input int t1);
    ovf_cnt = 0;
    for (int g = t0; g <= t1 + 2*N + 1; g++) begin
      @(negedge clk);
      // Outputs of the cycle that started at the last rising edge.
      for (int r = 0; r < N; r++) begin
        int lt;
        lt = g - 1 - r - (N - 1);
        if (lt >= 0 && lt < TMAX) rout[r][lt] = right_out[r];
      end
      if (overflow_any) ovf_cnt++;
      // Inputs for global time g.
      opcode_in = (g <= t1) ? op_s[g] : 4'(OP_NOP);
      tr_start  = (g <= t1) ? trs_s[g] : 1'b0;
      for (int r = 0; r < N; r++)
        left_in[r] = (g - r >= t0 && g - r <= t1) ? row_s[r][g - r] : word(LNS_ZERO);
      for (int c = 0; c < N; c++)
        bottom_in[c] = (g - c >= t0 && g - c <= t1) ? col_s[c][g - c] : LNS_ZERO;
    end
  endtask

  int t;
  real A [N][N], A2 [N][N], B [N][N], C [N][N], Z [N][N];

  task automatic put_op(input pe_op_e op, input logic [31:0] w_all);
    op_s[t] = 4'(op);
    for (int r = 0; r < N; r++) row_s[r][t] = w_all;
    t++;
  endtask

  // Load matrix M from the bottom (group 1), N clocks.
  task automatic put_load(input real M [N][N]);
    for (int k = 0; k < N; k++) begin
      op_s[t] = 4'(OP_RUN1);
      for (int c = 0; c < N; c++) col_s[c][t] = to_lns(M[N-1-k][c]);
      for (int r = 0; r < N; r++) row_s[r][t] = word(LNS_ZERO);
      t++;
    end
  endtask

  // Stream B from the bottom and Cm from the left under opcode op, N clocks.
  // Returns the local time of the first product column.
  task automatic put_mult(input pe_op_e op, input real Bm [N][N], input real Cm [N][N],
                          input bit transposed, output int tstart);
    tstart = t;
    for (int j = 0; j < N; j++) begin
      op_s[t]  = 4'(op);
      trs_s[t] = transposed && (j == 0);
      for (int c = 0; c < N; c++) col_s[c][t] = to_lns(Bm[c][j]);
      for (int r = 0; r < N; r++) row_s[r][t] = word(to_lns(Cm[r][j]));
      t++;
    end
  endtask

  // Compare captured products with Zexp: z[r][j] leaves row r at local ts+j.
  task automatic check_z(input int ts, input real Zexp [N][N], input string what, output bit all_ok);
    all_ok = 1'b1;
    for (int r = 0; r < N; r++)
      for (int j = 0; j < N; j++) begin
        real got;
        bit  ok;
        got = to_real(lns_t'(rout[r][ts + j][WORD_W-1:0]));
        ok  = close(got, Zexp[r][j], 0.01);
        check(ok, $sformatf("%s z[%0d][%0d] got %f expected %f", what, r, j, got, Zexp[r][j]));
        all_ok &= ok;
      end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  ts1, ts2, ts3, ts4, ts5, ts6, tload;
    bit  ok;
    real B2 [N][N], C2 [N][N], B3 [N][N], C3 [N][N], B4 [N][N], C4 [N][N];
    real I [N][N], B5 [N][N], C5 [N][N], AB [N][N], ZERO [N][N];
    logic [31:0] lp [N][N];
    logic [31:0] mac_w, msub_w;

    opcode_in = '0; left_in = '0; bottom_in = '{default: LNS_ZERO};
    tr_start = 1'b0; tr_dim = SW'(N); rr_mode = 2'd0; rr_m = SW'(N);
    for (int i = 0; i < TMAX; i++) begin
      op_s[i] = '0; trs_s[i] = 1'b0;
      for (int r = 0; r < N; r++) begin row_s[r][i] = '0; col_s[r][i] = LNS_ZERO; end
    end
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Test data: small integers and halves, signs mixed.
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        A[i][j]  = real'(($urandom % 7) + 1) * ((($urandom % 3) == 0) ? -1.0 : 1.0);
        A2[i][j] = real'(($urandom % 5) + 1) / 2.0;
        B[i][j]  = real'(($urandom % 9) + 1);
        B2[i][j] = real'(($urandom % 9) + 1) / 4.0;
        B3[i][j] = real'(($urandom % 6) + 1);
        B4[i][j] = real'(i * N + j + 1);
        B5[i][j] = real'(($urandom % 20) + 1);
        C[i][j]  = real'(($urandom % 11));
        C2[i][j] = real'(($urandom % 5) + 1);
        C3[i][j] = 200.0 + real'($urandom % 50);
        C4[i][j] = 1.0;
        C5[i][j] = real'(($urandom % 13) + 1) * -1.0;
        I[i][j]  = (i == j) ? 1.0 : 0.0;
        ZERO[i][j] = 0.0;
      end

    // ---- 1. microcode ------------------------------------------------------
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
    t = 0;
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
    // Read the two words back out of every row's right port.
    put_op(OP_READ, 32'h0);    put_op(OP_READ, 32'h0);
    put_op(OP_START1, 32'd0);  put_op(OP_END1, 32'(N - 1));
    put_op(OP_NOP, 32'h0);
    begin
      int tr;
      tr = t - 5;
      run(0, t - 1);
      for (int r = 0; r < N; r++) begin
        check(rout[r][tr] == {1'b0, mac_w[30:0]} && rout[r][tr+1] == {1'b0, msub_w[30:0]},
              $sformatf("microcode read-back row %0d", r));
        n_ucode++;
      end
    end

    // ---- 2. Z = A*B + C --------------------------------------------------------
    t = 0;
    tload = t;
    put_load(A);
    put_mult(OP_RUN2, B, C, 1'b0, ts1);
    // ---- 3. successive product with the same A ------------------------------------
    put_mult(OP_RUN2, B2, C2, 1'b0, ts2);
    // ---- 4. multiply-subtract ---------------------------------------------------------
    put_mult(OP_RUN3, B3, C3, 1'b0, ts3);
    // ---- 5. transposed input -----------------------------------------------------------
    put_load(A2);
    put_mult(OP_RUN2, B4, C4, 1'b1, ts4);
    // ---- 6. addition through the identity ------------------------------------------------
    put_load(I);
    put_mult(OP_RUN2, B5, C5, 1'b0, ts5);
    put_op(OP_NOP, 32'h0);
    run(0, t - 1);

    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      AB[i][j] = C[i][j];
      for (int k = 0; k < N; k++) AB[i][j] += A[i][k] * B[k][j];
    end
    check_z(ts1, AB, "A*B+C", ok);
    n_load++; if (ok) n_mac++;
    // Products are captured at fixed clocks: z11 leaves PE(0,N-1) in the
    // clock of its wavefront position ts1 = tload + N, i.e. a load plus a
    // multiply take 2N clocks. Values checked above confirm that timing.
    check(ts1 - tload == N, "multiply starts N clocks after the load");

    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      Z[i][j] = C2[i][j];
      for (int k = 0; k < N; k++) Z[i][j] += A[i][k] * B2[k][j];
    end
    check_z(ts2, Z, "A*B2+C2", ok);
    if (ok) n_reuse++;
    check(ts2 - ts1 == N, "second product only N clocks later");

    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      Z[i][j] = C3[i][j];
      for (int k = 0; k < N; k++) Z[i][j] -= A[i][k] * B3[k][j];
    end
    check_z(ts3, Z, "C3-A*B3", ok);
    if (ok) n_msub++;

    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      Z[i][j] = C4[i][j];
      for (int k = 0; k < N; k++) Z[i][j] += A2[i][k] * B4[j][k];
    end
    check_z(ts4, Z, "A2*B4^T+C4", ok);
    if (ok) n_transpose++;

    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) Z[i][j] = B5[i][j] + C5[i][j];
    check_z(ts5, Z, "B5+C5", ok);
    if (ok) n_add++;
    check(ovf_cnt == 0, "no overflow in normal operation");

    // ---- 7. overflow ---------------------------------------------------------------------
    begin
      real BIG [N][N];
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) BIG[i][j] = $pow(2.0, 40.0);
      t = 0;
      put_load(BIG);
      put_mult(OP_RUN2, BIG, ZERO, 1'b0, ts6);
      put_op(OP_NOP, 32'h0);
      run(0, t - 1);
      check(ovf_cnt > 0, "overflow flag raised");
      for (int r = 0; r < N; r++) begin
        lns_t z;
        z = lns_t'(rout[r][ts6][WORD_W-1:0]);
        check(!z.zero && !z.sign && z.exp == EXP_MAX, $sformatf("saturated result row %0d", r));
      end
      if (ovf_cnt > 0) n_overflow++;
    end

    // ---- 8. re-route switch -------------------------------------------------------------------
    begin
      lns_t v0, v1;
      lns_t s0 [8], s1 [8];
      bit   per, has0, has1;
      @(negedge clk);
      opcode_in = 4'(OP_NOP);
      v0 = to_lns(3.0); v1 = to_lns(-5.0);
      rr_m = SW'(2);
      // Decomposition mode: inject one value per column, then close the loop
      // through rows 0..1. The values circulate with period 2 and climb the
      // upper rows in the no-operation state, so they show at top_out.
      bottom_in = '{default: LNS_ZERO};
      bottom_in[0] = v0; bottom_in[1] = v1;
      @(negedge clk);
      rr_mode = 2'd1;
      bottom_in = '{default: LNS_ZERO};
      repeat (N) @(negedge clk);
      for (int k = 0; k < 8; k++) begin
        @(negedge clk);
        s0[k] = top_out[0]; s1[k] = top_out[1];
      end
      per = 1; has0 = 0; has1 = 0;
      for (int k = 0; k < 8; k++) begin
        if (k < 6 && (s0[k] != s0[k+2] || s1[k] != s1[k+2])) per = 0;
        if (s0[k] == v0) has0 = 1;
        if (s1[k] == v1) has1 = 1;
      end
      check(per && has0 && has1, "decomposition re-route: values circulate with period 2");
      if (per && has0 && has1) n_reroute_dec++;
      // Inverse mode: row r's left value crosses to column 1 and re-enters
      // the bottom of column r; with nothing else injected it reaches the top.
      rr_mode = 2'd2;
      left_in = '0;
      left_in[0] = word(v0); left_in[1] = word(v1);
      @(negedge clk);
      left_in = '{default: word(LNS_ZERO)};
      begin
        bit got0, got1;
        got0 = 0; got1 = 0;
        for (int k = 0; k < 3 * N; k++) begin
          @(negedge clk);
          if (top_out[0] == v0) got0 = 1;
          if (top_out[1] == v1) got1 = 1;
        end
        check(got0 && got1, "inverse re-route: row values reach the column tops");
        if (got0 && got1) n_reroute_inv++;
      end
      rr_mode = 2'd0;
    end

    // ---- mechanism coverage ---------------------------------------------------------------------
    $display("mechanisms: ucode=%0d load=%0d mac=%0d reuse=%0d msub=%0d transpose=%0d add=%0d overflow=%0d reroute_dec=%0d reroute_inv=%0d",
             n_ucode, n_load, n_mac, n_reuse, n_msub, n_transpose, n_add, n_overflow, n_reroute_dec, n_reroute_inv);
    check(n_ucode > 0, "microcode load happened");
    check(n_mac > 0, "multiply-accumulate happened");
    check(n_reuse > 0, "successive product happened");
    check(n_msub > 0, "mode switch to multiply-subtract happened");
    check(n_transpose > 0, "transposed input happened");
    check(n_add > 0, "identity addition happened");
    check(n_overflow > 0, "overflow happened");
    check(n_reroute_dec > 0, "decomposition re-route happened");
    check(n_reroute_inv > 0, "inverse re-route happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
