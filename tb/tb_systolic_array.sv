// tb_systolic_array: a 3 x 3 array driven directly at its boundaries.
// Checks the opcode wavefront (PE(r,c) acts on an opcode r+c clocks after
// PE(0,0): a one-clock "top = ground" microprogram shows up in every PE's
// top output exactly then), row-wise microcode loading, the skewed matrix
// load and Z = A*B + C with the product leaving row r of the right column.
module tb_systolic_array;
  import lns_pkg::*;
  import tb_lns_pkg::*;

  localparam int N = 3;
  localparam int TMAX = 100;

  logic                         clk = 1'b0;
  logic                         rst_n;
  logic [3:0]                   opcode_in;
  logic [N-1:0][31:0]           left_in;
  lns_t [N-1:0]                 bottom_in;
  lns_t [N-1:0]                 top_out;
  logic [N-1:0][31:0]           right_out;
  lns_t [N-1:0][N-1:0]          vert_out;
  logic [N-1:0][N-1:0][31:0]    horiz_out;
  logic [N-1:0][N-1:0]          overflow;
  logic                         overflow_any;
  int                           checks = 0, failures = 0;

  systolic_array #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  logic [3:0]  op_s  [TMAX];
  logic [31:0] row_s [N][TMAX];
  lns_t        col_s [N][TMAX];
  logic [31:0] rout  [N][TMAX];
  int          t;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int t1);
    for (int g = 0; g <= t1 + 2 * N + 1; g++) begin
      @(negedge clk);
      for (int r = 0; r < N; r++) begin
        int lt;
        lt = g - 1 - r - (N - 1);
        if (lt >= 0 && lt < TMAX) rout[r][lt] = right_out[r];
      end
      opcode_in = (g <= t1) ? op_s[g] : 4'(OP_NOP);
      for (int r = 0; r < N; r++) left_in[r] = (g - r >= 0 && g - r <= t1) ? row_s[r][g - r] : word(LNS_ZERO);
      for (int c = 0; c < N; c++) bottom_in[c] = (g - c >= 0 && g - c <= t1) ? col_s[c][g - c] : LNS_ZERO;
    end
  endtask

  task automatic put(input pe_op_e op, input logic [31:0] w);
    op_s[t] = 4'(op);
    for (int r = 0; r < N; r++) row_s[r][t] = w;
    t++;
  endtask

  initial begin
    real A [N][N], B [N][N], C [N][N];
    logic [31:0] gnd_w, mac_w;
    int ts;
    lns_t v;
    opcode_in = '0; left_in = '0; bottom_in = '{default: LNS_ZERO};
    for (int i = 0; i < TMAX; i++) begin
      op_s[i] = '0;
      for (int r = 0; r < N; r++) begin row_s[r][i] = '0; col_s[r][i] = LNS_ZERO; end
    end
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    gnd_w = mw(3'b111, SRC_LEFT, SRC_LEFT, SRC_LEFT, SRC_LEFT, SRC_LEFT,
               SRC_GND, SRC_LEFT, SRC_LEFT, 1'b0, 3'd0);
    mac_w = mw(3'b111, SRC_SCRATCH, SRC_BOTTOM, SRC_LEFT, SRC_LEFT, SRC_MULDIV,
               SRC_LEFT, SRC_ADDSUB, SRC_LEFT, 1'b0, 3'd0);
    // Microcode: load program at 0..N-1 (row r stores word N-1-r), MAC at 8, ground at 9.
    t = 0;
    put(OP_START1, 32'd0); put(OP_END1, 32'(N - 1));
    for (int k = 0; k < N; k++) begin
      op_s[t] = 4'(OP_WRITE);
      for (int r = 0; r < N; r++)
        row_s[r][t] = (k == N - 1 - r) ? mw(3'b111, SRC_LEFT, SRC_LEFT, SRC_LEFT, SRC_LEFT, SRC_LEFT,
                                            SRC_LEFT, SRC_LEFT, SRC_BOTTOM, 1'b1, 3'd0) : 32'h0;
      t++;
    end
    put(OP_START1, 32'd8); put(OP_END1, 32'd9);
    put(OP_WRITE, mac_w);  put(OP_WRITE, gnd_w);
    put(OP_START1, 32'd0); put(OP_END1, 32'(N - 1));
    put(OP_START2, 32'd8); put(OP_END2, 32'd8);
    put(OP_START4, 32'd9); put(OP_END4, 32'd9);
    run(t - 1);

    // Wavefront: constant v at all bottoms, one RUN4 opcode into PE(0,0).
    v = to_lns(5.0);
    @(negedge clk);
    bottom_in = '{default: v};
    repeat (2 * N + 2) @(negedge clk);
    opcode_in = 4'(OP_RUN4);
    @(negedge clk);
    opcode_in = 4'(OP_NOP);
    for (int k = 0; k < 2 * N + 1; k++) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          check((vert_out[r][c] == LNS_ZERO) == (k == r + c),
                $sformatf("wavefront PE(%0d,%0d) clock %0d", r, c, k));
      @(negedge clk);
    end
    bottom_in = '{default: LNS_ZERO};
    repeat (2 * N) @(negedge clk);

    // Z = A*B + C.
    for (int i = 0; i < TMAX; i++) begin
      op_s[i] = '0;
      for (int r = 0; r < N; r++) begin row_s[r][i] = '0; col_s[r][i] = LNS_ZERO; end
    end
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      A[i][j] = real'(($urandom % 9) + 1) * ((($urandom % 2) == 0) ? 1.0 : -0.5);
      B[i][j] = real'(($urandom % 7) + 1);
      C[i][j] = real'($urandom % 4);
    end
    t = 0;
    for (int k = 0; k < N; k++) begin
      op_s[t] = 4'(OP_RUN1);
      for (int c = 0; c < N; c++) col_s[c][t] = to_lns(A[N-1-k][c]);
      t++;
    end
    ts = t;
    for (int j = 0; j < N; j++) begin
      op_s[t] = 4'(OP_RUN2);
      for (int c = 0; c < N; c++) col_s[c][t] = to_lns(B[c][j]);
      for (int r = 0; r < N; r++) row_s[r][t] = word(to_lns(C[r][j]));
      t++;
    end
    run(t - 1);
    for (int r = 0; r < N; r++)
      for (int j = 0; j < N; j++) begin
        real z;
        z = C[r][j];
        for (int k = 0; k < N; k++) z += A[r][k] * B[k][j];
        check(close(to_real(lns_t'(rout[r][ts + j][20:0])), z, 0.01),
              $sformatf("z[%0d][%0d] got %f expected %f", r, j, to_real(lns_t'(rout[r][ts + j][20:0])), z));
      end
    check(!overflow_any, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
