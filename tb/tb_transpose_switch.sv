// tb_transpose_switch: streams matrices in the skewed column order used by
// the array (column c carries b_cj in clock c+j) and checks that with start
// asserted on b11 every column carries the transposed matrix (b_jc in clock
// c+j), that the columns pass straight through otherwise, and that a smaller
// dim x dim matrix is transposed only for dim clocks per column.
module tb_transpose_switch;
  import lns_pkg::*;
  import tb_lns_pkg::*;

  localparam int N = 5;
  localparam int SW = $clog2(N+1);

  logic          clk = 1'b0;
  logic          rst_n;
  logic          start;
  logic [SW-1:0] dim;
  lns_t [N-1:0]  col_in, col_out;
  int            checks = 0, failures = 0;

  transpose_switch #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  lns_t b [N][N];

  task automatic stream(input bit transposed, input int sz);
    for (int g = 0; g < 2 * N + 1; g++) begin
      @(negedge clk);
      start = transposed && (g == 0);
      dim   = SW'(sz);
      for (int c = 0; c < N; c++) begin
        int j;
        j = g - c;
        col_in[c] = (j >= 0 && j < N) ? b[c][j] : LNS_ZERO;
      end
      #1;
      for (int c = 0; c < N; c++) begin
        int j;
        lns_t e;
        j = g - c;
        if (j >= 0 && j < N) begin
          if (transposed && c < sz && j < sz) e = b[j][c];
          else                                e = b[c][j];
          checks++;
          if (col_out[c] != e) begin
            failures++;
            $display("FAIL: t=%0b sz=%0d g=%0d col %0d got %h expected %h", transposed, sz, g, c, col_out[c], e);
          end
        end
      end
    end
  endtask

  initial begin
    start = 1'b0; dim = SW'(N); col_in = '{default: LNS_ZERO};
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) b[i][j] = to_lns(real'(10 * (i + 1) + j + 1));
    stream(1'b0, N);
    stream(1'b1, N);
    stream(1'b0, N);
    stream(1'b1, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
