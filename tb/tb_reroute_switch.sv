// tb_reroute_switch: random PE outputs; checks for every mode and every m
// that the m left-most columns take row m's top outputs (decomposition) or
// column m's right outputs of rows 1..m (inverse), and that all other columns
// and the off mode pass the external inputs.
module tb_reroute_switch;
  import lns_pkg::*;

  localparam int N = 5;
  localparam int SW = $clog2(N+1);

  logic [1:0]                   mode;
  logic [SW-1:0]                m;
  lns_t [N-1:0]                 ext_in, col_out;
  lns_t [N-1:0][N-1:0]          vert;
  logic [N-1:0][N-1:0][31:0]    horiz;
  int                           checks = 0, failures = 0;

  reroute_switch #(.N(N)) dut (.*);

  initial begin
    for (int trial = 0; trial < 20; trial++) begin
      for (int i = 0; i < N; i++) begin
        ext_in[i] = lns_t'(21'($urandom));
        for (int j = 0; j < N; j++) begin
          vert[i][j]  = lns_t'(21'($urandom));
          horiz[i][j] = $urandom;
        end
      end
      for (int md = 0; md < 3; md++)
        for (int mm = 1; mm <= N; mm++) begin
          mode = 2'(md); m = SW'(mm);
          #1;
          for (int c = 0; c < N; c++) begin
            lns_t e;
            if (md == 1 && c < mm)      e = vert[mm-1][c];
            else if (md == 2 && c < mm) e = lns_t'(horiz[c][mm-1][20:0]);
            else                        e = ext_in[c];
            checks++;
            if (col_out[c] != e) begin
              failures++;
              $display("FAIL: mode %0d m %0d col %0d", md, mm, c);
            end
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
