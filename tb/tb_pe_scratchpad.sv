// tb_pe_scratchpad: writes all eight words, reads them back through the
// asynchronous port, and checks that a clock without write enable leaves the
// contents unchanged.
module tb_pe_scratchpad;
  import lns_pkg::*;

  logic       clk = 1'b0;
  logic       we;
  logic [2:0] addr;
  lns_t       d, q;
  lns_t       model [8];
  int         checks = 0, failures = 0;

  pe_scratchpad dut (.*);

  always #5 clk = ~clk;

  initial begin
    we = 1'b0; addr = '0; d = LNS_ZERO;
    for (int round = 0; round < 4; round++) begin
      for (int a = 0; a < 8; a++) begin
        @(negedge clk);
        we = 1'b1; addr = 3'(a); d = lns_t'(21'($urandom));
        model[a] = d;
      end
      @(negedge clk);
      we = 1'b0;
      // Writes with the enable low must not land.
      for (int a = 0; a < 8; a++) begin
        addr = 3'(a); d = lns_t'(21'($urandom));
        @(negedge clk);
      end
      for (int a = 7; a >= 0; a--) begin
        addr = 3'(a);
        #1;
        checks++;
        if (q != model[a]) begin
          failures++;
          $display("FAIL: addr %0d read %h expected %h", a, q, model[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
