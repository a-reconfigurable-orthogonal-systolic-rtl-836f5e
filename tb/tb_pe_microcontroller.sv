// tb_pe_microcontroller: loads group start/end addresses, writes microwords
// with opcode 1111, and checks that "run counter k" steps through the group,
// wraps from the end address to the start, restarts when the opcode changes,
// that reads return the stored words and that other opcodes give the zero
// microword.
module tb_pe_microcontroller;
  import lns_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  pe_op_e      opcode;
  logic [31:0] left_word;
  ctrl_word_t  cw;
  logic [31:0] rd_word;
  logic        rd_valid;
  int          checks = 0, failures = 0;

  pe_microcontroller dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Apply an opcode for one clock; sample the microword in that clock.
  task automatic step(input pe_op_e op, input logic [31:0] w, output logic [31:0] cw_seen,
                      output logic [31:0] rd_seen);
    @(negedge clk);
    opcode = op; left_word = w;
    #1;
    cw_seen = 32'(cw);
    rd_seen = rd_word;
  endtask

  initial begin
    logic [31:0] c, r;
    logic [31:0] words [6];
    opcode = OP_NOP; left_word = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 6; i++) words[i] = {1'b0, 31'($urandom)};

    // Group 2 = 100..102, group 3 = 500..502, write both through group 1.
    step(OP_START2, 32'd100, c, r); step(OP_END2, 32'd102, c, r);
    step(OP_START3, 32'd500, c, r); step(OP_END3, 32'd502, c, r);
    step(OP_START1, 32'd100, c, r); step(OP_END1, 32'd102, c, r);
    check(c == 0, "load opcodes give the zero microword");
    for (int i = 0; i < 3; i++) step(OP_WRITE, words[i], c, r);
    step(OP_START1, 32'd500, c, r); step(OP_END1, 32'd502, c, r);
    for (int i = 3; i < 6; i++) step(OP_WRITE, words[i], c, r);

    // Run group 2 for 7 clocks: w0 w1 w2 w0 w1 w2 w0.
    for (int k = 0; k < 7; k++) begin
      step(OP_RUN2, 32'h0, c, r);
      check(c == words[k % 3], $sformatf("run2 clock %0d got %h", k, c));
    end
    // Switching to group 3 restarts at its start address.
    for (int k = 0; k < 4; k++) begin
      step(OP_RUN3, 32'h0, c, r);
      check(c == words[3 + (k % 3)], $sformatf("run3 clock %0d got %h", k, c));
    end
    step(OP_NOP, 32'h0, c, r);
    check(c == 0, "nop gives the zero microword");
    step(OP_PASS, 32'h0, c, r);
    check(c == 0, "pass gives the zero microword");
    // A new run of group 2 starts over.
    step(OP_RUN2, 32'h0, c, r);
    check(c == words[0], "run2 restarts at start address");
    // Read back group 1's range (500..502).
    for (int k = 0; k < 3; k++) begin
      step(OP_READ, 32'h0, c, r);
      check(rd_valid && r == words[3 + k] && c == 0, $sformatf("read %0d got %h", k, r));
    end
    // Reset clears the address registers.
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    // All start/end addresses are now 0: a write lands at 0 and group 4 runs it.
    step(OP_WRITE, words[5] ^ 32'h1234, c, r);
    step(OP_RUN4, 32'h0, c, r);
    check(c == (words[5] ^ 32'h1234), "after reset group 4 runs address 0");
    step(OP_RUN4, 32'h0, c, r);
    check(c == (words[5] ^ 32'h1234), "group 4 of length one repeats");
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
