// tb_processing_element: one PE driven through its ports.
// Checks: opcode forwarding (one clock), the no-operation paths (bottom to
// top, full 32-bit left word to right), microcode loading through the left
// port, the multiply-accumulate step of matrix multiplication
// (z_out = z_in + a*b_in with a in the scratch pad), the diagonal cell of the
// Cholesky decomposition (u = sqrt(c) stored and sent up, then c/u sent up),
// the non-diagonal decomposition step (c_out = c_in - u*u_in), the hold and
// ground sources, the overflow output, and the 2 x 2 inversion example
// (C = [1 2; 2 5]) worked step by step through these cell programs.
module tb_processing_element;
  import lns_pkg::*;
  import tb_lns_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [3:0]  opcode_in, opcode_out;
  logic [31:0] left_in, right_out;
  lns_t        bottom_in, top_out;
  logic        overflow;
  int          checks = 0, failures = 0;

  processing_element dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Drive one clock of inputs; outputs are sampled in the following clock.
  task automatic drive(input pe_op_e op, input logic [31:0] l, input lns_t b);
    @(negedge clk);
    opcode_in = 4'(op); left_in = l; bottom_in = b;
  endtask

  task automatic settle();
    @(posedge clk);
    #1;
  endtask

  initial begin
    logic [31:0] w_load, w_mac, w_diag0, w_diag1, w_nd, w_hold, w_ovf;
    real         a;
    opcode_in = '0; left_in = '0; bottom_in = LNS_ZERO;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // No operation: bottom to top, left to right, opcode forwarded.
    drive(OP_PASS, 32'hDEAD_BEEF, to_lns(6.0));
    @(posedge clk); #1;
    check(opcode_out == 4'(OP_PASS), "opcode forwarded after one clock");
    check(right_out == 32'hDEAD_BEEF, "pass: full left word to the right");
    check(top_out == to_lns(6.0), "nop: bottom to top");

    // Microcode: 0 store bottom into mem[0]; 1 MAC; 2,3 diagonal cell; 4 non-diagonal; 5 hold/ground; 6 overflow.
    w_load  = mw(3'b111, SRC_LEFT, SRC_LEFT, SRC_LEFT, SRC_LEFT, SRC_LEFT,
                 SRC_LEFT, SRC_LEFT, SRC_BOTTOM, 1'b1, 3'd0);
    w_mac   = mw(3'b111, SRC_SCRATCH, SRC_BOTTOM, SRC_LEFT, SRC_LEFT, SRC_MULDIV,
                 SRC_LEFT, SRC_ADDSUB, SRC_LEFT, 1'b0, 3'd0);
    // Diagonal, first clock: u = sqrt(c_in) to top and to mem[2].
    w_diag0 = mw(3'b000, SRC_LEFT, SRC_LEFT, SRC_LEFT, SRC_LEFT, SRC_LEFT,
                 SRC_SQR, SRC_BOTTOM, SRC_SQR, 1'b1, 3'd2);
    // Diagonal, later clocks: c_in / u to top, u_in to the right.
    w_diag1 = mw(3'b000, SRC_LEFT, SRC_SCRATCH, SRC_LEFT, SRC_LEFT, SRC_LEFT,
                 SRC_MULDIV, SRC_BOTTOM, SRC_LEFT, 1'b0, 3'd2);
    // Non-diagonal: c_out = c_in - u*u_in with u in mem[0]; u_in passes up.
    w_nd    = mw(3'b110, SRC_SCRATCH, SRC_BOTTOM, SRC_LEFT, SRC_LEFT, SRC_MULDIV,
                 SRC_LEFT, SRC_ADDSUB, SRC_LEFT, 1'b0, 3'd0);
    // Hold on top, ground on the right.
    w_hold  = mw(3'b111, SRC_LEFT, SRC_LEFT, SRC_LEFT, SRC_LEFT, SRC_LEFT,
                 SRC_HOLD, SRC_GND, SRC_LEFT, 1'b0, 3'd0);
    // Square of the left input to the right (overflows for large inputs).
    w_ovf   = mw(3'b111, SRC_LEFT, SRC_LEFT, SRC_LEFT, SRC_LEFT, SRC_LEFT,
                 SRC_LEFT, SRC_SQR, SRC_LEFT, 1'b0, 3'd0);

    drive(OP_START1, 32'd0, LNS_ZERO); drive(OP_END1, 32'd6, LNS_ZERO);
    drive(OP_WRITE, w_load, LNS_ZERO);  drive(OP_WRITE, w_mac, LNS_ZERO);
    drive(OP_WRITE, w_diag0, LNS_ZERO); drive(OP_WRITE, w_diag1, LNS_ZERO);
    drive(OP_WRITE, w_nd, LNS_ZERO);    drive(OP_WRITE, w_hold, LNS_ZERO);
    drive(OP_WRITE, w_ovf, LNS_ZERO);
    // Groups: 1 = load (0..0), 2 = MAC (1..1), 3 = diagonal (2..3), 4 = non-diagonal (4..4).
    drive(OP_END1, 32'd0, LNS_ZERO);
    drive(OP_START2, 32'd1, LNS_ZERO); drive(OP_END2, 32'd1, LNS_ZERO);
    drive(OP_START3, 32'd2, LNS_ZERO); drive(OP_END3, 32'd3, LNS_ZERO);
    drive(OP_START4, 32'd4, LNS_ZERO); drive(OP_END4, 32'd4, LNS_ZERO);

    // Load a = 1.5 from the bottom, then MAC.
    a = 1.5;
    drive(OP_RUN1, 32'h0, to_lns(a));
    for (int k = 0; k < 6; k++) begin
      real zin, bin;
      zin = real'(k) - 2.0;
      bin = real'(k) + 0.5;
      drive(OP_RUN2, word(to_lns(zin)), to_lns(bin));
      settle();
      check(close(to_real(lns_t'(right_out[20:0])), zin + a * bin, 0.005),
            $sformatf("MAC k=%0d got %f expected %f", k, to_real(lns_t'(right_out[20:0])), zin + a * bin));
      check(top_out == to_lns(bin), "MAC passes b upward");
    end

    // Diagonal cell: c = 9 gives u = 3; then 6/3 = 2, -12/3 = -4.
    drive(OP_RUN3, word(to_lns(9.0)), to_lns(7.0));
    settle();
    check(top_out == to_lns(3.0), "diagonal: sqrt(9) = 3 sent up");
    check(right_out[20:0] == to_lns(7.0), "diagonal: u_in to the right");
    drive(OP_RUN3, word(to_lns(6.0)), LNS_ZERO);
    settle();
    check(top_out == to_lns(2.0), "diagonal: 6 / u = 2");
    drive(OP_RUN3, word(to_lns(-12.0)), LNS_ZERO);  // group wraps to the sqrt word
    settle();
    check(close(to_real(top_out), $sqrt(12.0), 0.005), "group wrapped: root of |-12| sent up");

    // Non-diagonal: u = 1.5 still in mem[0]; c_out = c_in - 1.5 * u_in.
    drive(OP_RUN4, word(to_lns(10.0)), to_lns(2.0));
    settle();
    check(close(to_real(lns_t'(right_out[20:0])), 7.0, 0.005), "non-diagonal: 10 - 1.5*2 = 7");
    check(top_out == to_lns(2.0), "non-diagonal: u_in passes up");

    // The 2 x 2 example C = [1 2; 2 5] worked step by step through the same
    // cell programs: U = [1 2; 0 1], V = U^-1 = [1 -2; 0 1].
    drive(OP_RUN3, word(to_lns(1.0)), LNS_ZERO);
    settle();
    check(top_out == to_lns(1.0), "2x2: u11 = sqrt(c11) = 1");
    drive(OP_RUN3, word(to_lns(2.0)), LNS_ZERO);
    settle();
    check(top_out == to_lns(2.0), "2x2: u12 = c12 / u11 = 2");
    drive(OP_RUN1, 32'h0, to_lns(2.0));                 // keep u12
    drive(OP_RUN4, word(to_lns(5.0)), to_lns(2.0));
    settle();
    check(close(to_real(lns_t'(right_out[20:0])), 1.0, 0.005), "2x2: c22 - u12*u12 = 1");
    drive(OP_RUN3, word(to_lns(1.0)), LNS_ZERO);
    settle();
    check(top_out == to_lns(1.0), "2x2: u22 = 1");
    drive(OP_RUN3, word(to_lns(1.0)), LNS_ZERO);
    settle();
    check(top_out == to_lns(1.0), "2x2: v22 = 1 / u22 = 1");
    drive(OP_RUN1, 32'h0, to_lns(1.0));                 // keep v11 = 1 / u11
    drive(OP_RUN4, word(LNS_ZERO), to_lns(2.0));
    settle();
    check(close(to_real(lns_t'(right_out[20:0])), -2.0, 0.005), "2x2: 0 - v11*u12 = -2");
    drive(OP_RUN3, word(to_lns(1.0)), LNS_ZERO);        // u22 again
    drive(OP_RUN3, word(to_lns(-2.0)), LNS_ZERO);
    settle();
    check(close(to_real(top_out), -2.0, 0.005), "2x2: v12 = -2 / u22 = -2");

    // Hold: run word 5 through group 1 range 5..5.
    drive(OP_START1, 32'd5, LNS_ZERO); drive(OP_END1, 32'd5, LNS_ZERO);
    drive(OP_NOP, 32'h0, to_lns(4.0));
    drive(OP_RUN1, 32'h0, to_lns(8.0));
    settle();
    check(top_out == to_lns(4.0), "hold repeats the previous top value");
    check(right_out[20:0] == LNS_ZERO, "ground is the LNS zero");

    // Overflow: square of 2^40 exceeds the range.
    drive(OP_START1, 32'd6, LNS_ZERO); drive(OP_END1, 32'd6, LNS_ZERO);
    drive(OP_RUN1, word(to_lns($pow(2.0, 40.0))), LNS_ZERO);
    settle();
    check(overflow && right_out[20:0] == {2'b00, EXP_MAX}, "overflow flagged and saturated");
    drive(OP_RUN1, word(to_lns(4.0)), LNS_ZERO);
    settle();
    check(!overflow && right_out[20:0] == to_lns(16.0), "4^2 = 16 without overflow");

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
