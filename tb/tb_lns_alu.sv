// tb_lns_alu: checks the three LNS ALU sections.
// Multiply, divide, square and square root are exact on exponents and are
// compared bit for bit. Addition and subtraction are compared with real
// arithmetic on the decoded operands, within 16 exponent LSBs (the table
// resolution plus the cut-off at D = 9). Zero operands, division by zero,
// overflow saturation and underflow to zero are checked separately.
module tb_lns_alu;
  import lns_pkg::*;
  import tb_lns_pkg::*;

  alu_op_t op;
  lns_t x_square, x_mult, y_mult, x_add, y_add;
  lns_t z_square, z_mult, z_add;
  logic ovf_square, ovf_mult, ovf_add, overflow;

  lns_alu dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic lns_t rnd(input int range_lsb);
    lns_t r;
    r.zero = 1'b0;
    r.sign = 1'($urandom);
    r.exp  = EXP_W'(int'($urandom % (2 * range_lsb)) - range_lsb);
    return r;
  endfunction

  initial begin
    x_square = LNS_ZERO; x_mult = LNS_ZERO; y_mult = LNS_ZERO; x_add = LNS_ZERO; y_add = LNS_ZERO;
    op = 3'b111;
    for (int i = 0; i < 400; i++) begin
      lns_t a, b;
      real  ra, rb, rz, e_exp, e_got;
      a = rnd(20 * 4096);
      b = rnd(20 * 4096);
      op = 3'($urandom);
      x_square = a; x_mult = a; y_mult = b; x_add = a; y_add = b;
      #1;
      // multiply / divide
      if (op[2])
        check(!z_mult.zero && z_mult.sign == (a.sign ^ b.sign) && z_mult.exp == a.exp + b.exp,
              $sformatf("mul %h %h -> %h", a, b, z_mult));
      else
        check(!z_mult.zero && z_mult.sign == (a.sign ^ b.sign) && z_mult.exp == a.exp - b.exp,
              $sformatf("div %h %h -> %h", a, b, z_mult));
      // square / root
      if (op[1])
        check(!z_square.sign && z_square.exp == (a.exp <<< 1), $sformatf("sqr %h -> %h", a, z_square));
      else
        check(!z_square.sign && z_square.exp == (a.exp >>> 1), $sformatf("sqrt %h -> %h", a, z_square));
      // add / subtract, skipping near-cancellation (|D| < 0.5)
      ra = to_real(a); rb = to_real(b);
      rz = op[0] ? ra + rb : ra - rb;
      if (((a.exp > b.exp) ? a.exp - b.exp : b.exp - a.exp) >= 2048 ||
          (a.sign == (b.sign ^ ~op[0]))) begin
        e_exp = $ln(rz < 0.0 ? -rz : rz) / $ln(2.0) * 4096.0;
        e_got = real'(z_add.exp);
        check(!z_add.zero && z_add.sign == (rz < 0.0) &&
              (e_got - e_exp < 16.0) && (e_exp - e_got < 16.0),
              $sformatf("add/sub op=%b %f %f -> %f", op, ra, rb, to_real(z_add)));
      end
      check(!overflow, "no overflow in range");
    end

    // Zero handling.
    op = 3'b111;
    x_add = LNS_ZERO; y_add = to_lns(2.5); x_mult = LNS_ZERO; y_mult = to_lns(3.0); x_square = LNS_ZERO;
    #1;
    check(z_add == to_lns(2.5), "0 + y = y");
    check(z_mult.zero, "0 * y = 0");
    check(z_square.zero, "0^2 = 0");
    op = 3'b110;
    #1;
    check(z_add == to_lns(-2.5), "0 - y = -y");
    x_add = to_lns(7.0); y_add = to_lns(7.0);
    #1;
    check(z_add.zero, "x - x = 0");
    x_add = to_lns(7.0); y_add = LNS_ZERO;
    #1;
    check(z_add == to_lns(7.0), "x - 0 = x");
    // Known values: 1 + 1 = 2, 3 - 1 = 2, sqrt(16) = 4.
    op = 3'b101;
    x_add = to_lns(1.0); y_add = to_lns(1.0); x_square = to_lns(16.0);
    #1;
    check(z_add == to_lns(2.0), "1 + 1 = 2");
    check(z_square == to_lns(4.0), "sqrt(16) = 4");
    op = 3'b100;
    x_add = to_lns(3.0); y_add = to_lns(1.0);
    #1;
    check(to_real(z_add) > 1.99 && to_real(z_add) < 2.01, "3 - 1 = 2");
    // Division by zero.
    op = 3'b011;
    x_mult = to_lns(3.0); y_mult = LNS_ZERO;
    #1;
    check(ovf_mult && overflow && z_mult.exp == EXP_MAX && !z_mult.zero, "x / 0 saturates");
    // Overflow of a product and of a square, underflow of a quotient.
    op = 3'b111;
    x_mult = '{zero: 0, sign: 1, exp: EXP_W'(60 * 4096)}; y_mult = '{zero: 0, sign: 0, exp: EXP_W'(10 * 4096)};
    x_square = '{zero: 0, sign: 0, exp: EXP_W'(40 * 4096)};
    #1;
    check(ovf_mult && z_mult.sign && z_mult.exp == EXP_MAX, "product overflow saturates");
    check(ovf_square && z_square.exp == EXP_MAX, "square overflow saturates");
    op = 3'b011;
    x_mult = '{zero: 0, sign: 0, exp: EXP_W'(-60 * 4096)}; y_mult = '{zero: 0, sign: 0, exp: EXP_W'(10 * 4096)};
    #1;
    check(z_mult.zero && !ovf_mult, "quotient underflow gives zero");

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
