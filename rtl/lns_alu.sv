// lns_alu: the arithmetic unit of a processing element, on 20-bit LNS words
// with zero flags (format in lns_pkg).
//
// Three sections work side by side every clock, all combinational:
//  - square / square root: the exponent is shifted left by one bit with zero
//    fill (square) or right by one bit with sign extension (square root);
//  - multiply / divide: the exponents are added or subtracted and the signs
//    combined;
//  - add / subtract: two subtractors form x-y and y-x, a max calculation picks
//    the larger operand and the non-negative difference D, the ROM supplies
//    log2(1 +/- 2^-D) and the result exponent is emax plus that correction.
// Each section ends in overflow logic: a result above the exponent range
// becomes the largest representable magnitude with its overflow flag set; a
// result below the range becomes zero. The 3-bit opcode chooses, per section,
// multiply(1)/divide(0), square(1)/root(0) and add(1)/subtract(0).
//
// Choices of this implementation where the design says nothing: the result
// of a square or a square root is positive (the root of a negative number is
// taken of its magnitude); division by zero returns the largest magnitude and
// flags overflow; subtracting equal values returns zero. Overflow flags are
// reported per section so that the PE can ignore sections it does not use.
module lns_alu
  import lns_pkg::*;
(
  input  alu_op_t op,
  input  lns_t    x_square,
  input  lns_t    x_mult,
  input  lns_t    y_mult,
  input  lns_t    x_add,
  input  lns_t    y_add,
  output lns_t    z_square,
  output lns_t    z_mult,
  output lns_t    z_add,
  output logic    ovf_square,
  output logic    ovf_mult,
  output logic    ovf_add,
  output logic    overflow
);

  localparam int unsigned WW = EXP_W + 2;  // wide exponent for range checks

  // ---- square / square root (2-way shift) --------------------------------
  always_comb begin
    logic signed [WW-1:0] e;
    ovf_square = 1'b0;
    if (op[ALU_SQR_BIT]) e = WW'(x_square.exp) <<< 1;
    else                 e = WW'(x_square.exp) >>> 1;
    if (x_square.zero) z_square = LNS_ZERO;
    else               z_square = lns_saturate(1'b0, e, ovf_square);
  end

  // ---- multiply / divide (exponent add/sub) ------------------------------
  always_comb begin
    logic signed [WW-1:0] e;
    ovf_mult = 1'b0;
    if (op[ALU_MUL_BIT]) e = WW'(x_mult.exp) + WW'(y_mult.exp);
    else                 e = WW'(x_mult.exp) - WW'(y_mult.exp);
    if (!op[ALU_MUL_BIT] && y_mult.zero) begin
      z_mult   = '{zero: 1'b0, sign: x_mult.sign ^ y_mult.sign, exp: EXP_MAX};
      ovf_mult = 1'b1;
    end else if (x_mult.zero || y_mult.zero) begin
      z_mult = LNS_ZERO;
    end else begin
      z_mult = lns_saturate(x_mult.sign ^ y_mult.sign, e, ovf_mult);
    end
  end

  // ---- add / subtract (table look-up) ------------------------------------
  logic                 y_sign_eff;   // sign of y after the operation
  logic signed [WW-1:0] diff_xy, diff_yx;
  logic                 x_is_max;
  logic [EXP_W:0]       d;
  logic                 same_sign;
  logic signed [19:0]   corr;

  assign y_sign_eff = y_add.sign ^ ~op[ALU_ADD_BIT];
  assign diff_xy    = WW'(x_add.exp) - WW'(y_add.exp);
  assign diff_yx    = WW'(y_add.exp) - WW'(x_add.exp);
  assign x_is_max   = !diff_xy[WW-1];                       // max calculation
  assign d          = x_is_max ? diff_xy[EXP_W:0] : diff_yx[EXP_W:0];
  assign same_sign  = (x_add.sign == y_sign_eff);

  lns_rom u_rom (
    .d   (d),
    .sub (!same_sign),
    .corr(corr)
  );

  always_comb begin
    logic signed [WW-1:0] e;
    logic                 s;
    ovf_add = 1'b0;
    e = (x_is_max ? WW'(x_add.exp) : WW'(y_add.exp)) + WW'(corr);
    s = x_is_max ? x_add.sign : y_sign_eff;
    if (x_add.zero && y_add.zero)       z_add = LNS_ZERO;
    else if (x_add.zero)                z_add = '{zero: 1'b0, sign: y_sign_eff, exp: y_add.exp};
    else if (y_add.zero)                z_add = x_add;
    else if (!same_sign && d == '0)     z_add = LNS_ZERO;
    else                                z_add = lns_saturate(s, e, ovf_add);
  end

  assign overflow = ovf_square | ovf_mult | ovf_add;

endmodule
