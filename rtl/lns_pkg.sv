// lns_pkg: types and constants shared by the LNS processing element and the
// orthogonal systolic array.
//
// Number format. A value X = (-1)^S * 2^e is held as a 21-bit word:
//   bit 20     zero flag (1 = the value is exactly zero, other bits ignored)
//   bit 19     radix sign S
//   bits 18:0  exponent e, two's complement, 12 fractional bits
// The 20-bit sign/exponent layout and the separate zero flag follow the
// design; placing the zero flag at bit 20 is this implementation's choice.
//
// Control word. Each PE executes one 32-bit microword per clock. Bit 31 is
// unused; the ALU field (3 bits) picks divide/multiply, root/square and
// subtract/add; eight 3-bit fields select the source of each internal 8:1
// data multiplexer; W/R and a 3-bit address drive the scratch pad.
package lns_pkg;

  localparam int unsigned EXP_W    = 19;    // exponent width, two's complement
  localparam int unsigned FRAC_W   = 12;    // fractional exponent bits
  localparam int unsigned WORD_W   = 21;    // zero flag + sign + exponent
  localparam int unsigned CW_W     = 32;    // control word / left-right port width
  localparam int unsigned UC_W     = 31;    // stored microword width (bit 31 unused)
  localparam int unsigned UC_DEPTH = 1024;  // microcode RAM words
  localparam int unsigned UC_AW    = 10;
  localparam int unsigned SP_DEPTH = 8;     // scratch pad words
  localparam int unsigned SP_AW    = 3;

  typedef struct packed {
    logic                    zero;
    logic                    sign;
    logic signed [EXP_W-1:0] exp;
  } lns_t;

  localparam lns_t LNS_ZERO = '{zero: 1'b1, sign: 1'b0, exp: '0};
  localparam lns_t LNS_ONE  = '{zero: 1'b0, sign: 1'b0, exp: '0};

  localparam logic signed [EXP_W-1:0] EXP_MAX = {1'b0, {(EXP_W-1){1'b1}}};
  localparam logic signed [EXP_W-1:0] EXP_MIN = {1'b1, {(EXP_W-1){1'b0}}};

  // Source codes of the internal 8:1 data multiplexers.
  typedef enum logic [2:0] {
    SRC_LEFT    = 3'b000,
    SRC_BOTTOM  = 3'b001,
    SRC_MULDIV  = 3'b010,
    SRC_SQR     = 3'b011,
    SRC_ADDSUB  = 3'b100,
    SRC_SCRATCH = 3'b101,
    SRC_HOLD    = 3'b110,
    SRC_GND     = 3'b111
  } src_e;

  // ALU opcode bits: [2] 1 multiply / 0 divide, [1] 1 square / 0 square root,
  // [0] 1 add / 0 subtract. The three sections work in parallel.
  typedef logic [2:0] alu_op_t;
  localparam int unsigned ALU_MUL_BIT = 2;
  localparam int unsigned ALU_SQR_BIT = 1;
  localparam int unsigned ALU_ADD_BIT = 0;

  typedef struct packed {
    logic       unused;    // 31
    alu_op_t    alu;       // 30:28
    src_e       mult_x;    // 27:25
    src_e       mult_y;    // 24:22
    src_e       square_x;  // 21:19
    src_e       add_x;     // 18:16
    src_e       add_y;     // 15:13
    src_e       top;       // 12:10 (000 and 001 swapped, see processing_element)
    src_e       right;     //  9:7
    src_e       mem;       //  6:4
    logic       wr;        //  3
    logic [2:0] mem_addr;  //  2:0
  } ctrl_word_t;

  // External PE control opcodes, passed from PE to PE as a wavefront.
  typedef enum logic [3:0] {
    OP_NOP      = 4'b0000,
    OP_RUN1     = 4'b0001,
    OP_RUN2     = 4'b0010,
    OP_RUN3     = 4'b0011,
    OP_RUN4     = 4'b0100,
    OP_START1   = 4'b0101,
    OP_START2   = 4'b0110,
    OP_START3   = 4'b0111,
    OP_START4   = 4'b1000,
    OP_END1     = 4'b1001,
    OP_END2     = 4'b1010,
    OP_END3     = 4'b1011,
    OP_END4     = 4'b1100,
    OP_PASS     = 4'b1101,
    OP_READ     = 4'b1110,
    OP_WRITE    = 4'b1111
  } pe_op_e;

  // Overflow logic shared by the ALU sections: a wide exponent is brought
  // back into range. Above the range the largest representable magnitude is
  // returned and ovf is set; below it the value is flushed to zero.
  function automatic lns_t lns_saturate(input logic sign, input logic signed [EXP_W+1:0] e,
                                        output logic ovf);
    lns_t r;
    ovf = 1'b0;
    r.zero = 1'b0;
    r.sign = sign;
    if (e > (EXP_W+2)'(EXP_MAX)) begin
      r.exp = EXP_MAX;
      ovf   = 1'b1;
    end else if (e < (EXP_W+2)'(EXP_MIN)) begin
      r = LNS_ZERO;
    end else begin
      r.exp = e[EXP_W-1:0];
    end
    return r;
  endfunction

endpackage
