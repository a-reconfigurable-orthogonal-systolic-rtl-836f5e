// processing_element: one cell of the orthogonal systolic array.
//
// The PE registers its three inputs (4-bit opcode, 32-bit left word, 21-bit
// bottom word) and works on them in the following clock. The registered
// opcode drives the microcontroller and is also passed on unchanged through
// opcode_out, so opcodes sweep the array as a wavefront one PE per clock.
// The microword chosen by the microcontroller drives:
//  - eight 8:1 data multiplexers (sources: left input, bottom input,
//    multiply/divide output, square/root output, add/subtract output, scratch
//    pad output, the multiplexer's own previous output (hold), and ground);
//    they feed the top output, the right output, the scratch pad data, and
//    the five ALU operand inputs;
//  - the LNS ALU (three parallel sections, see lns_alu);
//  - the 8 x 21 scratch pad (write enable and address).
// For the top multiplexer codes 000 and 001 are swapped, so the all-zero
// microword (no operation) pipes bottom to top and left to right.
// Top and right outputs are combinational; the neighbour's input register
// gives one clock per hop, and chains such as a*b + c complete in one clock.
//
// Choices of this implementation where the design is silent:
//  - ALU operand multiplexers cannot form a combinational loop: an operand
//    that selects the output of its own or of a later ALU section gets that
//    section's result from the previous clock (order: square, multiply, add);
//  - "ground" is the LNS zero (zero flag set);
//  - the right port carries the full 32-bit left word when it selects the
//    left input (this is how microwords and addresses travel along a row) and
//    otherwise the 21-bit data word zero-extended; during a microcode read
//    (opcode 1110) it carries the microword read;
//  - overflow reports only ALU sections whose result some multiplexer uses;
//  - reset (active low, asynchronous) clears input, hold and ALU registers.
module processing_element
  import lns_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [3:0]      opcode_in,
  input  logic [CW_W-1:0] left_in,
  input  lns_t            bottom_in,
  output logic [3:0]      opcode_out,
  output logic [CW_W-1:0] right_out,
  output lns_t            top_out,
  output logic            overflow
);

  pe_op_e          opcode_q;
  logic [CW_W-1:0] left_q;
  lns_t            bottom_q;
  lns_t            left_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      opcode_q <= OP_NOP;
      left_q   <= {{(CW_W-WORD_W){1'b0}}, LNS_ZERO};
      bottom_q <= LNS_ZERO;
    end else begin
      opcode_q <= pe_op_e'(opcode_in);
      left_q   <= left_in;
      bottom_q <= bottom_in;
    end
  end

  assign opcode_out = opcode_q;
  assign left_d     = lns_t'(left_q[WORD_W-1:0]);

  // ---- microcontroller ----------------------------------------------------
  ctrl_word_t      cw;
  logic [CW_W-1:0] rd_word;
  logic            rd_valid;

  pe_microcontroller u_uc (
    .clk      (clk),
    .rst_n    (rst_n),
    .opcode   (opcode_q),
    .left_word(left_q),
    .cw       (cw),
    .rd_word  (rd_word),
    .rd_valid (rd_valid)
  );

  // ---- ALU and scratch pad --------------------------------------------------
  lns_t z_square, z_mult, z_add;
  lns_t z_square_q, z_mult_q, z_add_q;
  logic ovf_square, ovf_mult, ovf_add, ovf_any;
  lns_t mem_q;
  // Multiplexer outputs and their hold registers.
  lns_t m_top, m_right, m_mem, m_sqx, m_mulx, m_muly, m_addx, m_addy;
  lns_t h_top, h_right, h_mem, h_sqx, h_mulx, h_muly, h_addx, h_addy;

  lns_alu u_alu (
    .op        (cw.alu),
    .x_square  (m_sqx),
    .x_mult    (m_mulx),
    .y_mult    (m_muly),
    .x_add     (m_addx),
    .y_add     (m_addy),
    .z_square  (z_square),
    .z_mult    (z_mult),
    .z_add     (z_add),
    .ovf_square(ovf_square),
    .ovf_mult  (ovf_mult),
    .ovf_add   (ovf_add),
    .overflow  (ovf_any)
  );

  pe_scratchpad u_sp (
    .clk (clk),
    .we  (cw.wr),
    .addr(cw.mem_addr),
    .d   (m_mem),
    .q   (mem_q)
  );

  // ---- 8:1 data multiplexers -------------------------------------------------
  function automatic lns_t pick(input src_e sel, input lns_t hold,
                                input lns_t muldiv, input lns_t sqr, input lns_t addsub);
    unique case (sel)
      SRC_LEFT:    return left_d;
      SRC_BOTTOM:  return bottom_q;
      SRC_MULDIV:  return muldiv;
      SRC_SQR:     return sqr;
      SRC_ADDSUB:  return addsub;
      SRC_SCRATCH: return mem_q;
      SRC_HOLD:    return hold;
      default:     return LNS_ZERO;
    endcase
  endfunction

  src_e top_sel;
  always_comb begin
    unique case (cw.top)
      SRC_LEFT:   top_sel = SRC_BOTTOM;
      SRC_BOTTOM: top_sel = SRC_LEFT;
      default:    top_sel = cw.top;
    endcase
  end

  always_comb begin
    m_top   = pick(top_sel,     h_top,   z_mult,   z_square,   z_add);
    m_right = pick(cw.right,    h_right, z_mult,   z_square,   z_add);
    m_mem   = pick(cw.mem,      h_mem,   z_mult,   z_square,   z_add);
    m_sqx   = pick(cw.square_x, h_sqx,   z_mult_q, z_square_q, z_add_q);
    m_mulx  = pick(cw.mult_x,   h_mulx,  z_mult_q, z_square,   z_add_q);
    m_muly  = pick(cw.mult_y,   h_muly,  z_mult_q, z_square,   z_add_q);
    m_addx  = pick(cw.add_x,    h_addx,  z_mult,   z_square,   z_add_q);
    m_addy  = pick(cw.add_y,    h_addy,  z_mult,   z_square,   z_add_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {h_top, h_right, h_mem, h_sqx} <= {4{LNS_ZERO}};
      {h_mulx, h_muly, h_addx, h_addy} <= {4{LNS_ZERO}};
      z_square_q <= LNS_ZERO;
      z_mult_q   <= LNS_ZERO;
      z_add_q    <= LNS_ZERO;
    end else begin
      {h_top, h_right, h_mem, h_sqx} <= {m_top, m_right, m_mem, m_sqx};
      {h_mulx, h_muly, h_addx, h_addy} <= {m_mulx, m_muly, m_addx, m_addy};
      z_square_q <= z_square;
      z_mult_q   <= z_mult;
      z_add_q    <= z_add;
    end
  end

  // ---- outputs -----------------------------------------------------------------
  assign top_out = m_top;

  always_comb begin
    if (rd_valid)                right_out = rd_word;
    else if (cw.right == SRC_LEFT) right_out = left_q;
    else                         right_out = {{(CW_W-WORD_W){1'b0}}, m_right};
  end

  // A section's overflow counts when any multiplexer takes its result.
  logic [7:0] uses_sqr, uses_mul, uses_add;
  always_comb begin
    src_e sels [8];
    sels = '{top_sel, cw.right, cw.mem, cw.square_x, cw.mult_x, cw.mult_y, cw.add_x, cw.add_y};
    for (int i = 0; i < 8; i++) begin
      uses_sqr[i] = (sels[i] == SRC_SQR);
      uses_mul[i] = (sels[i] == SRC_MULDIV);
      uses_add[i] = (sels[i] == SRC_ADDSUB);
    end
  end

  assign overflow = ovf_any & ((ovf_square & |uses_sqr) | (ovf_mult & |uses_mul) |
                               (ovf_add & |uses_add));

endmodule
