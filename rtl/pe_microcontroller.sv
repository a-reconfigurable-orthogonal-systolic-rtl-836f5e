// pe_microcontroller: microcode RAM and sequencer of a processing element.
//
// The RAM holds 1024 microwords of 31 bits (bit 31 of the control word is
// unused and reads as zero). Four control groups each have a start and an
// end address. While the PE opcode says "run counter k", one microword is
// executed per clock: the first clock of a run starts at the group's start
// address, each further clock increments the address and, on reaching the
// end address, wraps back to the start, so a group can repeat indefinitely.
// Opcodes 0101-1000 load a group's start address and 1001-1100 its end
// address, both from bits 9:0 of the left input word. Opcode 1111 writes the
// left input word into consecutive locations of group 1's range, incrementing
// after each write; opcode 1110 reads them out the same way. All other opcodes
// (no operation, pass data to right, the loads) execute the all-zero
// microword, which pipes bottom to top and left to right in the PE.
//
// Timing: opcode and left word are the PE's registered inputs. The selected
// microword is read asynchronously in the same clock; address counter,
// start/end registers and RAM writes update at the rising edge.
// Design choices where the description is silent: a run starts afresh
// whenever the opcode changes; reads and writes use group 1's range; reset
// (active low) clears the address registers but not the RAM.
module pe_microcontroller
  import lns_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  pe_op_e            opcode,
  input  logic [CW_W-1:0]   left_word,
  output ctrl_word_t        cw,
  output logic [CW_W-1:0]   rd_word,
  output logic              rd_valid
);

  logic [UC_W-1:0]  ram [UC_DEPTH];
  logic [UC_AW-1:0] start_addr [4];
  logic [UC_AW-1:0] end_addr   [4];
  logic [UC_AW-1:0] pc;
  pe_op_e           prev_op;

  logic             sequencing;   // run, read or write: the counter is used
  logic [1:0]       group;
  logic [UC_AW-1:0] addr;

  always_comb begin
    sequencing = 1'b0;
    group      = 2'd0;
    unique case (opcode)
      OP_RUN1, OP_RUN2, OP_RUN3, OP_RUN4: begin
        sequencing = 1'b1;
        group      = 2'(opcode - OP_RUN1);
      end
      OP_READ, OP_WRITE: sequencing = 1'b1;
      default: ;
    endcase
    // Comparator: wrap at the end address; a new opcode restarts the group.
    if (prev_op != opcode || pc == end_addr[group]) addr = start_addr[group];
    else                                            addr = pc + 1'b1;
  end

  assign cw       = (opcode inside {OP_RUN1, OP_RUN2, OP_RUN3, OP_RUN4})
                    ? ctrl_word_t'({1'b0, ram[addr]}) : '0;
  assign rd_word  = {1'b0, ram[addr]};
  assign rd_valid = (opcode == OP_READ);

  always_ff @(posedge clk) begin
    if (opcode == OP_WRITE) ram[addr] <= left_word[UC_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc         <= '0;
      prev_op    <= OP_NOP;
      start_addr <= '{default: '0};
      end_addr   <= '{default: '0};
    end else begin
      prev_op <= opcode;
      if (sequencing) pc <= addr;
      unique case (opcode)
        OP_START1: start_addr[0] <= left_word[UC_AW-1:0];
        OP_START2: start_addr[1] <= left_word[UC_AW-1:0];
        OP_START3: start_addr[2] <= left_word[UC_AW-1:0];
        OP_START4: start_addr[3] <= left_word[UC_AW-1:0];
        OP_END1:   end_addr[0]   <= left_word[UC_AW-1:0];
        OP_END2:   end_addr[1]   <= left_word[UC_AW-1:0];
        OP_END3:   end_addr[2]   <= left_word[UC_AW-1:0];
        OP_END4:   end_addr[3]   <= left_word[UC_AW-1:0];
        default: ;
      endcase
    end
  end

endmodule
