// pe_scratchpad: the 8-word by 21-bit scratch pad of a processing element.
//
// Holds one LNS word with its zero flag per location: an element of a loaded
// matrix, an intermediate value or a constant. The memory has a single port:
// the 3-bit address from the microword selects the word that is read and,
// when the write enable (the W/R bit) is set, the word that is written at the
// next rising clock edge. The read is asynchronous, so q shows the addressed
// word in the same clock; a write becomes visible from the following clock.
// Size and single port follow the design; the asynchronous read is this
// implementation's choice. Contents are not reset.
module pe_scratchpad
  import lns_pkg::*;
(
  input  logic             clk,
  input  logic             we,
  input  logic [SP_AW-1:0] addr,
  input  lns_t             d,
  output lns_t             q
);

  lns_t mem [SP_DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= d;
  end

  assign q = mem[addr];

endmodule
