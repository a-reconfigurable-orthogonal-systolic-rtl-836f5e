// kalman_systolic_top: the reconfigurable orthogonal systolic array that
// evaluates the Kalman filter recursion.
//
// One N x N array of microprogrammed LNS processing elements performs the
// matrix operation of the filter (load, multiply-accumulate, addition,
// subtraction, transposed input); the Cholesky-style inversion uses the
// same PE operations (square root, divide, multiply-subtract) and the
// re-route switch, but it needs a different microprogram in every PE, and
// microcode reaches the PEs only row by row through the left ports, so an
// inversion cannot be programmed into this array as it stands. The
// operation is chosen by the opcode wavefront and the microcode, not by
// rewiring, so successive operations follow each other without emptying the
// pipeline. In front of the array's bottom inputs sit the transpose switch
// (crosses b_ij and b_ji for products such as A*B^T) and the re-route switch
// (feeds results of an m x m inversion back to the bottom when m < N).
//
// Interface (all data in the 21-bit LNS format of lns_pkg):
//   opcode_in       4-bit PE opcode into PE(0,0), one per clock
//   left_in[r]      32-bit word into row r: data, microwords or addresses
//   bottom_in[c]    data into column c, through both switches
//   tr_start/tr_dim start the transpose switch on the first element of a
//                   dim x dim matrix
//   rr_mode/rr_m    re-route switch mode (0 off, 1 decomposition, 2 inverse)
//                   and inversion size m
//   top_out[c]      data leaving the top of column c
//   right_out[r]    word leaving the right of row r (products come out here)
//   overflow_any    any PE's ALU overflowed in this clock
// Row r and column c inputs must be skewed by r and c clocks to meet the
// opcode wavefront. The memory banks and the sequencer that drive these ports
// are outside this design.
module kalman_systolic_top
  import lns_pkg::*;
#(
  parameter int unsigned N = 5
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [3:0]               opcode_in,
  input  logic [N-1:0][CW_W-1:0]   left_in,
  input  lns_t [N-1:0]             bottom_in,
  input  logic                     tr_start,
  input  logic [$clog2(N+1)-1:0]   tr_dim,
  input  logic [1:0]               rr_mode,
  input  logic [$clog2(N+1)-1:0]   rr_m,
  output lns_t [N-1:0]             top_out,
  output logic [N-1:0][CW_W-1:0]   right_out,
  output logic                     overflow_any
);

  lns_t [N-1:0]                       tr_cols;
  lns_t [N-1:0]                       array_bottom;
  lns_t [N-1:0][N-1:0]                vert;
  logic [N-1:0][N-1:0][CW_W-1:0]      horiz;
  logic [N-1:0][N-1:0]                overflow;

  transpose_switch #(.N(N)) u_transpose (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (tr_start),
    .dim    (tr_dim),
    .col_in (bottom_in),
    .col_out(tr_cols)
  );

  reroute_switch #(.N(N)) u_reroute (
    .mode   (rr_mode),
    .m      (rr_m),
    .ext_in (tr_cols),
    .vert   (vert),
    .horiz  (horiz),
    .col_out(array_bottom)
  );

  systolic_array #(.N(N)) u_array (
    .clk         (clk),
    .rst_n       (rst_n),
    .opcode_in   (opcode_in),
    .left_in     (left_in),
    .bottom_in   (array_bottom),
    .top_out     (top_out),
    .right_out   (right_out),
    .vert_out    (vert),
    .horiz_out   (horiz),
    .overflow    (overflow),
    .overflow_any(overflow_any)
  );

endmodule
