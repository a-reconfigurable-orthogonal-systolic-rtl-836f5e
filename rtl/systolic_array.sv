// systolic_array: N x N orthogonal mesh of processing elements.
//
// PE(r,c) (row r counted from the bottom, column c from the left, both from
// 0 here) takes its left word from PE(r,c-1) and its bottom word from
// PE(r-1,c). Row r's left boundary comes from left_in[r], column c's bottom
// boundary from bottom_in[c]; the top outputs of the upper row and the right
// outputs of the right column leave the array. Matrices are loaded and
// multiplied through these boundaries: a matrix enters column by column from
// the bottom, partial sums travel from left to right along the rows.
//
// Opcode wavefront: the opcode enters PE(0,0); the bottom row passes it to
// the right and every column passes it upward, so PE(r,c) sees an opcode r+c
// clocks after PE(0,0) and the whole array has it after 2N-1 clocks. Data
// entering row r (or column c) must be skewed by the same r (or c) clocks.
//
// All PE top and right outputs are also brought out (vert_out, horiz_out) for
// the re-route switch used in inversions smaller than the array. Overflow
// flags of all PEs are brought out individually and ORed into overflow_any.
module systolic_array
  import lns_pkg::*;
#(
  parameter int unsigned N = 5
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [3:0]                opcode_in,
  input  logic [N-1:0][CW_W-1:0]    left_in,     // per row
  input  lns_t [N-1:0]              bottom_in,   // per column
  output lns_t [N-1:0]              top_out,     // per column, from the upper row
  output logic [N-1:0][CW_W-1:0]    right_out,   // per row, from the right column
  output lns_t [N-1:0][N-1:0]       vert_out,    // [row][col] top output of each PE
  output logic [N-1:0][N-1:0][CW_W-1:0] horiz_out, // [row][col] right output of each PE
  output logic [N-1:0][N-1:0]       overflow,    // [row][col]
  output logic                      overflow_any
);

  logic [N-1:0][N-1:0][3:0] op_out;

  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      logic [3:0]      op_in;
      logic [CW_W-1:0] l_in;
      lns_t            b_in;

      if (r == 0 && c == 0) begin : g_op_ext
        assign op_in = opcode_in;
      end else if (r == 0) begin : g_op_left
        assign op_in = op_out[0][c-1];
      end else begin : g_op_below
        assign op_in = op_out[r-1][c];
      end

      if (c == 0) begin : g_l_ext
        assign l_in = left_in[r];
      end else begin : g_l_int
        assign l_in = horiz_out[r][c-1];
      end

      if (r == 0) begin : g_b_ext
        assign b_in = bottom_in[c];
      end else begin : g_b_int
        assign b_in = vert_out[r-1][c];
      end

      processing_element u_pe (
        .clk       (clk),
        .rst_n     (rst_n),
        .opcode_in (op_in),
        .left_in   (l_in),
        .bottom_in (b_in),
        .opcode_out(op_out[r][c]),
        .right_out (horiz_out[r][c]),
        .top_out   (vert_out[r][c]),
        .overflow  (overflow[r][c])
      );
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_io
    assign top_out[i]   = vert_out[N-1][i];
    assign right_out[i] = horiz_out[i][N-1];
  end

  assign overflow_any = |overflow;

endmodule
