// reroute_switch: shortens inversions of an m x m matrix on an N x N array.
//
// Without it, results of the decomposition and of the triangular inverse
// would climb through the N-m unused rows (or cross the unused columns)
// before they could re-enter the array. The switch sits in front of the
// bottom inputs and, for the m left-most columns, substitutes:
//  - RR_DECOMP: the top output of PE(m,c) in row m (the u values that leave
//    the decomposed m x m corner) for the bottom input of column c;
//  - RR_INVERSE: the right output of PE(c,m) in column m (row c of the
//    triangular inverse) for the bottom input of column c;
//  - RR_OFF: the external bottom inputs, unchanged.
// Columns m and above always take the external inputs. Which outputs are fed
// back follows the design; the mode encoding, the run-time m input and the
// pairing of row c of column m's outputs with column c are this
// implementation's choices. Purely combinational: the PE input registers
// close the loop.
module reroute_switch
  import lns_pkg::*;
#(
  parameter int unsigned N = 5
) (
  input  logic [1:0]                      mode,     // 0 off, 1 decomposition, 2 inverse
  input  logic [$clog2(N+1)-1:0]          m,        // 1..N
  input  lns_t [N-1:0]                    ext_in,   // per column
  input  lns_t [N-1:0][N-1:0]             vert,     // [row][col] PE top outputs
  input  logic [N-1:0][N-1:0][CW_W-1:0]   horiz,    // [row][col] PE right outputs
  output lns_t [N-1:0]                    col_out
);

  localparam logic [1:0] RR_OFF = 2'd0, RR_DECOMP = 2'd1, RR_INVERSE = 2'd2;

  always_comb begin
    for (int c = 0; c < N; c++) begin
      col_out[c] = ext_in[c];
      if (32'(c) < 32'(m)) begin
        for (int k = 0; k < N; k++) begin
          if (32'(m) == k + 1) begin
            if (mode == RR_DECOMP)       col_out[c] = vert[k][c];
            else if (mode == RR_INVERSE) col_out[c] = lns_t'(horiz[c][k][WORD_W-1:0]);
          end
        end
      end
    end
  end

endmodule
