// transpose_switch: lets a matrix that is streamed in row order enter the
// array transposed.
//
// In the skewed input order, column c carries row c of a matrix B, element
// b_cj at clock (c-1)+(j-1) after the first element. Elements b_ij and b_ji
// therefore appear on columns i and j in the same clock, and transposing is
// a matter of crossing the columns. Column c has an N:1 multiplexer over all
// column inputs and a 2:1 multiplexer that chooses between its own input and
// the crossed one. A counter, reset when start marks the first element of the
// matrix, gives column 1 its select (column j in the j-th clock); the select
// and the transpose signal are passed through one register per column, so
// column c selects column t-c+2 in clock t (1-based columns) while its
// transpose signal is on. The transpose signal lasts dim clocks per column
// (dim = N for a full-size matrix), and columns dim and above are never
// crossed. All of this follows the design; the dim input for smaller
// matrices is this implementation's addition.
//
// Timing: the data path is combinational; control registers update on the
// rising edge. start is asserted in the clock of the first element b11.
module transpose_switch
  import lns_pkg::*;
#(
  parameter int unsigned N = 5
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [$clog2(N+1)-1:0] dim,
  input  lns_t [N-1:0]           col_in,
  output lns_t [N-1:0]           col_out
);

  localparam int unsigned SW = $clog2(N+1);

  logic [SW-1:0]        cnt_q;      // next select of column 1
  logic                 run_q;
  logic [N-1:0][SW-1:0] sel;        // 1-based column select per column
  logic [N-1:0]         transpose;

  // Counter for column 1.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      run_q <= 1'b0;
    end else if (start) begin
      cnt_q <= SW'(2);
      run_q <= (dim > SW'(1));
    end else if (run_q) begin
      cnt_q <= cnt_q + 1'b1;
      run_q <= (cnt_q < dim);
    end
  end

  assign transpose[0] = start | run_q;
  assign sel[0]       = start ? SW'(1) : cnt_q;

  // One register per column for the select and the transpose signal.
  for (genvar c = 1; c < N; c++) begin : g_delay
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        sel[c]       <= '0;
        transpose[c] <= 1'b0;
      end else begin
        sel[c]       <= sel[c-1];
        transpose[c] <= transpose[c-1];
      end
    end
  end

  for (genvar c = 0; c < N; c++) begin : g_mux
    lns_t crossed;
    always_comb begin
      crossed = LNS_ZERO;
      for (int k = 0; k < N; k++)
        if (32'(sel[c]) == k + 1) crossed = col_in[k];
    end
    assign col_out[c] = (transpose[c] && 32'(c) < 32'(dim)) ? crossed : col_in[c];
  end

endmodule
