// uta_transpose_switch: memory-free row-column transposition.
//
// After the first 1-D pass, the output register at the right end of array row i
// delivers, over four consecutive cycles, M[0][i], M[1][i], M[2][i], M[3][i] -- one
// column of the intermediate matrix, i.e. a row of its transpose. The second pass
// needs, in array column c, element c of that transposed row, and the wavefront
// skew makes row i's output appear exactly in the cycle column c needs it. So no
// storage is needed: column c only has to select the right row. That select is
// the vector index carried by the token arriving at column c (idx = i).
//
//   * four 4:1 multiplexers, one per column, choose row idx at column 3;
//   * two 2:1 multiplexers, for columns 0 and 1 of the 2x2 Hadamard pair, choose
//     row idx (0 or 1) at column 1, where the left 2x2 transform's sums end.
//
// In the reduced 2x4 and 1x4 setups (ROWS = 2, 1) the values are produced before
// they are needed and are held in the variable delay elements (uta_vde), which
// are bypassed whenever a transform needs only one sweep (always in the 4x4
// setup, and for the 2x2 pair in the 2x4 setup).
//
// The multiplexers are combinational; only the delay elements hold state. Which
// multiplexer feeds which column and the use of the token index as select are
// this design's reading of the block diagram; the multiplexer counts follow the
// document.
module uta_transpose_switch
  import uta_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 4,
  parameter int unsigned W    = 32
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic signed [W-1:0] acc_o   [ROWS][COLS],  // registered PE sums
  input  tok_t                tok_o   [ROWS][COLS],  // their tokens
  input  tok_t                tok_col [COLS],        // token at each column's top
  output logic signed [W-1:0] fb      [COLS]         // value fed back to column c
);

  logic signed [W-1:0] mux4   [COLS];
  logic signed [W-1:0] mux2   [2];
  logic signed [W-1:0] direct [COLS];

  // row index, folded into the rows that exist (only reached when it is in range)
  function automatic int unsigned row_of(logic [1:0] i);
    return 32'(i) % ROWS;
  endfunction

  always_comb begin
    for (int c = 0; c < COLS; c++) begin
      mux4[c] = acc_o[row_of(tok_col[c].idx)][COLS-1];
    end
    for (int c = 0; c < 2; c++) begin
      mux2[c] = acc_o[row_of({1'b0, tok_col[c].idx[0]})][1];
    end
    for (int c = 0; c < COLS; c++) begin
      direct[c] = (c < 2 && tok_col[c].ttype == T_H2) ? mux2[c % 2] : mux4[c];
    end
  end

  uta_vde #(.ROWS(ROWS), .COLS(COLS), .W(W)) u_vde (
    .clk      (clk),
    .rst      (rst),
    .en       (en),
    .acc_o    (acc_o),
    .tok_o    (tok_o),
    .tok_col  (tok_col),
    .fb_direct(direct),
    .fb       (fb)
  );

endmodule
