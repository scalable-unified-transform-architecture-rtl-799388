// uta_pe_array: the 4x4 systolic array of processing elements.
//
// Data enters the array only through the top row: column c receives element c of
// an input vector and passes it down one row per cycle. Partial sums move right
// one column per cycle, starting from zero at the left edge, so the register at
// the right end of row r holds sum_c A[r][c] * v[c], the r-th coefficient of the
// 1-D transform of vector v. The control token enters at the top-left PE and
// spreads right and down in step with the data, so a new vector can start every
// cycle and the four rows work on four different vectors at once (the wavefront
// of the document's dataflow figure).
//
// Interface: x_top[c] is the value presented to the top PE of column c and tok_in
// the token presented to PE(0,0). The token that belongs with x_top[c] for c > 0
// is the one leaving PE(0,c-1), tok_o[0][c-1]; the input buffer uses it to know
// when to feed column c and from where. acc_o/tok_o expose
// every PE's registered outputs; the transposition switch and result packer read
// columns 1 and 3.
//
// Timing: an element presented to column c of the top row in cycle t contributes
// to row r's output register in cycle t + r + (3 - c) + 1.
//
// ROWS selects the setup: 4 (the base 4x4 array), 2 or 1 (the reduced 2x4 and
// 1x4 setups, in which every vector is sent through the array several times,
// one sweep per group of kernel rows). COLS is fixed at 4.
module uta_pe_array
  import uta_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 4,
  parameter int unsigned W    = 32
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  tok_t                tok_in,            // token into PE(0,0)
  input  logic signed [W-1:0] x_top [COLS],
  output logic signed [W-1:0] acc_o [ROWS][COLS],
  output tok_t                tok_o [ROWS][COLS]
);

  logic signed [W-1:0] x_o [ROWS][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic signed [W-1:0] xi;
      logic signed [W-1:0] ai;
      tok_t                tl;
      tok_t                tu;
      if (r == 0) begin : g_top
        assign xi = x_top[c];
        assign tu = TOK_IDLE;
      end else begin : g_inner
        assign xi = x_o[r-1][c];
        assign tu = tok_o[r-1][c];
      end
      if (c == 0) begin : g_left
        assign ai = '0;
        assign tl = (r == 0) ? tok_in : TOK_IDLE;
      end else begin : g_mid
        assign ai = acc_o[r][c-1];
        assign tl = tok_o[r][c-1];
      end
      tok_t td_unused;
      uta_pe #(.W(W), .ROWS(ROWS)) u_pe (
        .clk    (clk),
        .rst    (rst),
        .en     (en),
        .coord_x(2'(c)),
        .coord_y(2'(r)),
        .x_in   (xi),
        .acc_in (ai),
        .tok_l  (tl),
        .tok_u  (tu),
        .x_out  (x_o[r][c]),
        .acc_out(acc_o[r][c]),
        .tok_r  (tok_o[r][c]),
        .tok_d  (td_unused)
      );
    end
  end

endmodule
