// uta_kernel: the unified transform kernel (input buffer, PE array,
// transposition switch, control unit).
//
// Every supported transform is separable, Y = A * X * A^T, and is computed by row-
// column decomposition on a single 1-D engine, the systolic PE array. Input lines
// (rows of a 4x4 block, or of two 2x2 blocks side by side) are loaded into the
// input buffer; the first pass sends each line through the array, whose row i
// produces the i-th 1-D coefficient. The transposition switch feeds those outputs
// straight back into the top of the array as the second pass, with no
// transposition memory, and the result packer turns the second-pass outputs into
// result lines (row j of Y).
//
// Interface:
//   push/line_in  : one input line, element c in bits [16c +: 16], two's complement
//   level         : lines held in the last input-buffer column (for flow control;
//                   at most DEPTH may be held or in flight)
//   start/ttype/nblk : start a job of nblk blocks of one transform type
//   res_valid/res_line : one result line per pulse, in order: for each block,
//                   rows 0..3 of Y (rows 0..1 for the 2x2 pair), 16 bits each
//   busy/done     : job running / END pulse after the job's last result line
//   issue         : a vector entered the array this cycle (observability)
//   en            : global enable, freezes the array, buffer pops and control
//
// Timing: a 4x4 block's first vector enters PE(0,0) in cycle t; its last result
// line is valid in cycle t+14. Back to back, one 4x4 block completes every 8
// cycles and one pair of 2x2 transforms every 4 cycles.
//
// ROWS = 2 or 1 builds the document's 2x4 and 1x4 setups: each vector is swept
// through the array 4/ROWS times (2x2 pair: 2/ROWS, at least once), and the
// transposition switch's delay elements hold the first-pass results. A 4x4 block
// then takes 16 or 32 cycles (latency 21 or 35), a 2x2 pair 4 or 8. The internal datapath is
// 32 bits wide (the document's PEs use 32-bit adders); result elements are
// truncated to 16 bits.
module uta_kernel
  import uta_pkg::*;
#(
  parameter int unsigned ROWS   = 4,
  parameter int unsigned COLS   = 4,
  parameter int unsigned DW     = 16,
  parameter int unsigned W      = 32,
  parameter int unsigned DEPTH  = 4,
  parameter int unsigned NBLK_W = 8
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic                 push,
  input  logic [COLS*DW-1:0]   line_in,
  output logic [$clog2(DEPTH+1)-1:0] level,
  input  logic                 start,
  input  ttype_e               ttype,
  input  logic [NBLK_W-1:0]    nblk,
  output logic                 res_valid,
  output logic [COLS*DW-1:0]   res_line,
  output logic                 busy,
  output logic                 done,
  output logic                 issue
);

  localparam int unsigned CW = $clog2(DEPTH + 1);

  tok_t                tok0;
  tok_t                tok_col [COLS];
  logic signed [W-1:0] x_top   [COLS];
  logic signed [W-1:0] fb      [COLS];
  logic signed [W-1:0] acc_o   [ROWS][COLS];
  tok_t                tok_o   [ROWS][COLS];
  logic [CW-1:0]       count   [COLS];

  // the token belonging to column c's top input is the one leaving PE(0,c-1)
  always_comb begin
    tok_col[0] = tok0;
    for (int c = 1; c < COLS; c++) tok_col[c] = tok_o[0][c-1];
  end

  assign level = count[COLS-1];
  assign issue = en && tok0.calc;

  uta_kernel_ctrl #(.ROWS(ROWS), .NBLK_W(NBLK_W), .CNT_W(CW)) u_ctrl (
    .clk      (clk),
    .rst      (rst),
    .en       (en),
    .start    (start),
    .ttype    (ttype),
    .nblk     (nblk),
    .avail    (count[0]),
    .line_done(res_valid),
    .tok      (tok0),
    .busy     (busy),
    .done     (done)
  );

  uta_input_buffer #(.COLS(COLS), .ROWS(ROWS), .DEPTH(DEPTH), .DW(DW), .W(W)) u_ibuf (
    .clk    (clk),
    .rst    (rst),
    .en     (en),
    .push   (push),
    .line_in(line_in),
    .tok_col(tok_col),
    .fb     (fb),
    .x_top  (x_top),
    .count  (count)
  );

  uta_pe_array #(.ROWS(ROWS), .COLS(COLS), .W(W)) u_array (
    .clk   (clk),
    .rst   (rst),
    .en    (en),
    .tok_in(tok0),
    .x_top (x_top),
    .acc_o (acc_o),
    .tok_o (tok_o)
  );

  uta_transpose_switch #(.ROWS(ROWS), .COLS(COLS), .W(W)) u_tsw (
    .clk    (clk),
    .rst    (rst),
    .en     (en),
    .acc_o  (acc_o),
    .tok_o  (tok_o),
    .tok_col(tok_col),
    .fb     (fb)
  );

  uta_result_packer #(.ROWS(ROWS), .COLS(COLS), .DW(DW), .W(W)) u_pack (
    .clk       (clk),
    .rst       (rst),
    .en        (en),
    .acc_o     (acc_o),
    .tok_o     (tok_o),
    .line_valid(res_valid),
    .line_out  (res_line)
  );

endmodule
