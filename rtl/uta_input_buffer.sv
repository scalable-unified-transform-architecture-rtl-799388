// uta_input_buffer: feeds the top row of the PE array.
//
// One FIFO per array column. A whole line of residues (or coefficients) is loaded
// in a single cycle, one element into each column FIFO, so memory is read a full
// line at a time. The columns are then emptied serially: column c pops when the
// token that belongs to column c (tok_col[c]) carries CALC for a first-pass
// vector, which happens one cycle after column c-1, matching the skewed
// wavefront in the array. For second-pass vectors the column is fed instead with
// the transposed intermediate value fb[c] from the transposition switch, which
// goes straight through the output multiplexer without being stored.
//
// Interface: push/line_in load one line (element c in bits [c*DW +: DW], signed,
// sign-extended to W on output); count[c] is the occupancy of column c; x_top[c]
// is combinational from the FIFO head or fb[c]. Pushes are accepted whatever `en`
// is; pops only happen when `en` is high. The caller must not push into a full
// column nor pop an empty one (assertions check both).
//
// In the reduced 2x4 and 1x4 setups each vector is sent several times (one
// sweep per group of kernel rows); the head element is then re-read for every
// sweep and only released after the last one, which plays the part of the
// recirculation path of the document's input buffer. The four registers per
// column follow the document; element width and the empty/full accounting are
// this design's choices.
module uta_input_buffer
  import uta_pkg::*;
#(
  parameter int unsigned COLS  = 4,
  parameter int unsigned ROWS  = 4,    // PE rows of the array setup
  parameter int unsigned DEPTH = 4,
  parameter int unsigned DW    = 16,
  parameter int unsigned W     = 32
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   en,
  input  logic                   push,
  input  logic [COLS*DW-1:0]     line_in,
  input  tok_t                   tok_col [COLS],
  input  logic signed [W-1:0]    fb      [COLS],
  output logic signed [W-1:0]    x_top   [COLS],
  output logic [$clog2(DEPTH+1)-1:0] count [COLS]
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  for (genvar c = 0; c < COLS; c++) begin : g_col
    logic signed [DW-1:0] mem [DEPTH];
    logic [PW-1:0]        rd_ptr, wr_ptr;
    logic                 pop;

    // in the 2x4 and 1x4 setups the head element is sent again for every sweep
    // and only released after the last one
    assign pop = en && tok_col[c].calc && !tok_col[c].pass &&
                 (3'(tok_col[c].sweep) == sweeps(tok_col[c].ttype, ROWS) - 3'd1);

    always_ff @(posedge clk) begin
      if (rst) begin
        rd_ptr   <= '0;
        wr_ptr   <= '0;
        count[c] <= '0;
      end else begin
        if (push) begin
          mem[wr_ptr] <= line_in[c*DW +: DW];
          wr_ptr      <= (wr_ptr == PW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
        end
        if (pop) begin
          rd_ptr <= (rd_ptr == PW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
        end
        count[c] <= count[c] + CW'(push) - CW'(pop);
      end
    end

    assign x_top[c] = tok_col[c].pass ? fb[c] : W'(mem[rd_ptr]);

    // synthesis-neutral checks of the buffer protocol
    a_no_overflow:  assert property (@(posedge clk) disable iff (rst)
                      push |-> (32'(count[c]) < DEPTH || pop));
    a_no_underflow: assert property (@(posedge clk) disable iff (rst)
                      pop |-> (count[c] != 0));
  end

endmodule
