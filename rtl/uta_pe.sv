// uta_pe: one processing element of the systolic transform array.
//
// Each PE holds one kernel coefficient at a time. The coefficient is picked by the
// transform type (TYPE_T, carried in the incoming token) and by the PE's
// coordinates (coord_x = column = input element index, coord_y = row = output
// coefficient index). Because every coefficient is +-1, +-2 or +-1/2 the
// multiplier is a small barrel shifter followed by a conditional negation.
//
// Per cycle, when the global enable `en` is high and the incoming token has CALC
// set, the PE
//   * registers acc_out <= acc_in + coef * x_in  (the arithmetic module), and
//   * registers x_out   <= x_in, passing the data down to the next row.
// A token with CLR set clears acc_out instead. The token itself is registered and
// sent both right (tok_r) and down (tok_d), so that control spreads from the
// top-left PE over the whole array in step with the data (the control module).
// The token is taken from the left neighbour when that one carries CALC or CLR,
// otherwise from the upper neighbour; in the wavefront both always agree.
//
// Two decoders follow the document's PE diagram: the coefficient ("M") decoder,
// and the accumulator-clear decoder, which ignores acc_in in column 2 for the 2x2
// Hadamard so that columns 0-1 and 2-3 form two independent 2-point sums. Rows 2
// and 3 stay idle for the 2x2 Hadamard (the document uses only the upper two
// rows); the token leaving them has CALC cleared. These two decoder rules, the
// token selection and the synchronous active-high reset are this design's choices.
//
// Latency: one cycle from x_in/acc_in to acc_out and x_out.
module uta_pe
  import uta_pkg::*;
#(
  parameter int unsigned W    = 32,      // accumulator and data width
  parameter int unsigned ROWS = 4        // PE rows in the array (4, 2 or 1)
) (
  input  logic                clk,
  input  logic                rst,       // RST: global synchronous reset
  input  logic                en,        // EN: global enable
  input  logic        [1:0]   coord_x,   // COORD_X
  input  logic        [1:0]   coord_y,   // COORD_Y
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] acc_in,
  input  tok_t                tok_l,     // CALC/CLR/NEW_4x4T/TYPE_T from the left
  input  tok_t                tok_u,     // the same from above
  output logic signed [W-1:0] x_out,
  output logic signed [W-1:0] acc_out,
  output tok_t                tok_r,
  output tok_t                tok_d
);

  tok_t                tok_in;
  tok_t                tok_q;
  logic                active;
  mcode_t              m;
  logic signed [W-1:0] shifted;
  logic signed [W-1:0] product;
  logic signed [W-1:0] acc_src;
  logic        [1:0]   krow;             // kernel row computed in this sweep

  always_comb begin
    tok_in = (tok_l.calc || tok_l.clr) ? tok_l : tok_u;
    krow   = coord_y + 2'(ROWS * 32'(tok_in.sweep));
    active = tok_in.calc && !(tok_in.ttype == T_H2 && krow[1]);
    // M decoder and multiplier
    m = coef(tok_in.ttype, krow, coord_x);
    unique case (m.sh)
      SH_X2:   shifted = x_in <<< 1;
      SH_HALF: shifted = x_in >>> 1;
      default: shifted = x_in;
    endcase
    product = m.neg ? -shifted : shifted;
    // ACC_CLR decoder
    acc_src = (tok_in.ttype == T_H2 && coord_x == 2'd2) ? '0 : acc_in;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_out <= '0;
      x_out   <= '0;
      tok_q   <= TOK_IDLE;
    end else if (en) begin
      tok_q      <= tok_in;
      tok_q.calc <= active;
      if (tok_in.clr) begin
        acc_out <= '0;
      end else if (active) begin
        acc_out <= acc_src + product;
        x_out   <= x_in;
      end
    end
  end

  assign tok_r = tok_q;
  assign tok_d = tok_q;

endmodule
