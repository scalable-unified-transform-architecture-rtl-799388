// uta_vde: variable delay elements of the transposition switch.
//
// With all four PE rows present, the first-pass result that array column c needs
// in the second pass appears at a row output in exactly the cycle it is needed,
// and the switch's multiplexers pass it straight through. With fewer rows (the
// 2x4 and 1x4 setups) each vector is swept through the array two or four times,
// its kernel rows come out spread over several cycles, and the value a column
// needs appears earlier than it is used, so it must be held. This block holds
// them: per array column c, one register per kernel row i, written when the
// first-pass result (vector c, kernel row i) leaves the array and read whenever
// the second pass feeds vector i into column c. Whether the registers or the
// direct path are used is decided per token from the transform type: sweeps > 1
// selects the registers (configurable bypass).
//
// Timing: a value is written at the clock edge ending the cycle it leaves the
// array and can be fed from the next cycle on. For the sweep orders built here
// every value is written at least one cycle before its first use (worst case:
// 2x4 setup, kernel row 0 of vector 3, written one cycle early). In the 4x4
// setup the registers are never selected.
//
// The document describes these elements as programmable delay registers and
// bypass multiplexers placed per column in the switch and activated according
// to the number of PE rows removed; its drawings show, behind each column's 4:1
// multiplexer, a two-register and a one-register stage with bypasses, but not
// their timing. Holding one value per (column, kernel row), written straight
// from the row outputs, is this design's own arrangement: it needs no fixed
// delay schedule, at the cost of more registers.
module uta_vde
  import uta_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 4,
  parameter int unsigned W    = 32
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic signed [W-1:0] acc_o     [ROWS][COLS],  // registered PE sums
  input  tok_t                tok_o     [ROWS][COLS],  // their tokens
  input  tok_t                tok_col   [COLS],        // token at each column's top
  input  logic signed [W-1:0] fb_direct [COLS],        // switch multiplexer outputs
  output logic signed [W-1:0] fb        [COLS]
);

  logic signed [W-1:0] hold [COLS][4];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int c = 0; c < COLS; c++) for (int i = 0; i < 4; i++) hold[c][i] <= '0;
    end else if (en) begin
      for (int r = 0; r < ROWS; r++) begin
        automatic tok_t       t3 = tok_o[r][COLS-1];
        automatic tok_t       t1 = tok_o[r][1];
        automatic logic [1:0] k3 = 2'(r) + 2'(ROWS * 32'(t3.sweep));
        automatic logic [1:0] k1 = 2'(r) + 2'(ROWS * 32'(t1.sweep));
        if (t3.calc && !t3.pass) begin
          if (t3.ttype == T_H2) hold[2 + 32'(t3.idx[0])][k3] <= acc_o[r][COLS-1];
          else                  hold[t3.idx][k3]              <= acc_o[r][COLS-1];
        end
        if (t1.calc && !t1.pass && t1.ttype == T_H2) begin
          hold[{1'b0, t1.idx[0]}][k1] <= acc_o[r][1];
        end
      end
    end
  end

  always_comb begin
    for (int c = 0; c < COLS; c++) begin
      fb[c] = (sweeps(tok_col[c].ttype, ROWS) > 3'd1) ? hold[c][tok_col[c].idx]
                                                      : fb_direct[c];
    end
  end

endmodule
