// uta_result_packer: gathers the second-pass results into output lines.
//
// In the second pass, the output register of an array row delivers one row j of
// the 2-D result over consecutive vectors (token idx = 0..3): Y[j][idx]. With all
// four PE rows present, array row r carries result row j = r; in the 2x4 and 1x4
// setups each vector is swept through the array several times and array row r
// carries result row j = r + ROWS * sweep. The packer keeps the values of each
// result row in a small register set and emits the complete line, truncated to DW
// bits per element, in the cycle its last value appears. For the 2x2 Hadamard pair
// the left transform's results come from column 1 and go to elements 0-1 of the
// line, the right one's from column 3 into elements 2-3; a line has two rows.
//
// In the 4x4 setup rows complete one cycle apart and lines leave in the cycle they
// complete. In the 2x4 setup two rows can complete in the same cycle; a one-bit
// pending flag per result row then delays the later one, lowest row first, so
// lines always leave in order 0..3, at most one per cycle (at most two cycles
// late). line_valid/line_out are combinational from the array's output registers
// and these flags: the last line of a 4x4 block appears 14 cycles after its first
// vector entered the array in the 4x4 setup. This block is this design's own: the
// document does not describe how results leave the array.
module uta_result_packer
  import uta_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 4,
  parameter int unsigned DW   = 16,
  parameter int unsigned W    = 32
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic signed [W-1:0] acc_o [ROWS][COLS],
  input  tok_t                tok_o [ROWS][COLS],
  output logic                line_valid,
  output logic [COLS*DW-1:0]  line_out
);

  logic [COLS*DW-1:0] held    [4];
  logic [COLS*DW-1:0] cur     [4];
  logic [3:0]         done_now;   // result row j completes this cycle
  logic [3:0]         pending;    // result row j complete, not yet emitted
  logic [3:0]         all_rdy;
  logic [1:0]         sel;

  // capture of second-pass values into the held result rows
  always_comb begin
    for (int j = 0; j < 4; j++) cur[j] = held[j];
    done_now = '0;
    for (int r = 0; r < ROWS; r++) begin
      automatic tok_t       t3 = tok_o[r][COLS-1];
      automatic logic [1:0] j3 = 2'(r) + 2'(ROWS * 32'(t3.sweep));
      automatic logic [1:0] p3 = (t3.ttype == T_H2) ? 2'd2 + t3.idx : t3.idx;
      if (en && t3.calc && t3.pass) begin
        cur[j3][p3*DW +: DW] = acc_o[r][COLS-1][DW-1:0];
        if (3'(t3.idx) == lines_per_block(t3.ttype) - 3'd1) done_now[j3] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < 4; j++) held[j] <= '0;
    end else begin
      for (int r = 0; r < ROWS; r++) begin
        automatic tok_t       t3 = tok_o[r][COLS-1];
        automatic tok_t       t1 = tok_o[r][1];
        automatic logic [1:0] j3 = 2'(r) + 2'(ROWS * 32'(t3.sweep));
        automatic logic [1:0] j1 = 2'(r) + 2'(ROWS * 32'(t1.sweep));
        automatic logic [1:0] p3 = (t3.ttype == T_H2) ? 2'd2 + t3.idx : t3.idx;
        if (en && t3.calc && t3.pass)
          held[j3][p3*DW +: DW] <= acc_o[r][COLS-1][DW-1:0];
        if (en && t1.calc && t1.pass && t1.ttype == T_H2)
          held[j1][t1.idx*DW +: DW] <= acc_o[r][1][DW-1:0];
      end
    end
  end

  // emission: the lowest ready result row, from the registers if it completed
  // earlier, otherwise straight from the array outputs
  always_comb begin
    all_rdy = pending | done_now;
    sel     = '0;
    for (int j = 3; j >= 0; j--) if (all_rdy[j]) sel = 2'(j);
    line_valid = en && |all_rdy;
    line_out   = pending[sel] ? held[sel] : cur[sel];
  end

  always_ff @(posedge clk) begin
    if (rst)      pending <= '0;
    else if (en)  pending <= all_rdy & ~(4'b1 << sel);
  end

endmodule
