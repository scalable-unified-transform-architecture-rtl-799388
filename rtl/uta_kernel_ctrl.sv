// uta_kernel_ctrl: control unit of the transform kernel.
//
// Starts a job of `nblk` blocks of one transform type and then, cycle by cycle,
// decides which token enters the top-left PE. A job begins with one CLR token
// that sweeps the array and clears all accumulators. A block is started only
// when the input buffer already holds all its lines (4 for the 4x4 transforms,
// 2 for the 2x2 Hadamard pair), so its first pass runs without gaps; the second
// pass, fed by the transposition switch, follows immediately, and the next block
// can start in the very next cycle. The array is therefore only stalled when the
// input buffer has not received enough data. When every result line of the job
// has been counted, `done` pulses for one cycle (the END signal).
//
// Token sequence of one block: first pass idx 0..L-1 (idx 0 with NEW_4x4T), then
// second pass idx 0..L-1; one token per cycle while `en` is high. In the 2x4 and
// 1x4 setups (ROWS = 2, 1) every idx is repeated for sweeps 0..S-1, S = 4/ROWS
// for the 4x4 transforms and 2/ROWS (at least 1) for the 2x2 pair. All state
// freezes while `en` is low. The document gives this unit's role; the state
// machine, the start rule and the CLR-at-start are this design's choices.
module uta_kernel_ctrl
  import uta_pkg::*;
#(
  parameter int unsigned ROWS   = 4,   // PE rows of the array setup
  parameter int unsigned NBLK_W = 8,
  parameter int unsigned CNT_W  = 3
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic              start,      // accepted when idle and en
  input  ttype_e            ttype,
  input  logic [NBLK_W-1:0] nblk,       // number of blocks (0 = none)
  input  logic [CNT_W-1:0]  avail,      // lines waiting in column 0 of the input buffer
  input  logic              line_done,  // one result line left the array
  output tok_t              tok,        // token into PE(0,0)
  output logic              busy,
  output logic              done
);

  typedef enum logic [1:0] {S_IDLE, S_CLR, S_RUN, S_DRAIN} state_e;

  state_e              state;
  ttype_e              typ;
  logic [NBLK_W-1:0]   blk_left;
  logic [NBLK_W+2:0]   lines_left;
  logic                in_block;
  logic                pass;
  logic [1:0]          idx;
  logic [1:0]          swp;
  logic                emit;
  logic [2:0]          lpb;
  logic [2:0]          nsw;

  assign lpb = lines_per_block(typ);
  assign nsw = sweeps(typ, ROWS);

  always_comb begin
    tok  = TOK_IDLE;
    emit = 1'b0;
    tok.ttype = typ;
    if (state == S_CLR) begin
      tok.clr = 1'b1;
    end else if (state == S_RUN) begin
      if (in_block) begin
        emit = 1'b1;
      end else if (blk_left != '0 && 3'(avail) >= lpb) begin
        emit = 1'b1;
      end
      tok.calc   = emit;
      tok.pass   = in_block ? pass : 1'b0;
      tok.idx    = in_block ? idx  : 2'd0;
      tok.sweep  = in_block ? swp  : 2'd0;
      tok.new4x4 = emit && !in_block;
    end
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      typ        <= T_FDCT;
      blk_left   <= '0;
      lines_left <= '0;
      in_block   <= 1'b0;
      pass       <= 1'b0;
      idx        <= '0;
      swp        <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (en) begin
        if (line_done && lines_left != '0) lines_left <= lines_left - 1'b1;
        unique case (state)
          S_IDLE: if (start) begin
            typ        <= ttype;
            blk_left   <= nblk;
            lines_left <= (NBLK_W+3)'(nblk) * (NBLK_W+3)'(lines_per_block(ttype));
            in_block   <= 1'b0;
            pass       <= 1'b0;
            idx        <= '0;
            swp        <= '0;
            state      <= S_CLR;
          end
          S_CLR: state <= S_RUN;
          S_RUN: begin
            if (emit) begin
              in_block <= 1'b1;
              pass     <= tok.pass;
              idx      <= tok.idx;
              if (3'(tok.sweep) != nsw - 3'd1) begin
                swp <= tok.sweep + 1'b1;
              end else begin
                swp <= '0;
                if (3'(tok.idx) != lpb - 3'd1) begin
                  idx <= tok.idx + 1'b1;
                end else begin
                  idx <= '0;
                  if (!tok.pass) begin
                    pass <= 1'b1;
                  end else begin
                    pass     <= 1'b0;
                    in_block <= 1'b0;
                    blk_left <= blk_left - 1'b1;
                  end
                end
              end
            end else if (!in_block && blk_left == '0) begin
              state <= S_DRAIN;
            end
          end
          S_DRAIN: if (lines_left == '0 || (lines_left == 1 && line_done)) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        endcase
      end
    end
  end

endmodule
