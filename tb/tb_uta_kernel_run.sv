// tb_uta_kernel_run: self-checking test harness of the transform kernel, for
// any number of PE rows (ROWS = 4, 2 or 1: the 4x4, 2x4 and 1x4 setups). The
// testbenches tb_uta_kernel, tb_uta_kernel_2x4 and tb_uta_kernel_1x4 instantiate
// it with one setup each.
//
// Runs jobs of every transform type (forward/inverse 4x4 integer DCT, 4x4
// Hadamard, 2x2 Hadamard pair) on random blocks and compares each result line
// with a reference computed here directly from the textbook definitions: the
// H.264 forward core transform Y = Cf X Cf^T, the H.264 inverse core transform
// (rows then columns, with >>1 on the odd inputs), and Y = H X H^T for the
// Hadamard transforms. It checks the latency of a 4x4 block (14 cycles in the
// 4x4 setup, 21 in the 2x4 and 35 in the 1x4 setup, from the first vector to the
// last result line), the back-to-back rate of one 4x4 block per 8 * sweeps
// cycles (8, 16, 32) and of one 2x2 pair per 4 * sweeps cycles (4, 4, 8), stalls
// from an empty input buffer, and freezing with the global enable low.
module tb_uta_kernel_run #(
  parameter int unsigned ROWS = 4
);
  import uta_pkg::*;
  import tb_uta_ref_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic en;
  logic push;
  logic [63:0] line_in;
  logic [2:0] level;
  logic start;
  ttype_e ttype;
  logic [7:0] nblk;
  logic res_valid;
  logic [63:0] res_line;
  logic busy, done, issue;

  int checks = 0;
  int failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  localparam int unsigned SW = 4 / ROWS;                 // sweeps of a 4x4 block
  localparam int          LAT = (ROWS == 4) ? 14 : (ROWS == 2) ? 21 : 35;

  uta_kernel #(.ROWS(ROWS)) dut (
    .clk, .rst, .en, .push, .line_in, .level, .start, .ttype, .nblk,
    .res_valid, .res_line, .busy, .done, .issue
  );

  // ---------------- stimulus ----------------
  mat_t in_q[$];        // blocks still to be pushed, in order
  int starve_cycles = 0, en_low_cycles = 0;
  longint first_issue, last_res;

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom_range(0, hi - lo));
  endfunction

  // result checker, runs concurrently
  mat_t exp_blocks[$];
  int exp_row = 0;
  ttype_e chk_type;
  always @(posedge clk) begin
    if (!rst && en && res_valid) begin
      mat_t e;
      int lp;
      lp = (chk_type == T_H2) ? 2 : 4;
      e = exp_blocks[0];
      for (int c = 0; c < 4; c++) begin
        checks++;
        if ($signed(res_line[16*c +: 16]) !== 16'(e[exp_row][c])) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH type=%0d row=%0d col=%0d got=%0d exp=%0d", chk_type,
                     exp_row, c, $signed(res_line[16*c +: 16]), e[exp_row][c]);
        end
      end
      exp_row++;
      if (exp_row == lp) begin
        exp_row = 0;
        void'(exp_blocks.pop_front());
      end
      last_res = cycle;
      res_count++;
    end
  end
  int res_count = 0;

  always @(posedge clk) if (!rst && en && busy && !issue && dut.u_ctrl.state == 2'd2
                             && !dut.u_ctrl.in_block) starve_cycles++;

  // simple job runner feeding lines while waiting for results
  task automatic job(ttype_e t, int nb, int gap, bit toggle_en);
    mat_t blk;
    int lp = (t == T_H2) ? 2 : 4;
    int row = 0;
    int target;
    chk_type = t;
    for (int b = 0; b < nb; b++) begin
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
        if (t == T_FDCT)      blk[i][j] = rnd(-255, 255);
        else if (t == T_IDCT) blk[i][j] = rnd(-2000, 2000);
        else if (t == T_H4)   blk[i][j] = rnd(-1500, 1500);
        else                  blk[i][j] = (i < 2) ? rnd(-6000, 6000) : 0;
      end
      in_q.push_back(blk);
      exp_blocks.push_back(ref_of(t, blk));
    end
    target = res_count + nb * lp;
    @(negedge clk);
    ttype = t; nblk = 8'(nb); start = 1'b1; en = 1'b1;
    @(negedge clk);
    start = 1'b0;
    first_issue = -1;
    while (!(res_count >= target && !busy)) begin
      push = 1'b0;
      if (toggle_en) en = ($urandom_range(0, 99) >= 20);
      if (!en) en_low_cycles++;
      // a push is accepted at the next edge; the level seen here already
      // includes every earlier push
      if (in_q.size() > 0 && level < 3'd4 && ($urandom_range(0, 99) >= gap)) begin
        blk = in_q[0];
        push = 1'b1;
        for (int c = 0; c < 4; c++) line_in[16*c +: 16] = 16'(blk[row][c]);
        row++;
        if (row == lp) begin
          row = 0;
          void'(in_q.pop_front());
        end
      end
      @(posedge clk);
      if (issue && first_issue < 0) first_issue = cycle;
      @(negedge clk);
    end
    push = 1'b0;
    en = 1'b1;
  endtask

  initial begin
    longint t0, t1, rate4;
    rst = 1'b1; en = 1'b1; push = 1'b0; start = 1'b0; line_in = '0;
    ttype = T_FDCT; nblk = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;

    $display("kernel with %0d PE rows", ROWS);
    // 1. single forward DCT block: latency from first vector to last line
    job(T_FDCT, 1, 0, 1'b0);
    checks++;
    if (last_res - first_issue != LAT) begin
      failures++;
      $display("LATENCY got %0d expected %0d", last_res - first_issue, LAT);
    end

    // 2. back-to-back stream of each type with no input gaps: rate check
    job(T_FDCT, 12, 0, 1'b0);
    t0 = first_issue; t1 = last_res;
    rate4 = t1 - t0;
    checks++;
    // 12 blocks at 8 * SW cycles each, plus the pipeline latency and input refill
    if (t1 - t0 > 12 * 8 * SW + LAT + 16) begin
      failures++;
      $display("RATE fdct stream took %0d cycles", t1 - t0);
    end
    job(T_IDCT, 10, 0, 1'b0);
    job(T_H4, 10, 0, 1'b0);
    job(T_H2, 10, 0, 1'b0);
    t0 = first_issue; t1 = last_res;
    checks++;
    // 10 pairs at 4 * sweeps cycles each (4, 4, 8), plus latency and refill
    if (t1 - t0 > 10 * 4 * int'(sweeps(T_H2, ROWS)) + LAT + 16) begin
      failures++;
      $display("RATE 2x2 stream took %0d cycles", t1 - t0);
    end
    $display("rates: 12 4x4 blocks in %0d cycles, 10 2x2 pairs in %0d cycles",
             rate4, t1 - t0);

    // 3. starved input and enable toggling
    job(T_FDCT, 6, 60, 1'b0);
    job(T_IDCT, 6, 30, 1'b1);
    job(T_H2, 6, 40, 1'b1);
    job(T_H4, 6, 50, 1'b1);

    checks++;
    if (starve_cycles == 0) begin failures++; $display("no starvation seen"); end
    checks++;
    if (en_low_cycles == 0) begin failures++; $display("no enable-low cycle seen"); end
    checks++;
    if (exp_blocks.size() != 0) begin failures++; $display("missing results"); end
    $display("starved cycles %0d, enable-low cycles %0d", starve_cycles, en_low_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
