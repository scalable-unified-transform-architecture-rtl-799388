// tb_uta_ip_core_2x4: the end-to-end test of tb_uta_ip_core, with the core built
// in the 2x4 array setup (2 PE rows); only the job-time limit is scaled.
//
// Software's view: blocks are written into the local RAM through the system
// port, a job is configured and started through the registers, the status
// register is polled until DONE, and the results are read back from the RAM and
// compared with reference transforms. Jobs cover all four transform types in
// sequence (mode switches), a job whose engine is paused by clearing EN, a soft
// reset in the middle of a job, a large job (32 blocks, the luma of two
// macroblocks) and double buffering: the next job's input is written into the other
// half of the RAM while a job runs. The test also counts how often the engine
// hit each of its mechanisms (input-buffer starvation, back-to-back blocks,
// second-pass feedback through the transposition switch, 2x2 dual mode, CLR
// sweep, global stall) and fails if any never happened.
module tb_uta_ip_core_2x4;
  import uta_pkg::*;
  import tb_uta_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic        reg_wr;
  logic [4:0]  reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic        mem_en;
  logic [7:0]  mem_we;
  logic [8:0]  mem_addr;
  logic [63:0] mem_wdata, mem_rdata;
  logic [31:0] clk_cfg;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  uta_ip_core #(.ROWS(2)) dut (
    .clk, .rst, .reg_wr, .reg_addr, .reg_wdata, .reg_rdata,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .clk_cfg
  );

  // ---------------- mechanism counters ----------------
  int n_starve = 0, n_b2b = 0, n_feedback = 0, n_dual2x2 = 0, n_clr = 0,
      n_stall = 0, n_srst = 0, n_dbuf = 0;
  logic prev_last;
  always @(posedge clk) begin
    if (!rst) begin
      // running, between blocks, and no block can start for lack of lines
      if (dut.core_en && dut.u_kernel.u_ctrl.state == 2'd2 &&
          !dut.u_kernel.u_ctrl.in_block && dut.u_kernel.u_ctrl.blk_left != 0 &&
          !dut.u_kernel.issue) n_starve++;
      // a new block starts in the cycle right after the previous block's last vector
      if (dut.u_kernel.issue && dut.u_kernel.tok0.new4x4 && prev_last) n_b2b++;
      prev_last <= dut.u_kernel.issue && dut.u_kernel.tok0.pass &&
                   (3'(dut.u_kernel.tok0.idx) ==
                    lines_per_block(dut.u_kernel.tok0.ttype) - 3'd1);
      if (dut.u_kernel.issue && dut.u_kernel.tok0.pass) n_feedback++;
      if (dut.u_kernel.issue && dut.u_kernel.tok0.ttype == T_H2) n_dual2x2++;
      if (dut.u_kernel.tok0.clr && dut.core_en) n_clr++;
      if (!dut.core_en && dut.u_kernel.busy) n_stall++;
      if (dut.soft_rst) n_srst++;
      if (mem_en && mem_we != 0 && dut.u_kernel.busy) n_dbuf++;
    end
  end

  // ---------------- bus helpers ----------------
  task automatic reg_write(logic [4:0] a, logic [31:0] d);
    @(negedge clk);
    reg_wr = 1'b1; reg_addr = a; reg_wdata = d;
    @(negedge clk);
    reg_wr = 1'b0;
  endtask

  task automatic reg_read(logic [4:0] a, output logic [31:0] d);
    @(negedge clk);
    reg_addr = a;
    #1 d = reg_rdata;
  endtask

  task automatic mem_write(int line, logic [63:0] d);
    @(negedge clk);
    mem_en = 1'b1; mem_we = 8'hFF; mem_addr = 9'(line); mem_wdata = d;
    @(negedge clk);
    mem_en = 1'b0; mem_we = '0;
  endtask

  task automatic mem_read(int line, output logic [63:0] d);
    @(negedge clk);
    mem_en = 1'b1; mem_we = '0; mem_addr = 9'(line);
    @(negedge clk);
    mem_en = 1'b0;
    d = mem_rdata;
  endtask

  function automatic logic [63:0] pack_row(mat_t b, int r);
    logic [63:0] l;
    for (int c = 0; c < 4; c++) l[16*c +: 16] = 16'(b[r][c]);
    return l;
  endfunction

  // load nb blocks of type t at line src, return their reference results
  task automatic load_job(ttype_e t, int nb, int src, ref mat_t exp_q[$]);
    int lp = (t == T_H2) ? 2 : 4;
    exp_q.delete();
    for (int b = 0; b < nb; b++) begin
      mat_t x = rand_block(t);
      for (int r = 0; r < lp; r++) mem_write(src + b * lp + r, pack_row(x, r));
      exp_q.push_back(ref_of(t, x));
    end
  endtask

  task automatic config_job(ttype_e t, int nb, int src, int dst);
    reg_write(5'h10, {3'd0, 9'(dst), 9'(src), 7'(nb - 1), 2'(t), 2'b00});
  endtask

  task automatic wait_done(int max_cycles);
    logic [31:0] st;
    int n = 0;
    do begin
      reg_read(5'h00, st);
      n++;
    end while (!(st[1] && !st[0]) && n < max_cycles);
    checks++;
    if (n >= max_cycles) begin
      failures++;
      $display("job did not finish");
    end
  endtask

  task automatic check_job(ttype_e t, int dst, mat_t exp_q[$]);
    int lp = (t == T_H2) ? 2 : 4;
    logic [63:0] d;
    for (int b = 0; b < exp_q.size(); b++) begin
      for (int r = 0; r < lp; r++) begin
        mem_read(dst + b * lp + r, d);
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (d[16*c +: 16] !== 16'(exp_q[b][r][c])) begin
            failures++;
            if (failures < 10)
              $display("MISMATCH type=%0d blk=%0d row=%0d col=%0d got=%0d exp=%0d",
                       t, b, r, c, $signed(d[16*c +: 16]), exp_q[b][r][c]);
          end
        end
      end
    end
  endtask

  task automatic run_job(ttype_e t, int nb, int src, int dst);
    mat_t e[$];
    load_job(t, nb, src, e);
    config_job(t, nb, src, dst);
    reg_write(5'h04, 32'h3);              // EN | START
    wait_done(4000);
    check_job(t, dst, e);
  endtask

  initial begin
    mat_t e0[$], e1[$];
    logic [31:0] v;
    longint t_start, t_end;
    rst = 1'b1; reg_wr = 1'b0; reg_addr = '0; reg_wdata = '0;
    mem_en = 1'b0; mem_we = '0; mem_addr = '0; mem_wdata = '0;
    repeat (4) @(posedge clk);
    rst = 1'b0;

    // register read-back
    reg_write(5'h14, 32'h0000_0A5C);
    reg_read(5'h14, v);
    checks++; if (v != 32'h0000_0A5C || clk_cfg != 32'h0000_0A5C) begin
      failures++; $display("clock config register");
    end

    // one job of every type (mode switches between jobs)
    run_job(T_FDCT, 3, 0, 256);
    run_job(T_IDCT, 3, 16, 272);
    run_job(T_H4,   2, 32, 288);
    run_job(T_H2,   4, 48, 304);

    // two macroblocks' worth of luma forward DCTs, timed
    load_job(T_FDCT, 32, 0, e0);
    config_job(T_FDCT, 32, 0, 256);
    @(negedge clk);
    t_start = $time;
    reg_write(5'h04, 32'h3);
    // double buffering: load the next job into the other half while this runs
    load_job(T_IDCT, 16, 128, e1);
    wait_done(4000);
    t_end = $time;
    check_job(T_FDCT, 256, e0);
    $display("32 forward 4x4 transforms: %0d cycles", (t_end - t_start) / 10);
    checks++;
    // 16 cycles per block at full rate; allow for RAM port sharing
    if ((t_end - t_start) / 10 > 32 * 20 + 40) begin
      failures++; $display("job too slow");
    end
    config_job(T_IDCT, 16, 128, 384);
    reg_write(5'h04, 32'h3);
    // pause the engine for a while in the middle of the job
    repeat (20) @(negedge clk);
    reg_write(5'h08, 32'h1);              // clear EN
    repeat (30) @(negedge clk);
    reg_read(5'h00, v);
    checks++; if (!v[0]) begin failures++; $display("paused job not busy"); end
    reg_write(5'h04, 32'h1);              // set EN again
    wait_done(4000);
    check_job(T_IDCT, 384, e1);

    // debug register counts every result line written
    reg_read(5'h18, v);
    checks++;
    if (v != 32'(3*4 + 3*4 + 2*4 + 4*2 + 32*4 + 16*4)) begin
      failures++; $display("debug line count %0d", v);
    end

    // soft reset in the middle of a job, then a clean job
    load_job(T_H4, 8, 0, e0);
    config_job(T_H4, 8, 0, 256);
    reg_write(5'h04, 32'h3);
    repeat (10) @(negedge clk);
    reg_write(5'h04, 32'h4);              // SRST
    repeat (3) @(negedge clk);
    reg_read(5'h00, v);
    checks++; if (v[0]) begin failures++; $display("busy after soft reset"); end
    run_job(T_H2, 6, 0, 256);
    run_job(T_FDCT, 2, 100, 300);

    // every mechanism must have happened
    checks += 8;
    if (n_starve == 0)   begin failures++; $display("no input-buffer starvation"); end
    if (n_b2b == 0)      begin failures++; $display("no back-to-back blocks"); end
    if (n_feedback == 0) begin failures++; $display("no transposition feedback"); end
    if (n_dual2x2 == 0)  begin failures++; $display("no 2x2 dual mode"); end
    if (n_clr == 0)      begin failures++; $display("no CLR sweep"); end
    if (n_stall == 0)    begin failures++; $display("no global stall"); end
    if (n_srst == 0)     begin failures++; $display("no soft reset"); end
    if (n_dbuf == 0)     begin failures++; $display("no double buffering"); end
    $display("mechanisms: starve=%0d back2back=%0d feedback=%0d dual2x2=%0d clr=%0d stall=%0d srst=%0d dbuf=%0d",
             n_starve, n_b2b, n_feedback, n_dual2x2, n_clr, n_stall, n_srst, n_dbuf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (240000) @(posedge clk);
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
