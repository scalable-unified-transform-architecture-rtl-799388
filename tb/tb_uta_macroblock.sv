// tb_uta_macroblock: one H.264 4:2:0 macroblock through the transform core, the
// way encoder and decoder software would use it, at the core's default size.
//
// Encoder: the 16 luma and 8 chroma 4x4 residual blocks of a macroblock (a
// synthetic smooth gradient plus noise, as prediction leaves) are written to the
// local RAM and transformed with the forward integer DCT in one 24-block job.
// Software then gathers the 16 luma DC coefficients into a 4x4 block for the 4x4
// Hadamard, and the 2x2 chroma DC blocks of Cb and Cr into one line pair for the
// 2x2 Hadamard. Decoder: the coefficient blocks, scaled down as dequantised
// values would be, go through the inverse integer DCT in one 24-block job. Every
// result is compared with reference transforms.
//
// Timing: each job's cycles from the START write to DONE are measured. One-block
// jobs of every type give the time of a single transform; the 24-block jobs give
// the streaming time per block (about 10.5 cycles for a 4x4 block, since reads
// and result writes share the engine's RAM port). The test fails if a 24-block
// job exceeds 11 cycles per block or a one-block job exceeds 30 cycles.
module tb_uta_macroblock;
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
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  uta_ip_core dut (
    .clk, .rst, .reg_wr, .reg_addr, .reg_wdata, .reg_rdata,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .clk_cfg
  );

  // RAM map (lines): residuals 0-95 (luma blocks 0-15 in raster order, then Cb
  // 0-3, Cr 0-3), luma DC block 100-103, chroma DC pair 104-105, coefficients
  // 256-351, Hadamard results 360-365, decoder input 128-223, decoded 400-495
  localparam int RES = 0, LDC = 100, CDC = 104, COEF = 256, HAD4 = 360, HAD2 = 364,
                 DEQ = 128, DEC = 400;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic reg_write(logic [4:0] a, logic [31:0] d);
    @(negedge clk);
    reg_wr = 1'b1; reg_addr = a; reg_wdata = d;
    @(negedge clk);
    reg_wr = 1'b0;
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

  task automatic write_block(int line, mat_t b, int lp);
    for (int r = 0; r < lp; r++) begin
      logic [63:0] l;
      for (int c = 0; c < 4; c++) l[16*c +: 16] = 16'(b[r][c]);
      mem_write(line + r, l);
    end
  endtask

  task automatic read_block(int line, int lp, output mat_t b);
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) b[r][c] = 0;
    for (int r = 0; r < lp; r++) begin
      logic [63:0] l;
      mem_read(line + r, l);
      for (int c = 0; c < 4; c++) b[r][c] = int'($signed(l[16*c +: 16]));
    end
  endtask

  // run a job and return its cycles from the START write to DONE in the status
  task automatic run_job(ttype_e t, int nb, int src, int dst, output longint cyc);
    logic [31:0] st;
    longint t0;
    int n = 0;
    reg_write(5'h10, {3'd0, 9'(dst), 9'(src), 7'(nb - 1), 2'(t), 2'b00});
    @(negedge clk);
    reg_wr = 1'b1; reg_addr = 5'h04; reg_wdata = 32'h3;   // EN | START
    t0 = cycle;
    @(negedge clk);
    reg_wr = 1'b0; reg_addr = 5'h00;
    // the job is running once busy is set (this clears the previous DONE)
    do begin
      #1 st = reg_rdata;
      if (!st[0]) @(negedge clk);
      n++;
    end while (!st[0] && n < 5000);
    do begin
      #1 st = reg_rdata;
      if (!(st[1] && !st[0])) @(negedge clk);
      n++;
    end while (!(st[1] && !st[0]) && n < 5000);
    cyc = cycle - t0;
    check("job finished", n < 5000, 1);
  endtask

  task automatic compare(string what, int line, int lp, mat_t e);
    mat_t g;
    read_block(line, lp, g);
    for (int r = 0; r < lp; r++) for (int c = 0; c < 4; c++)
      check($sformatf("%s [%0d][%0d]", what, r, c), g[r][c], int'($signed(16'(e[r][c]))));
  endtask

  initial begin
    int luma [16][16];
    int cb [8][8], cr [8][8];
    mat_t blk [24], coef [24];
    mat_t m;
    longint cyc;
    longint single [4];
    rst = 1'b1; reg_wr = 1'b0; reg_addr = '0; reg_wdata = '0;
    mem_en = 1'b0; mem_we = '0; mem_addr = '0; mem_wdata = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // ---- residuals: smooth gradient plus noise ----
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++)
      luma[y][x] = 6 * x - 5 * y + 8 + int'($urandom_range(0, 40)) - 20;
    for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) begin
      cb[y][x] = 3 * x + 2 * y - 20 + int'($urandom_range(0, 16)) - 8;
      cr[y][x] = -4 * x + y + 12 + int'($urandom_range(0, 16)) - 8;
    end
    for (int b = 0; b < 16; b++)
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
        blk[b][r][c] = luma[4 * (b / 4) + r][4 * (b % 4) + c];
    for (int b = 0; b < 4; b++)
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        blk[16 + b][r][c] = cb[4 * (b / 2) + r][4 * (b % 2) + c];
        blk[20 + b][r][c] = cr[4 * (b / 2) + r][4 * (b % 2) + c];
      end
    for (int b = 0; b < 24; b++) write_block(RES + 4 * b, blk[b], 4);

    // ---- encoder: forward DCT of all 24 blocks ----
    run_job(T_FDCT, 24, RES, COEF, cyc);
    $display("forward DCT, 24 blocks: %0d cycles (%0.1f per block)", cyc, real'(cyc) / 24.0);
    check("fdct stream within 11 cycles per block", cyc <= 24 * 11, 1);
    for (int b = 0; b < 24; b++) begin
      coef[b] = fdct(blk[b]);
      compare($sformatf("fdct blk %0d", b), COEF + 4 * b, 4, coef[b]);
    end

    // ---- encoder: luma DC 4x4 Hadamard ----
    for (int b = 0; b < 16; b++) m[b / 4][b % 4] = coef[b][0][0];
    write_block(LDC, m, 4);
    run_job(T_H4, 1, LDC, HAD4, cyc);
    single[T_H4] = cyc;
    compare("luma DC hadamard", HAD4, 4, had4(m));

    // ---- encoder: chroma DC 2x2 Hadamards, Cb left and Cr right ----
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) m[r][c] = 0;
    for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++) begin
      m[r][c]     = coef[16 + 2 * r + c][0][0];
      m[r][2 + c] = coef[20 + 2 * r + c][0][0];
    end
    write_block(CDC, m, 2);
    run_job(T_H2, 1, CDC, HAD2, cyc);
    single[T_H2] = cyc;
    compare("chroma DC hadamard", HAD2, 2, had2(m));

    // ---- decoder: inverse DCT of the (scaled) coefficient blocks ----
    for (int b = 0; b < 24; b++) begin
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) m[r][c] = coef[b][r][c] >>> 2;
      blk[b] = m;
      write_block(DEQ + 4 * b, m, 4);
    end
    run_job(T_IDCT, 24, DEQ, DEC, cyc);
    $display("inverse DCT, 24 blocks: %0d cycles (%0.1f per block)", cyc, real'(cyc) / 24.0);
    check("idct stream within 11 cycles per block", cyc <= 24 * 11, 1);
    for (int b = 0; b < 24; b++) compare($sformatf("idct blk %0d", b), DEC + 4 * b, 4, idct(blk[b]));

    // ---- single transforms, one block per job ----
    run_job(T_FDCT, 1, RES, COEF, cyc);
    single[T_FDCT] = cyc;
    run_job(T_IDCT, 1, DEQ, DEC, cyc);
    single[T_IDCT] = cyc;
    for (int t = 0; t < 4; t++) begin
      $display("one-block job, type %0d: %0d cycles", t, single[t]);
      check("one-block job within 30 cycles", single[t] <= 30, 1);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
