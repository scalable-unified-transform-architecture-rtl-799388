// tb_uta_ctrl_regs: exercises the register block: set/clear of the control bits,
// the START pulse (only with EN set and the engine idle, then self-clearing), the
// one-cycle soft reset, the configuration fields, the sticky DONE bit, the clock
// configuration register and the result-line counter. A second, random phase
// drives random register writes and reads and random busy/done/line-written
// inputs for 1000 cycles and checks every read and output against a model of
// the register rules: set/clear act on the bits written, START leaves when
// accepted, SRST lasts one cycle, DONE is sticky until the next accepted START.
module tb_uta_ctrl_regs;
  import uta_pkg::*;

  logic clk = 1'b0;
  logic rst, wr, busy, done, line_wr;
  logic [4:0] addr;
  logic [31:0] wdata, rdata, clk_cfg;
  logic core_en, start, soft_rst;
  logic [1:0] setup;
  ttype_e ttype;
  logic [7:0] nblk;
  logic [8:0] src_base, dst_base;
  int checks = 0, failures = 0;
  int starts = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (start) starts++;

  uta_ctrl_regs dut (.clk, .rst, .wr, .addr, .wdata, .rdata, .busy, .done, .line_wr,
                     .core_en, .start, .soft_rst, .setup, .ttype, .nblk, .src_base,
                     .dst_base, .clk_cfg);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0h exp %0h", what, got, exp);
    end
  endtask

  task automatic wr_reg(logic [4:0] a, logic [31:0] d);
    @(negedge clk); wr = 1; addr = a; wdata = d;
    @(negedge clk); wr = 0;
  endtask

  task automatic rd_reg(logic [4:0] a, output logic [31:0] d);
    @(negedge clk); addr = a; #1 d = rdata;
  endtask

  initial begin
    logic [31:0] v;
    rst = 1; wr = 0; busy = 0; done = 0; line_wr = 0; addr = 0; wdata = 0;
    @(negedge clk); rst = 0;
    // configuration fields
    wr_reg(5'h10, {3'd0, 9'd300, 9'd17, 7'd9, 2'b01, 2'b10});
    check("setup", setup, 2'b10);
    check("type", ttype, T_IDCT);
    check("nblk", nblk, 10);
    check("src", src_base, 17);
    check("dst", dst_base, 300);
    rd_reg(5'h10, v); check("config read", v, {3'd0, 9'd300, 9'd17, 7'd9, 2'b01, 2'b10});
    wr_reg(5'h14, 32'hCAFE_0042); check("clk cfg", clk_cfg, 32'hCAFE_0042);
    rd_reg(5'h14, v); check("clk cfg read", v, 32'hCAFE_0042);
    // START without EN does nothing
    wr_reg(5'h04, 32'h2);
    repeat (3) @(negedge clk);
    check("no start without EN", starts, 0);
    rd_reg(5'h0C, v); check("ctrl shows START", v, 32'h2);
    // busy engine: set EN, START stays pending
    busy = 1;
    wr_reg(5'h04, 32'h1);
    repeat (3) @(negedge clk);
    check("no start while busy", starts, 0);
    busy = 0;
    repeat (2) @(negedge clk);
    check("one start", starts, 1);
    rd_reg(5'h0C, v); check("START cleared", v, 32'h1);
    check("EN out", core_en, 1);
    // done is sticky, cleared by the next START
    @(negedge clk); done = 1; @(negedge clk); done = 0;
    rd_reg(5'h00, v); check("done sticky", v[1], 1);
    wr_reg(5'h04, 32'h2);
    @(negedge clk);
    rd_reg(5'h00, v); check("done cleared", v[1], 0);
    busy = 1; rd_reg(5'h00, v); check("busy bit", v[0], 1); busy = 0;
    // clear EN
    wr_reg(5'h08, 32'h1);
    check("EN cleared", core_en, 0);
    // soft reset pulse lasts one cycle
    @(negedge clk); wr = 1; addr = 5'h04; wdata = 32'h4;
    @(negedge clk); wr = 0;
    check("srst on", soft_rst, 1);
    @(negedge clk);
    check("srst off", soft_rst, 0);
    // result-line counter
    for (int i = 0; i < 7; i++) begin @(negedge clk); line_wr = 1; end
    @(negedge clk); line_wr = 0;
    rd_reg(5'h18, v); check("debug count", v, 7);

    // random phase against a model
    begin
      logic [2:0]  m_ctrl;
      logic [31:0] m_cfg, m_clk, m_lines;
      logic        m_done, m_start;
      logic [4:0]  addrs [7] = '{5'h00, 5'h04, 5'h08, 5'h0C, 5'h10, 5'h14, 5'h18};
      logic [31:0] exp_rd;
      rd_reg(5'h0C, v); m_ctrl = v[2:0];
      rd_reg(5'h10, m_cfg);
      rd_reg(5'h14, m_clk);
      rd_reg(5'h18, m_lines);
      rd_reg(5'h00, v); m_done = v[1];
      for (int n = 0; n < 1000; n++) begin
        @(negedge clk);
        busy    = ($urandom_range(0, 2) == 0);
        done    = ($urandom_range(0, 9) == 0);
        line_wr = 1'($urandom);
        addr    = addrs[$urandom_range(0, 6)];
        wr      = ($urandom_range(0, 2) == 0);
        wdata   = $urandom;
        if (addr == 5'h04 || addr == 5'h08) wdata = 32'($urandom_range(0, 7));
        #1;
        m_start = m_ctrl[1] && m_ctrl[0] && !busy && !m_ctrl[2];
        unique case (addr)
          5'h00:   exp_rd = {30'd0, m_done, busy};
          5'h0C:   exp_rd = {29'd0, m_ctrl};
          5'h10:   exp_rd = m_cfg;
          5'h14:   exp_rd = m_clk;
          5'h18:   exp_rd = m_lines;
          default: exp_rd = '0;
        endcase
        check("rand read", rdata, exp_rd);
        check("rand start", start, m_start);
        check("rand EN", core_en, m_ctrl[0]);
        check("rand SRST", soft_rst, m_ctrl[2]);
        check("rand nblk", nblk, 32'(m_cfg[10:4]) + 1);
        check("rand type", ttype, m_cfg[3:2]);
        check("rand src", src_base, m_cfg[19:11]);
        check("rand dst", dst_base, m_cfg[28:20]);
        check("rand clk cfg", clk_cfg, m_clk);
        // model update at the coming edge
        if (m_start) m_ctrl[1] = 1'b0;
        m_ctrl[2] = 1'b0;
        if (done) m_done = 1'b1;
        if (m_start) m_done = 1'b0;
        if (line_wr) m_lines++;
        if (wr) begin
          if (addr == 5'h04) m_ctrl = m_ctrl | wdata[2:0];
          if (addr == 5'h08) m_ctrl = m_ctrl & ~wdata[2:0];
          if (addr == 5'h10) m_cfg = wdata;
          if (addr == 5'h14) m_clk = wdata;
        end
      end
      @(negedge clk);
      wr = 0; busy = 0; done = 0; line_wr = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
