// tb_uta_agu: checks the address generation unit against a small model: reads
// from src_base upward, writes from dst_base upward, a write whenever a result
// line is presented (with its data), reads only in other cycles and only while
// the modelled input buffer (level plus the line in flight) has room, data_ready
// one cycle after each read, and busy until every line is read and written.
module tb_uta_agu;
  logic clk = 1'b0;
  logic rst, start, res_valid;
  logic [8:0] src_base, dst_base;
  logic [9:0] nlines;
  logic [2:0] level;
  logic [63:0] res_line;
  logic ram_en, ram_we, data_ready, busy;
  logic [8:0] ram_addr;
  logic [63:0] ram_wdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  uta_agu dut (.clk, .rst, .start, .src_base, .dst_base, .nlines, .level, .res_valid,
               .res_line, .ram_en, .ram_we, .ram_addr, .ram_wdata, .data_ready, .busy);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    int lvl, rd_n, wr_n, inflight, n;
    rst = 1'b1; start = 1'b0; res_valid = 1'b0; level = '0; res_line = '0;
    src_base = '0; dst_base = '0; nlines = '0;
    @(negedge clk); rst = 1'b0;
    for (int job = 0; job < 4; job++) begin
      n = 8 + 4 * job;
      @(negedge clk);
      src_base = 9'($urandom); dst_base = 9'($urandom); nlines = 10'(n);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lvl = 0; rd_n = 0; wr_n = 0; inflight = 0;
      for (int cyc = 0; cyc < 20 * n && (rd_n < n || wr_n < n); cyc++) begin
        level = 3'(lvl);
        res_valid = (wr_n < rd_n) && $urandom_range(0, 2) == 0;
        res_line = {$urandom, $urandom};
        #1;
        check("data_ready", data_ready, inflight);
        if (res_valid) begin
          check("write en", ram_en && ram_we, 1);
          check("write addr", ram_addr, 9'(dst_base + wr_n));
          check("write data", ram_wdata == res_line, 1);
          wr_n++;
        end else if (ram_en) begin
          check("read only", ram_we, 0);
          check("read addr", ram_addr, 9'(src_base + rd_n));
          check("room", lvl + inflight < 4, 1);
          rd_n++;
        end
        // model: a line lands in the buffer when data_ready; the consumer
        // drains it at random
        if (data_ready) lvl++;
        inflight = ram_en && !ram_we;
        if (lvl > 0 && $urandom_range(0, 3) == 0) lvl--;
        @(negedge clk);
      end
      check("all read", rd_n, n);
      check("all written", wr_n, n);
      res_valid = 1'b0;
      @(negedge clk);
      check("not busy", busy, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
