// tb_uta_kernel_ctrl_run: test harness of the kernel control unit for one array
// setup (ROWS = 4, 2 or 1 PE rows); tb_uta_kernel_ctrl runs it for all three.
// It drives the unit with a modelled input-buffer level and result-line pulses
// and checks the token stream: one CLR token after start, then per block L
// first-pass vectors (idx 0..L-1, NEW_4x4T on the first) followed by L
// second-pass vectors, each vector repeated for sweeps 0..S-1 (S = 1 in the 4x4
// setup), never starting a block without L lines available, no tokens while EN
// is low, and a single done pulse once all result lines have been reported.
// `finished` rises when all jobs have run.
module tb_uta_kernel_ctrl_run #(
  parameter int unsigned ROWS = 4
);
  import uta_pkg::*;

  logic clk = 1'b0;
  logic rst, en, start, line_done, busy, done;
  ttype_e ttype;
  logic [7:0] nblk;
  logic [2:0] avail;
  tok_t tok;
  int checks = 0, failures = 0;
  bit finished = 1'b0;

  always #5 clk = ~clk;

  uta_kernel_ctrl #(.ROWS(ROWS)) dut (.clk, .rst, .en, .start, .ttype, .nblk, .avail, .line_done,
                       .tok, .busy, .done);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic run(ttype_e t, int nb);
    int lp = (t == T_H2) ? 2 : 4;
    int sw = int'(sweeps(t, ROWS));
    int lines = 0;           // lines in the modelled buffer (column 0)
    int to_feed = nb * lp;
    int blocks = 0, pos = 0; // position within the 2*L*S-token block sequence
    int results = 0, dones = 0, clr_seen = 0;
    int pending_res = 0;
    @(negedge clk);
    ttype = t; nblk = 8'(nb); start = 1'b1; en = 1'b1;  // start needs EN
    @(negedge clk);
    start = 1'b0;
    for (int cyc = 0; cyc < 60 * sw * nb + 40; cyc++) begin
      en = ($urandom_range(0, 7) != 0);
      avail = 3'(lines);
      line_done = en && pending_res > 0 && $urandom_range(0, 1) == 1;
      #1;
      if (en && tok.clr) clr_seen++;
      if (en && tok.calc) begin
        check("type", tok.ttype, t);
        check("pass", tok.pass, pos >= lp * sw);
        check("idx", tok.idx, (pos % (lp * sw)) / sw);
        check("sweep", tok.sweep, pos % sw);
        check("new", tok.new4x4, pos == 0);
        check("clr before data", clr_seen, 1);
        if (pos == 0) check("lines ready", lines >= lp, 1);
        // a line leaves the buffer with its last first-pass sweep
        if (pos < lp * sw && pos % sw == sw - 1) lines--;
        pos++;
        if (pos == 2 * lp * sw) begin
          pos = 0; blocks++; pending_res += lp;
        end
      end
      if (line_done) begin pending_res--; results++; end
      @(posedge clk);
      #1;
      if (done) dones++;
      // feed lines at random
      if (to_feed > 0 && lines < 4 && $urandom_range(0, 2) == 0) begin
        lines++; to_feed--;
      end
      @(negedge clk);
    end
    check("blocks issued", blocks, nb);
    check("results", results, nb * lp);
    check("one done", dones, 1);
    check("idle", busy, 0);
  endtask

  initial begin
    rst = 1'b1; en = 1'b1; start = 1'b0; line_done = 1'b0; avail = '0;
    ttype = T_FDCT; nblk = '0;
    @(negedge clk); rst = 1'b0;
    run(T_FDCT, 5);
    run(T_H2, 6);
    run(T_IDCT, 3);
    run(T_H4, 2);
    finished = 1'b1;
  end
endmodule
