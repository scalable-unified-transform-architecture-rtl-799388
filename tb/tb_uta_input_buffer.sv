// tb_uta_input_buffer: loads random lines and empties the columns with first-pass
// tokens in the skewed order (column c one cycle after column c-1), with random
// gaps. Checks that every column presents its elements in load order, sign-
// extended, that the occupancy counts follow pushes and pops, that second-pass
// tokens select the feedback input without popping, and that EN low stops pops.
// A second instance, built for the 1x4 setup (one PE row), gets tokens of random
// type and sweep; it must present the head element for every sweep and release
// it only with the last sweep (sweep 3 for the 4x4 transforms, 1 for the 2x2
// pair).
module tb_uta_input_buffer;
  import uta_pkg::*;

  logic clk = 1'b0;
  logic rst, en, push;
  logic [63:0] line_in;
  tok_t tok_col [4];
  logic signed [31:0] fb [4];
  logic signed [31:0] x_top [4];
  logic [2:0] count [4];
  int checks = 0, failures = 0;
  bit done0 = 1'b0, done1 = 1'b0;
  // 1x4 instance
  logic en1, push1;
  logic [63:0] line1;
  tok_t tok1 [4];
  logic signed [31:0] fb1 [4];
  logic signed [31:0] x1 [4];
  logic [2:0] count1 [4];

  always #5 clk = ~clk;

  uta_input_buffer dut (.clk, .rst, .en, .push, .line_in, .tok_col, .fb, .x_top, .count);
  uta_input_buffer #(.ROWS(1)) dut1 (.clk, .rst, .en(en1), .push(push1), .line_in(line1),
                                     .tok_col(tok1), .fb(fb1), .x_top(x1), .count(count1));

  logic [15:0] q [4][$];   // expected contents per column

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    logic [63:0] l;
    rst = 1'b1; en = 1'b1; push = 1'b0; line_in = '0;
    for (int c = 0; c < 4; c++) begin tok_col[c] = TOK_IDLE; fb[c] = 0; end
    @(negedge clk); rst = 1'b0;
    // pattern: each cycle, maybe push a line (if column 3 has room) and maybe
    // launch a first-pass or second-pass vector into column 0; columns 1..3
    // repeat column 0's token 1..3 cycles later
    for (int cyc = 0; cyc < 400; cyc++) begin
      automatic tok_t t0 = TOK_IDLE;
      automatic tok_t prev [4];
      for (int c = 0; c < 4; c++) prev[c] = tok_col[c];
      en = ($urandom_range(0, 9) != 0);
      // shift the token chain (only when en, like the array)
      if (en) begin
        if ($urandom_range(0, 2) != 0) begin
          t0.calc = 1'b1;
          // first pass only if column 0 has an element not yet claimed
          t0.pass = !(q[0].size() > 0 && $urandom_range(0, 3) != 0);
        end
        tok_col[0] = t0;
        for (int c = 1; c < 4; c++) tok_col[c] = prev[c-1];
      end
      for (int c = 0; c < 4; c++) fb[c] = int'($urandom) ;
      push = (count[3] < 3'd4) && ($urandom_range(0, 1) == 1);
      if (push) begin
        l = {$urandom, $urandom};
        line_in = l;
      end
      #1;
      // combinational output checks for this cycle
      for (int c = 0; c < 4; c++) begin
        if (tok_col[c].calc && tok_col[c].pass)
          check($sformatf("fb col %0d", c), x_top[c], fb[c]);
        else if (tok_col[c].calc && q[c].size() > 0)
          check($sformatf("data col %0d", c), x_top[c], longint'($signed(q[c][0])));
      end
      @(posedge clk);
      // model update
      for (int c = 0; c < 4; c++) begin
        if (en && tok_col[c].calc && !tok_col[c].pass && q[c].size() > 0) void'(q[c].pop_front());
        if (push) q[c].push_back(l[16*c +: 16]);
      end
      #1;
      for (int c = 0; c < 4; c++) check($sformatf("count col %0d", c), count[c], q[c].size());
      @(negedge clk);
    end
    // idle until the other instance has finished
    for (int c = 0; c < 4; c++) tok_col[c] = TOK_IDLE;
    push = 1'b0;
    done0 = 1'b1;
  end

  logic [15:0] q1 [4][$];  // expected contents per column, 1x4 instance

  initial begin
    logic [63:0] l;
    en1 = 1'b1; push1 = 1'b0; line1 = '0;
    for (int c = 0; c < 4; c++) begin tok1[c] = TOK_IDLE; fb1[c] = 0; end
    @(negedge clk);
    @(negedge clk);
    for (int cyc = 0; cyc < 600; cyc++) begin
      automatic tok_t t0 = TOK_IDLE;
      automatic tok_t prev [4];
      for (int c = 0; c < 4; c++) prev[c] = tok1[c];
      en1 = ($urandom_range(0, 9) != 0);
      if (en1) begin
        if ($urandom_range(0, 3) != 0) begin
          t0.calc  = 1'b1;
          t0.ttype = ttype_e'($urandom_range(0, 3));
          t0.sweep = 2'($urandom_range(0, int'(sweeps(t0.ttype, 1)) - 1));
          t0.pass  = !(q1[0].size() > 0 && $urandom_range(0, 3) != 0);
        end
        tok1[0] = t0;
        for (int c = 1; c < 4; c++) tok1[c] = prev[c-1];
      end
      for (int c = 0; c < 4; c++) fb1[c] = int'($urandom);
      push1 = (count1[3] < 3'd4) && ($urandom_range(0, 2) == 0);
      if (push1) begin
        l = {$urandom, $urandom};
        line1 = l;
      end
      #1;
      for (int c = 0; c < 4; c++) begin
        if (tok1[c].calc && tok1[c].pass)
          check($sformatf("1x4 fb col %0d", c), x1[c], fb1[c]);
        else if (tok1[c].calc && q1[c].size() > 0)
          check($sformatf("1x4 data col %0d", c), x1[c], longint'($signed(q1[c][0])));
      end
      @(posedge clk);
      for (int c = 0; c < 4; c++) begin
        if (en1 && tok1[c].calc && !tok1[c].pass && q1[c].size() > 0 &&
            3'(tok1[c].sweep) == sweeps(tok1[c].ttype, 1) - 3'd1)
          void'(q1[c].pop_front());
        if (push1) q1[c].push_back(l[16*c +: 16]);
      end
      #1;
      for (int c = 0; c < 4; c++) check($sformatf("1x4 count col %0d", c), count1[c], q1[c].size());
      @(negedge clk);
    end
    for (int c = 0; c < 4; c++) tok1[c] = TOK_IDLE;
    push1 = 1'b0;
    done1 = 1'b1;
  end

  initial begin
    wait (done0 && done1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
