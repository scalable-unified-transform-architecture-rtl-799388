// tb_uta_vde: self-checking test of the transposition switch's variable delay
// elements, in the 2x4 and 1x4 setups (2 and 1 PE rows) and the 4x4 setup.
//
// Each cycle the array outputs and their tokens are random. A first-pass value
// leaving array row r at the last column, with kernel row k = r + ROWS * sweep,
// is vector idx's coefficient k (vector 2+idx for the 2x2 pair); for the pair,
// column 1 also delivers vector idx's coefficient. The test keeps the latest such
// value for every (vector, coefficient) and checks that a column fed vector i of
// the second pass receives coefficient i of its own vector whenever the transform
// takes several sweeps, and the switch's multiplexer value otherwise. It also
// checks that nothing is stored while the enable is low and that the 4x4 setup
// always passes the multiplexer value through.
module tb_uta_vde;
  import uta_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic en;
  int checks = 0, failures = 0;
  int cyc = 0;

  // shared random column tokens and multiplexer values
  tok_t                tok_col [4];
  logic signed [31:0]  direct  [4];

  // 2 rows
  logic signed [31:0] acc2 [2][4];
  tok_t               tok2 [2][4];
  logic signed [31:0] fb2  [4];
  // 1 row
  logic signed [31:0] acc1 [1][4];
  tok_t               tok1 [1][4];
  logic signed [31:0] fb1  [4];
  // 4 rows
  logic signed [31:0] acc4 [4][4];
  tok_t               tok4 [4][4];
  logic signed [31:0] fb4  [4];

  uta_vde #(.ROWS(2)) d2 (.clk, .rst, .en, .acc_o(acc2), .tok_o(tok2), .tok_col,
                          .fb_direct(direct), .fb(fb2));
  uta_vde #(.ROWS(1)) d1 (.clk, .rst, .en, .acc_o(acc1), .tok_o(tok1), .tok_col,
                          .fb_direct(direct), .fb(fb1));
  uta_vde #(.ROWS(4)) d4 (.clk, .rst, .en, .acc_o(acc4), .tok_o(tok4), .tok_col,
                          .fb_direct(direct), .fb(fb4));

  // reference stores: [vector][coefficient]
  logic signed [31:0] m2 [4][4];
  logic signed [31:0] m1 [4][4];

  function automatic tok_t rnd_tok(int rows);
    tok_t t = TOK_IDLE;
    t.calc  = ($urandom_range(0, 3) != 0);
    t.pass  = 1'($urandom);
    t.ttype = ttype_e'($urandom_range(0, 3));
    t.idx   = 2'($urandom_range(0, (t.ttype == T_H2) ? 1 : 3));
    t.sweep = 2'($urandom_range(0, int'(sweeps(t.ttype, rows)) - 1));
    return t;
  endfunction

  // apply the storing rule of the architecture to a reference store
  task automatic store(int rows, ref logic signed [31:0] m [4][4],
                       input logic signed [31:0] a3 [4], input logic signed [31:0] a1 [4],
                       input tok_t t3 [4], input tok_t t1 [4]);
    for (int r = 0; r < rows; r++) begin
      if (t3[r].calc && !t3[r].pass) begin
        automatic int k = r + rows * int'(t3[r].sweep);
        automatic int v = (t3[r].ttype == T_H2) ? 2 + int'(t3[r].idx) : int'(t3[r].idx);
        m[v][k] = a3[r];
      end
      if (t1[r].calc && !t1[r].pass && t1[r].ttype == T_H2) begin
        automatic int k = r + rows * int'(t1[r].sweep);
        m[t1[r].idx][k] = a1[r];
      end
    end
  endtask

  task automatic check(string name, int rows, logic signed [31:0] got [4],
                       logic signed [31:0] m [4][4]);
    for (int c = 0; c < 4; c++) begin
      automatic logic signed [31:0] e;
      if (sweeps(tok_col[c].ttype, rows) > 1) e = m[c][tok_col[c].idx];
      else                                    e = direct[c];
      checks++;
      if (got[c] !== e) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s cyc %0d col %0d type %0d idx %0d got %0d exp %0d", name, cyc, c,
                   tok_col[c].ttype, tok_col[c].idx, got[c], e);
      end
    end
  endtask

  initial begin
    rst = 1'b1; en = 1'b1;
    for (int i = 0; i < 4; i++) for (int k = 0; k < 4; k++) begin
      m2[i][k] = '0; m1[i][k] = '0;
    end
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
      acc4[r][c] = '0; tok4[r][c] = TOK_IDLE;
      if (r < 2) begin acc2[r][c] = '0; tok2[r][c] = TOK_IDLE; end
      if (r < 1) begin acc1[r][c] = '0; tok1[r][c] = TOK_IDLE; end
    end
    for (int c = 0; c < 4; c++) begin tok_col[c] = TOK_IDLE; direct[c] = '0; end
    #1 clk = 1'b1; #1 clk = 1'b0;
    rst = 1'b0;

    for (cyc = 0; cyc < 3000; cyc++) begin
      automatic logic signed [31:0] a3 [4], a1 [4];
      automatic tok_t t3 [4], t1 [4];
      // new random inputs
      en = ($urandom_range(0, 9) != 0);
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        acc4[r][c] = int'($urandom);
        tok4[r][c] = rnd_tok(4);
      end
      for (int r = 0; r < 2; r++) for (int c = 0; c < 4; c++) begin
        acc2[r][c] = int'($urandom);
        tok2[r][c] = rnd_tok(2);
      end
      for (int c = 0; c < 4; c++) begin
        acc1[0][c] = int'($urandom);
        tok1[0][c] = rnd_tok(1);
        tok_col[c] = rnd_tok(1);
        tok_col[c].pass = 1'b1;
        direct[c] = int'($urandom);
      end
      #1;
      // read side: the stores hold everything written up to the last edge
      check("2 rows", 2, fb2, m2);
      check("1 row", 1, fb1, m1);
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (fb4[c] !== direct[c]) begin
          failures++;
          if (failures < 10) $display("FAIL 4 rows col %0d not bypassed", c);
        end
      end
      // write side, at the clock edge
      if (en) begin
        for (int r = 0; r < 2; r++) begin
          a3[r] = acc2[r][3]; a1[r] = acc2[r][1]; t3[r] = tok2[r][3]; t1[r] = tok2[r][1];
        end
        store(2, m2, a3, a1, t3, t1);
        a3[0] = acc1[0][3]; a1[0] = acc1[0][1]; t3[0] = tok1[0][3]; t1[0] = tok1[0][1];
        store(1, m1, a3, a1, t3, t1);
      end
      clk = 1'b1; #1 clk = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
