// tb_uta_transpose_switch: random array outputs and column tokens; checks that
// each column is fed row idx of the array's last column, except columns 0 and 1
// during the 2x2 Hadamard, which take row idx[0] of column 1. In the 4x4 setup
// every transform takes one sweep, so the delay elements must stay bypassed; a
// second instance with two PE rows checks the bypassed path of the 2x2 pair
// (one sweep there too). The held path is tested in tb_uta_vde.
module tb_uta_transpose_switch;
  import uta_pkg::*;

  logic signed [31:0] acc_o [4][4];
  tok_t tok_col [4];
  tok_t tok_o [4][4];
  logic signed [31:0] fb [4];
  logic signed [31:0] acc2 [2][4];
  tok_t tok2 [2][4];
  logic signed [31:0] fb2 [4];
  logic clk = 1'b0, rst = 1'b0, en = 1'b1;
  int checks = 0, failures = 0;

  uta_transpose_switch dut (.clk, .rst, .en, .acc_o, .tok_o, .tok_col, .fb);
  uta_transpose_switch #(.ROWS(2)) dut2 (.clk, .rst, .en, .acc_o(acc2), .tok_o(tok2),
                                         .tok_col, .fb(fb2));

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        acc_o[r][c] = int'($urandom);
        tok_o[r][c] = tok_t'($urandom);
        if (r < 2) begin
          acc2[r][c] = acc_o[r][c];
          tok2[r][c] = tok_o[r][c];
        end
      end
      for (int c = 0; c < 4; c++) begin
        tok_col[c] = TOK_IDLE;
        tok_col[c].calc  = 1'b1;
        tok_col[c].pass  = 1'b1;
        tok_col[c].ttype = ttype_e'($urandom_range(0, 3));
        tok_col[c].idx   = 2'($urandom_range(0, 3));
        if (tok_col[c].ttype == T_H2) tok_col[c].idx[1] = 1'b0;  // a pair has two vectors
      end
      #1;
      for (int c = 0; c < 4; c++) begin
        automatic int row = tok_col[c].idx;
        automatic logic signed [31:0] e;
        if (tok_col[c].ttype == T_H2 && c < 2) e = acc_o[row % 2][1];
        else e = acc_o[row][3];
        checks++;
        if (fb[c] != e) begin
          failures++;
          if (failures < 10) $display("FAIL col %0d", c);
        end
        if (tok_col[c].ttype == T_H2) begin
          checks++;
          if (fb2[c] != e) begin
            failures++;
            if (failures < 10) $display("FAIL 2-row col %0d", c);
          end
        end
      end
      // clock the delay elements with random tokens; the 4-row switch ignores them
      clk = 1'b1; #1; clk = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
