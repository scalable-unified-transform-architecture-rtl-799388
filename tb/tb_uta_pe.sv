// tb_uta_pe: checks one processing element against an independent table of the
// four transform kernels (entries stored as twice the coefficient, so +-1/2 is
// +-1): acc_out = acc_in + coef * x_in for every type and coordinate, the clear
// of acc_in in column 2 for the 2x2 Hadamard, idle rows 2-3 for the 2x2
// Hadamard, CLR, the hold with EN low, and the token and data passed on.
// Two more instances, built for the 2x4 and 1x4 setups (2 and 1 PE rows), get
// tokens with a sweep number and must use kernel row COORD_Y + ROWS * sweep.
module tb_uta_pe;
  import uta_pkg::*;

  logic clk = 1'b0;
  logic rst, en;
  logic [1:0] cx, cy;
  logic signed [31:0] x_in, acc_in, x_out, acc_out;
  tok_t tok_l, tok_u, tok_r, tok_d;
  int checks = 0, failures = 0;
  // reduced-setup instances: 2 rows (row cy2) and 1 row (row 0)
  logic [1:0] cy2;
  tok_t tok_l2, tok_l1;
  logic signed [31:0] x_out2, acc_out2, x_out1, acc_out1;
  tok_t tok_r2, tok_d2, tok_r1, tok_d1;

  always #5 clk = ~clk;

  uta_pe dut (.clk, .rst, .en, .coord_x(cx), .coord_y(cy), .x_in, .acc_in,
              .tok_l, .tok_u, .x_out, .acc_out, .tok_r, .tok_d);
  uta_pe #(.ROWS(2)) dut2 (.clk, .rst, .en, .coord_x(cx), .coord_y(cy2), .x_in, .acc_in,
                           .tok_l(tok_l2), .tok_u(TOK_IDLE), .x_out(x_out2), .acc_out(acc_out2),
                           .tok_r(tok_r2), .tok_d(tok_d2));
  uta_pe #(.ROWS(1)) dut1 (.clk, .rst, .en, .coord_x(cx), .coord_y(2'd0), .x_in, .acc_in,
                           .tok_l(tok_l1), .tok_u(TOK_IDLE), .x_out(x_out1), .acc_out(acc_out1),
                           .tok_r(tok_r1), .tok_d(tok_d1));

  // twice the kernel coefficients, [type][row][col]
  int k2 [4][4][4] = '{
    '{'{2,2,2,2},  '{4,2,-2,-4},  '{2,-2,-2,2}, '{2,-4,4,-2}},   // forward DCT
    '{'{2,2,2,1},  '{2,1,-2,-2},  '{2,-1,-2,2}, '{2,-2,2,-1}},   // inverse DCT
    '{'{2,2,2,2},  '{2,2,-2,-2},  '{2,-2,-2,2}, '{2,-2,2,-2}},   // 4x4 Hadamard
    '{'{2,2,2,2},  '{2,-2,2,-2},  '{0,0,0,0},   '{0,0,0,0}}      // 2x2 Hadamard pair
  };

  function automatic int prod(int k, int x);
    if (k == 1)  return x >>> 1;
    if (k == -1) return -(x >>> 1);
    return (k / 2) * x;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    tok_t t;
    int xa, aa, expv, holdv;
    rst = 1'b1; en = 1'b1; cx = 0; cy = 0; x_in = 0; acc_in = 0;
    tok_l = TOK_IDLE; tok_u = TOK_IDLE; tok_l2 = TOK_IDLE; tok_l1 = TOK_IDLE; cy2 = 0;
    @(negedge clk); rst = 1'b0;

    for (int n = 0; n < 600; n++) begin
      automatic int ty = n % 4;
      automatic bit from_left = $urandom_range(0, 1);
      @(negedge clk);
      cx = 2'($urandom_range(0, 3));
      cy = 2'($urandom_range(0, 3));
      xa = int'($urandom_range(0, 20000)) - 10000;
      aa = int'($urandom_range(0, 200000)) - 100000;
      x_in = xa; acc_in = aa;
      t = TOK_IDLE;
      t.calc = 1'b1; t.ttype = ttype_e'(ty);
      t.pass = 1'($urandom_range(0, 1)); t.idx = 2'($urandom_range(0, 3));
      tok_l = from_left ? t : TOK_IDLE;
      tok_u = from_left ? TOK_IDLE : t;
      holdv = acc_out;
      // reduced setups: same data, a random sweep of this transform
      cy2 = 2'($urandom_range(0, 1));
      tok_l2 = t; tok_l2.sweep = 2'($urandom_range(0, int'(sweeps(ttype_e'(ty), 2)) - 1));
      tok_l1 = t; tok_l1.sweep = 2'($urandom_range(0, int'(sweeps(ttype_e'(ty), 1)) - 1));
      @(posedge clk); #1;
      begin
        automatic int kr2 = int'(cy2) + 2 * int'(tok_l2.sweep);
        automatic int kr1 = int'(tok_l1.sweep);
        automatic int a0 = (ty == 3 && cx == 2) ? 0 : aa;
        check("2-row acc", acc_out2, a0 + prod(k2[ty][kr2][cx], xa));
        check("1-row acc", acc_out1, a0 + prod(k2[ty][kr1][cx], xa));
        check("2-row sweep passed", tok_d2.sweep, tok_l2.sweep);
        check("1-row sweep passed", tok_r1.sweep, tok_l1.sweep);
      end
      if (ty == 3 && cy >= 2) begin
        check("idle row acc", acc_out, holdv);
        check("idle row calc", tok_r.calc, 0);
      end else begin
        expv = ((ty == 3 && cx == 2) ? 0 : aa) + prod(k2[ty][cy][cx], xa);
        check("acc", acc_out, expv);
        check("x pass", x_out, xa);
        check("calc", tok_r.calc, 1);
      end
      check("type right", tok_r.ttype, ty);
      check("type down", tok_d.ttype, ty);
      check("idx", tok_d.idx, t.idx);
    end

    // EN low holds everything
    @(negedge clk);
    holdv = acc_out; en = 1'b0; x_in = 77; acc_in = 5;
    tok_l = TOK_IDLE; tok_l.calc = 1'b1;
    @(posedge clk); #1;
    check("hold acc", acc_out, holdv);
    // CLR clears
    @(negedge clk);
    en = 1'b1; tok_l = TOK_IDLE; tok_l.clr = 1'b1;
    @(posedge clk); #1;
    check("clr", acc_out, 0);
    check("clr passes on", tok_r.clr, 1);

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
