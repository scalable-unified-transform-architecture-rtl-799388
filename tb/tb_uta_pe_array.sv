// tb_uta_pe_array: sends streams of vectors through the 4x4 array in the skewed
// wavefront order (element c enters column c one cycle after element c-1) and
// checks that row r's right-end register holds sum_c A[r][c] * v[c] exactly
// r + 4 cycles after the vector's first element entered, for every transform
// type, with a new vector entering every cycle. A is the textbook kernel.
module tb_uta_pe_array;
  import uta_pkg::*;

  logic clk = 1'b0;
  logic rst, en;
  tok_t tok_in;
  logic signed [31:0] x_top [4];
  logic signed [31:0] acc_o [4][4];
  tok_t tok_o [4][4];
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;

  uta_pe_array dut (.clk, .rst, .en, .tok_in, .x_top, .acc_o, .tok_o);

  int k2 [4][4][4] = '{
    '{'{2,2,2,2},  '{4,2,-2,-4},  '{2,-2,-2,2}, '{2,-4,4,-2}},
    '{'{2,2,2,1},  '{2,1,-2,-2},  '{2,-1,-2,2}, '{2,-2,2,-1}},
    '{'{2,2,2,2},  '{2,2,-2,-2},  '{2,-2,-2,2}, '{2,-2,2,-2}},
    '{'{2,2,2,2},  '{2,-2,2,-2},  '{0,0,0,0},   '{0,0,0,0}}
  };

  function automatic int prod(int k, int x);
    if (k == 1)  return x >>> 1;
    if (k == -1) return -(x >>> 1);
    return (k / 2) * x;
  endfunction

  localparam int NV = 200;
  int vec [NV][4];
  int typ [NV];

  // drive: vector n's element c at cycle n + c
  always @(negedge clk) begin
    if (!rst) begin
      tok_in = TOK_IDLE;
      if (cyc < NV) begin
        tok_in.calc = 1'b1;
        tok_in.ttype = ttype_e'(typ[cyc]);
      end
      for (int c = 0; c < 4; c++) begin
        automatic int n = cyc - c;
        x_top[c] = (n >= 0 && n < NV) ? vec[n][c] : 0;
      end
    end
  end

  // check: after the edge ending cycle n + r + 3, row r holds vector n's result
  always @(posedge clk) begin
    if (!rst) begin
      #1;
      for (int r = 0; r < 4; r++) begin
        automatic int n = cyc - r - 3;
        if (n >= 0 && n < NV && !(typ[n] == 3 && r >= 2)) begin
          automatic int e;
          if (typ[n] == 3) begin
            // the right 2x2 sum ends in column 3
            e = prod(k2[3][r][2], vec[n][2]) + prod(k2[3][r][3], vec[n][3]);
          end else begin
            e = 0;
            for (int c = 0; c < 4; c++) e += prod(k2[typ[n]][r][c], vec[n][c]);
          end
          checks++;
          if (acc_o[r][3] != e) begin
            failures++;
            if (failures < 10) $display("FAIL vec %0d row %0d got %0d exp %0d", n, r, acc_o[r][3], e);
          end
        end
      end
      // the left 2x2 sum ends in column 1, two cycles earlier
      for (int r = 0; r < 2; r++) begin
        automatic int n1 = cyc - r - 1;
        if (n1 >= 0 && n1 < NV && typ[n1] == 3) begin
          checks++;
          if (acc_o[r][1] != prod(k2[3][r][0], vec[n1][0]) + prod(k2[3][r][1], vec[n1][1])) begin
            failures++;
            if (failures < 10) $display("FAIL left 2x2 vec %0d row %0d", n1, r);
          end
        end
      end
      cyc++;
    end
  end

  initial begin
    for (int n = 0; n < NV; n++) begin
      typ[n] = int'($urandom_range(0, 3));
      for (int c = 0; c < 4; c++) vec[n][c] = int'($urandom_range(0, 60000)) - 30000;
    end
    rst = 1'b1; en = 1'b1; tok_in = TOK_IDLE;
    for (int c = 0; c < 4; c++) x_top[c] = 0;
    @(posedge clk); #2 rst = 1'b0;
    wait (cyc == NV + 10);
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
