// tb_uta_dpram: random reads and writes on both ports of the local RAM against a
// model memory: one-cycle read latency, old data on a same-cycle read and write
// (read-first), per-byte writes on the system port, and writes from either port
// visible to the other.
module tb_uta_dpram;
  logic clk = 1'b0;
  logic a_en, b_en, b_we;
  logic [7:0] a_we;
  logic [8:0] a_addr, b_addr;
  logic [63:0] a_wdata, b_wdata, a_rdata, b_rdata;
  int checks = 0, failures = 0;
  logic [63:0] model [512];

  always #5 clk = ~clk;

  uta_dpram dut (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
                 .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  initial begin
    logic [63:0] ea, eb;
    logic ra, rb;
    a_en = 0; b_en = 0; a_we = 0; b_we = 0;
    a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // initialise through port B
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      b_en = 1; b_we = 1; b_addr = 9'(i); b_wdata = {$urandom, $urandom};
      model[i] = b_wdata;
    end
    @(negedge clk);
    b_en = 0; b_we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      a_en = $urandom_range(0, 1); b_en = $urandom_range(0, 1);
      a_addr = 9'($urandom_range(0, 15)); b_addr = 9'($urandom_range(0, 15));
      a_we = (a_en && $urandom_range(0, 1)) ? 8'($urandom) : 8'h00;
      b_we = b_en && $urandom_range(0, 1);
      if (a_en && b_en && a_addr == b_addr && a_we != 0 && b_we) b_we = 0;
      a_wdata = {$urandom, $urandom}; b_wdata = {$urandom, $urandom};
      ra = a_en; rb = b_en;
      ea = model[a_addr]; eb = model[b_addr];
      if (a_en) for (int b = 0; b < 8; b++) if (a_we[b]) model[a_addr][8*b +: 8] = a_wdata[8*b +: 8];
      if (b_en && b_we) model[b_addr] = b_wdata;
      @(posedge clk); #1;
      if (ra) begin checks++; if (a_rdata != ea) failures++; end
      if (rb) begin checks++; if (b_rdata != eb) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
