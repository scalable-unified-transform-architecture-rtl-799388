// uta_ip_core: the transform coding accelerator as a processor peripheral.
//
// Wraps the unified transform kernel with what a processor needs to use it: a
// 4 kB dual-port local RAM that the processor fills with residue (or coefficient)
// lines and reads results from, an address generation unit that streams a job's
// lines from that RAM into the kernel and writes the result lines back, and a
// register block through which software configures the job (transform type,
// number of blocks, source and destination lines), starts it and polls for its
// end.
//
// Interface:
//   reg_*  : register port of uta_ctrl_regs (offsets 0x00..0x18)
//   mem_*  : the RAM's system-side port: 512 lines of 64 bits, byte write
//            enables, one cycle read latency
//   clk_cfg: the clock configuration register, for an external clock generator
// Data format: a 4x4 block is 4 consecutive lines (row r in line r, element c in
// bits [16c +: 16]); a 2x2 Hadamard job takes pairs of 2x2 blocks, two lines per
// pair, left block in elements 0-1 and right block in elements 2-3. Results use
// the same layout.
//
// The document's core also has a programmable local clock generator so that the
// engine can run faster than the processor. It is not built: everything here runs
// on one clock, and the clock configuration word is brought out as clk_cfg.
// Likewise the processor bus protocols are left to adapters outside this module.
//
// ROWS selects the array setup when the core is built: 4 (4x4 PEs, the default),
// 2 (2x4) or 1 (1x4). Fewer rows take 2 or 4 times as many cycles per block; the
// software view is the same. The configuration register's setup field is only
// stored and read back.
module uta_ip_core
  import uta_pkg::*;
#(
  parameter int unsigned ROWS = 4
) (
  input  logic        clk,
  input  logic        rst,
  // register port
  input  logic        reg_wr,
  input  logic [4:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  // local RAM, system side
  input  logic        mem_en,
  input  logic [7:0]  mem_we,
  input  logic [8:0]  mem_addr,
  input  logic [63:0] mem_wdata,
  output logic [63:0] mem_rdata,
  // to the clock generator
  output logic [31:0] clk_cfg
);

  logic        core_en, start, soft_rst, eng_rst;
  logic [1:0]  setup;
  ttype_e      ttype;
  logic [7:0]  nblk;
  logic [8:0]  src_base, dst_base;
  logic        k_busy, k_done, k_issue, a_busy;
  logic [2:0]  level;
  logic        res_valid;
  logic [63:0] res_line;
  logic        ram_en, ram_we, data_ready;
  logic [8:0]  ram_addr;
  logic [63:0] ram_wdata, ram_rdata;
  logic [9:0]  nlines;
  logic [1:0]  setup_unused;

  assign eng_rst      = rst || soft_rst;
  assign nlines       = (ttype == T_H2) ? {1'b0, nblk, 1'b0} : {nblk, 2'b00};
  assign setup_unused = setup;

  uta_ctrl_regs u_regs (
    .clk     (clk),
    .rst     (rst),
    .wr      (reg_wr),
    .addr    (reg_addr),
    .wdata   (reg_wdata),
    .rdata   (reg_rdata),
    .busy    (k_busy || a_busy),
    .done    (k_done),
    .line_wr (res_valid),
    .core_en (core_en),
    .start   (start),
    .soft_rst(soft_rst),
    .setup   (setup),
    .ttype   (ttype),
    .nblk    (nblk),
    .src_base(src_base),
    .dst_base(dst_base),
    .clk_cfg (clk_cfg)
  );

  uta_agu #(.AW(9), .LW(64), .NL_W(10), .DEPTH(4)) u_agu (
    .clk       (clk),
    .rst       (eng_rst),
    .start     (start),
    .src_base  (src_base),
    .dst_base  (dst_base),
    .nlines    (nlines),
    .level     (level),
    .res_valid (res_valid),
    .res_line  (res_line),
    .ram_en    (ram_en),
    .ram_we    (ram_we),
    .ram_addr  (ram_addr),
    .ram_wdata (ram_wdata),
    .data_ready(data_ready),
    .busy      (a_busy)
  );

  uta_dpram #(.LINES(512), .LW(64)) u_ram (
    .clk    (clk),
    .a_en   (mem_en),
    .a_we   (mem_we),
    .a_addr (mem_addr),
    .a_wdata(mem_wdata),
    .a_rdata(mem_rdata),
    .b_en   (ram_en),
    .b_we   (ram_we),
    .b_addr (ram_addr),
    .b_wdata(ram_wdata),
    .b_rdata(ram_rdata)
  );

  uta_kernel #(.ROWS(ROWS), .DEPTH(4), .NBLK_W(8)) u_kernel (
    .clk      (clk),
    .rst      (eng_rst),
    .en       (core_en),
    .push     (data_ready),
    .line_in  (ram_rdata),
    .level    (level),
    .start    (start),
    .ttype    (ttype),
    .nblk     (nblk),
    .res_valid(res_valid),
    .res_line (res_line),
    .busy     (k_busy),
    .done     (k_done),
    .issue    (k_issue)
  );

endmodule
