// uta_ctrl_regs: user programming interface (control unit) of the transform core.
//
// A block of memory-mapped 32-bit registers at the offsets the document gives:
//   0x00 Core Status       (read)  [0] BUSY  [1] DONE (sticky, cleared by START)
//   0x04 Set Control       (write) control |= data
//   0x08 Clear Control     (write) control &= ~data
//   0x0C Control Status    (read)  the control register
//   0x10 Core Configuration(r/w)   [1:0] array setup, [3:2] TYPE_T,
//                                  [10:4] blocks-1, [19:11] source line,
//                                  [28:20] destination line
//   0x14 Clock Configuration (r/w) word for the local clock generator
//   0x18 Debug (read; reserved to the user) result lines written since reset
// Control bits: [0] EN (global enable of the transform engine), [1] START (starts
// a job; cleared by the core when the job is accepted, which needs EN set and
// the engine idle), [2] SRST (one-cycle soft reset of the engine; clears itself).
//
// The register offsets and roles follow the document; the bit assignments, the
// field layout of the configuration register and the self-clearing bits are this
// design's choices. The bus is a plain single-cycle register port (write strobe,
// word address, combinational read data); a processor-bus slave adapter would
// drive it. The array setup (4x4, 2x4 or 1x4 PEs) is chosen when the core is
// built, so the setup field is stored and read back but does not change the
// engine.
module uta_ctrl_regs
  import uta_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // register port
  input  logic        wr,
  input  logic [4:0]  addr,        // byte offset inside the register block
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  // engine side
  input  logic        busy,
  input  logic        done,
  input  logic        line_wr,     // a result line was written
  output logic        core_en,
  output logic        start,
  output logic        soft_rst,
  output logic [1:0]  setup,
  output ttype_e      ttype,
  output logic [7:0]  nblk,
  output logic [8:0]  src_base,
  output logic [8:0]  dst_base,
  output logic [31:0] clk_cfg
);

  localparam logic [4:0] A_STATUS = 5'h00, A_SET = 5'h04, A_CLEAR = 5'h08,
                         A_CTRL = 5'h0C, A_CONFIG = 5'h10, A_CLOCK = 5'h14,
                         A_DEBUG = 5'h18;

  logic [2:0]  ctrl;
  logic [2:0]  ctrl_nxt;
  logic [31:0] config_q;
  logic        done_q;
  logic [31:0] dbg_lines;

  assign core_en  = ctrl[0];
  assign start    = ctrl[1] && ctrl[0] && !busy && !ctrl[2];
  assign soft_rst = ctrl[2];
  assign setup    = config_q[1:0];
  assign ttype    = ttype_e'(config_q[3:2]);
  assign nblk     = {1'b0, config_q[10:4]} + 8'd1;
  assign src_base = config_q[19:11];
  assign dst_base = config_q[28:20];

  // START leaves once accepted and SRST after one cycle; a set/clear write in
  // the same cycle acts on top of that, so it can neither revive an accepted
  // START nor stretch the soft reset
  always_comb begin
    ctrl_nxt = ctrl;
    if (start) ctrl_nxt[1] = 1'b0;
    ctrl_nxt[2] = 1'b0;
    if (wr && addr == A_SET)   ctrl_nxt = ctrl_nxt | wdata[2:0];
    if (wr && addr == A_CLEAR) ctrl_nxt = ctrl_nxt & ~wdata[2:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl      <= '0;
      config_q  <= '0;
      clk_cfg   <= '0;
      done_q    <= 1'b0;
      dbg_lines <= '0;
    end else begin
      ctrl <= ctrl_nxt;
      if (done)     done_q  <= 1'b1;
      if (start)    done_q  <= 1'b0;
      if (line_wr)  dbg_lines <= dbg_lines + 1'b1;
      if (wr) begin
        unique case (addr)
          A_CONFIG: config_q <= wdata;
          A_CLOCK:  clk_cfg  <= wdata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (addr)
      A_STATUS: rdata = {30'd0, done_q, busy};
      A_CTRL:   rdata = {29'd0, ctrl};
      A_CONFIG: rdata = config_q;
      A_CLOCK:  rdata = clk_cfg;
      A_DEBUG:  rdata = dbg_lines;
      default:  rdata = '0;
    endcase
  end

endmodule
