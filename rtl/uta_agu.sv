// uta_agu: address generation unit of the transform core.
//
// Moves a job's input lines from the local RAM into the kernel's input buffer and
// writes the kernel's result lines back. Input lines are read in order from
// src_base, result lines written in order from dst_base, one RAM access per cycle
// on the engine's RAM port. A result line must be written in the cycle it
// appears, so writes take priority and a read is only issued in a free cycle and
// only if the input buffer can take the line when it arrives one cycle later
// (buffer level plus the line in flight below DEPTH). `data_ready` marks the
// cycle the read line is on the RAM's output (the DATA_READY of the document's
// core diagram). The document names this unit; its address sequence and flow
// control are this design's choices.
module uta_agu #(
  parameter int unsigned AW     = 9,
  parameter int unsigned LW     = 64,
  parameter int unsigned NL_W   = 10,    // width of the line counts
  parameter int unsigned DEPTH  = 4,
  parameter int unsigned LVL_W  = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,       // begin a job
  input  logic [AW-1:0]     src_base,
  input  logic [AW-1:0]     dst_base,
  input  logic [NL_W-1:0]   nlines,      // lines to read (= lines to write)
  input  logic [LVL_W-1:0]  level,       // input buffer occupancy
  input  logic              res_valid,   // a result line to write now
  input  logic [LW-1:0]     res_line,
  output logic              ram_en,
  output logic              ram_we,
  output logic [AW-1:0]     ram_addr,
  output logic [LW-1:0]     ram_wdata,
  output logic              data_ready,
  output logic              busy
);

  logic [AW-1:0]   rd_addr, wr_addr;
  logic [NL_W-1:0] rd_left, wr_left;
  logic            rd_go;

  assign rd_go = !res_valid && rd_left != '0 &&
                 (32'(level) + 32'(data_ready) < DEPTH);

  always_comb begin
    ram_en    = res_valid || rd_go;
    ram_we    = res_valid;
    ram_addr  = res_valid ? wr_addr : rd_addr;
    ram_wdata = res_line;
  end

  assign busy = (rd_left != '0) || (wr_left != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_addr    <= '0;
      wr_addr    <= '0;
      rd_left    <= '0;
      wr_left    <= '0;
      data_ready <= 1'b0;
    end else begin
      data_ready <= rd_go;
      if (start) begin
        rd_addr <= src_base;
        wr_addr <= dst_base;
        rd_left <= nlines;
        wr_left <= nlines;
      end else begin
        if (rd_go) begin
          rd_addr <= rd_addr + 1'b1;
          rd_left <= rd_left - 1'b1;
        end
        if (res_valid && wr_left != '0) begin
          wr_addr <= wr_addr + 1'b1;
          wr_left <= wr_left - 1'b1;
        end
      end
    end
  end

  a_write_expected: assert property (@(posedge clk) disable iff (rst)
                      res_valid |-> wr_left != '0);

endmodule
