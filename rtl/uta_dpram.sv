// uta_dpram: the transform core's local data memory, a true dual-port RAM.
//
// 4 kB organised as 512 lines of 64 bits (four 16-bit residues or coefficients
// per line), as the document specifies, so that two macroblocks can be held at
// once and transfers can overlap computation (double buffering). Port A faces the
// processor's local memory bus and has byte write enables; port B belongs to the
// transform engine and writes whole lines. Both ports read synchronously with one
// cycle of latency and return the old contents on a same-cycle write
// (read-first). If both ports write the same line in one cycle, port B's bytes
// win. Byte enables, read-first behaviour and the collision rule are this
// design's choices.
module uta_dpram #(
  parameter int unsigned LINES = 512,
  parameter int unsigned LW    = 64,
  parameter int unsigned AW    = $clog2(LINES)
) (
  input  logic              clk,
  // port A (system bus side)
  input  logic              a_en,
  input  logic [LW/8-1:0]   a_we,
  input  logic [AW-1:0]     a_addr,
  input  logic [LW-1:0]     a_wdata,
  output logic [LW-1:0]     a_rdata,
  // port B (transform engine side)
  input  logic              b_en,
  input  logic              b_we,
  input  logic [AW-1:0]     b_addr,
  input  logic [LW-1:0]     b_wdata,
  output logic [LW-1:0]     b_rdata
);

  logic [LW-1:0] mem [LINES];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      for (int b = 0; b < LW / 8; b++) begin
        if (a_we[b]) mem[a_addr][8*b +: 8] <= a_wdata[8*b +: 8];
      end
    end
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end
  end

endmodule
