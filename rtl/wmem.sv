// wmem: per-VAC weight memory (the "core weight" SRAM).
// Weights stay stationary: they are written once through the unified address
// space at initialisation and then read one 128-bit word (16 INT8 weights) per
// cycle by the MAC. Synchronous read with read enable: rdata holds its value
// while re is low, which lets a stalled pipeline keep its operand.
// The 16 KiB default (1024 words) is this design's split of the 4 MB of
// on-chip SRAM over 128 VACs (16 KiB weights + 16 KiB KV cache each).
module wmem
  import rdxe_pkg::*;
#(
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [ACT_W-1:0]         wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [ACT_W-1:0]         rdata
);
  logic [ACT_W-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
