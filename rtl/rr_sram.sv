// rr_sram: row-reuse SRAM of a tile.
// Holds the tile's recent outputs (query slice, attention scores, head
// output, FFN hidden slice) so that the next operation can take them as its
// activations without going through the token buffer (unicast reuse).
// Write: one 32-bit GBUS word with byte enables at a word-aligned byte
// address. Read: one aligned 128-bit row per cycle, synchronous, held while
// re is low. The 4 KiB default size is this design's choice.
module rr_sram
  import rdxe_pkg::*;
#(
  parameter int BYTES = 4096
) (
  input  logic        clk,
  input  logic        we,
  input  logic [15:0] waddr,   // byte address, word aligned
  input  logic [3:0]  wbe,
  input  logic [31:0] wdata,
  input  logic        re,
  input  logic [15:0] raddr,   // byte address, 16-byte aligned
  output logic [ACT_W-1:0] rdata
);
  localparam int ROWS = BYTES / 16;
  localparam int RW   = $clog2(ROWS);
  logic [ACT_W-1:0] mem [ROWS];
  always_ff @(posedge clk) begin
    if (we)
      for (int b = 0; b < 4; b++)
        if (wbe[b]) mem[waddr[RW+3:4]][waddr[3:2]*32 + b*8 +: 8] <= wdata[b*8 +: 8];
    if (re) rdata <= mem[raddr[RW+3:4]];
  end
endmodule
