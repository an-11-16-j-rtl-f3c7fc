// act_reuse_buffer: activation reuse buffer of a tile.
// During the first row pass of an operation the activation beats coming from
// the source mux are written here; every further row pass replays them from
// this buffer instead of reading the token buffer or rr-SRAM again.
// One 128-bit write and one synchronous 128-bit read (with enable, data held
// while re is low) per cycle. A read of the word being written in the same
// cycle returns the new data (write-through), which a one-beat row needs:
// its second row pass reads the beat in the cycle the first pass writes it.
// Depth (64 beats = 1024 INT8 elements) is this
// design's choice; the source design only names the buffer and its purpose.
module act_reuse_buffer
  import rdxe_pkg::*;
#(
  parameter int DEPTH = 64
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
    if (re) rdata <= (we && waddr == raddr) ? wdata : mem[raddr];
  end
endmodule
