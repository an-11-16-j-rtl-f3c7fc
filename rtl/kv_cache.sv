// kv_cache: per-VAC key/value cache with the irregular-write, uniform-read
// (iWuR) organisation.
// Writes are byte-granular: a 32-bit GBUS word with byte enables (keys, sent
// by other VACs, stored row by row so that one token's K vector sits in one
// cache) or a single local byte (values, written by the owning VAC column by
// column so that one column over all tokens is contiguous). Two write ports
// share one array: the GBUS port has priority and the local port is told to
// wait with lv_ready. A bulk load port (128-bit) serves initialisation.
// Reads are always one 128-bit word per cycle, so both Q x K and P x V stream
// 16 operands per cycle without reshaping. Synchronous read with read enable.
// The byte-write/uniform-read scheme follows the source design; the port
// arrangement and the 16 KiB default depth are this design's.
module kv_cache
  import rdxe_pkg::*;
#(
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     gb_we,
  input  logic [15:0]              gb_addr,   // byte address, word aligned
  input  logic [3:0]               gb_be,
  input  logic [31:0]              gb_data,
  input  logic                     lv_we,
  input  logic [15:0]              lv_addr,   // byte address, word aligned
  input  logic [3:0]               lv_be,
  input  logic [31:0]              lv_data,
  output logic                     lv_ready,
  input  logic                     ld_we,
  input  logic [$clog2(DEPTH)-1:0] ld_addr,
  input  logic [ACT_W-1:0]         ld_data,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [ACT_W-1:0]         rdata
);
  localparam int AW = $clog2(DEPTH);
  logic [ACT_W-1:0] mem [DEPTH];
  logic             w32;
  logic [15:0]      a32;
  logic [3:0]       be32;
  logic [31:0]      d32;

  assign lv_ready = !gb_we && !ld_we;
  assign w32  = gb_we || lv_we;
  assign a32  = gb_we ? gb_addr : lv_addr;
  assign be32 = gb_we ? gb_be   : lv_be;
  assign d32  = gb_we ? gb_data : lv_data;

  always_ff @(posedge clk) begin
    if (ld_we) mem[ld_addr] <= ld_data;
    else if (w32)
      for (int b = 0; b < 4; b++)
        if (be32[b]) mem[a32[AW+3:4]][a32[3:2]*32 + b*8 +: 8] <= d32[b*8 +: 8];
    if (re) rdata <= mem[raddr];
  end
endmodule
