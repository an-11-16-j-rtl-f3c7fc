// gbus: the 32-bit global bus of a tile with its bus controller.
// Sixteen VAC PPUs request the bus; a round-robin arbiter moves one request
// per cycle into the bus register, which then writes it to its destination:
//  * GB_RR   -> the tile's rr-SRAM (32-bit word, byte enables)
//  * GB_KV   -> the KV cache of VAC 'tgt' (irregular K write of iWuR)
//  * GB_GPPU -> the tile's output port to the global PPU (valid/ready)
// The bus register is freed at once for RR/KV and when the global PPU takes
// the word for GB_GPPU. The arbitration is deterministic, so tiles running
// the same operation in lockstep put identical row sequences on their ports.
// The bus width follows the source design; the arbiter and the one-stage bus
// register are this design's.
module gbus
  import rdxe_pkg::*;
#(
  parameter int N = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N-1:0]    req_valid,
  output logic [N-1:0]    req_ready,
  input  gbus_req_t       req [N],
  output logic            rr_we,
  output logic [15:0]     rr_addr,
  output logic [3:0]      rr_be,
  output logic [31:0]     rr_data,
  output logic [N-1:0]    kv_we,
  output logic [15:0]     kv_addr,
  output logic [3:0]      kv_be,
  output logic [31:0]     kv_data,
  output logic            gp_valid,
  input  logic            gp_ready,
  output logic [15:0]     gp_idx,
  output logic [31:0]     gp_data,
  output logic            busy
);
  localparam int IW = $clog2(N);
  gbus_req_t   bq;
  logic        bv, free, found;
  logic [IW-1:0] ptr, win;

  assign free = !bv || (bq.dst != GB_GPPU) || gp_ready;

  always_comb begin
    found = 1'b0;
    win   = ptr;
    for (int k = 0; k < N; k++) begin
      logic [IW-1:0] i;
      i = IW'(ptr + IW'(k));
      if (!found && req_valid[i]) begin
        found = 1'b1;
        win   = i;
      end
    end
    req_ready = '0;
    if (found && free) req_ready[win] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bv <= 1'b0; bq <= '0; ptr <= '0;
    end else if (free) begin
      bv <= found;
      if (found) begin
        bq  <= req[win];
        ptr <= win + 1'b1;
      end
    end
  end

  assign rr_we   = bv && bq.dst == GB_RR;
  assign rr_addr = bq.addr;
  assign rr_be   = bq.be;
  assign rr_data = bq.data;
  always_comb begin
    kv_we = '0;
    if (bv && bq.dst == GB_KV) kv_we[bq.tgt[IW-1:0]] = 1'b1;
  end
  assign kv_addr  = bq.addr;
  assign kv_be    = bq.be;
  assign kv_data  = bq.data;
  assign gp_valid = bv && bq.dst == GB_GPPU;
  assign gp_idx   = bq.addr;
  assign gp_data  = bq.data;
  assign busy     = bv;
endmodule
