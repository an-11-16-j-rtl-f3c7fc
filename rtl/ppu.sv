// ppu: post-processing unit of a VAC.
// Takes recomputed results from the RCU, requantises them to INT8
// (round-half-up shift, saturation), works out where each result goes
// (address router) and packs neighbouring bytes of the same 32-bit word into
// one GBUS write with byte enables (concat, 1-4 bytes per word).
// Result placement, for VAC index v and row r of an operation with R rows:
//   GEMV/PV output j = v*R + r;  QK score of token t = r*16 + v (t > pos dropped)
//   DST_RR   : rr-SRAM byte rr_dst + j (or + t)
//   DST_K    : KV$ of VAC pos%16, byte kv_wbase*16 + (pos/16)*16R + j  (iWuR, row by row)
//   DST_V    : own KV$, byte kv_wbase*16 + r*CTX + pos                  (column by column)
//   DST_GPPU : raw 32-bit value for row j of the global PPU (no requantisation)
// Quantisation, concat and address routing are named by the source design;
// the placement formulas are this implementation's reading of its K/V layout.
// Interface: valid/ready in from the RCU, valid/ready out to the GBUS.
module ppu
  import rdxe_pkg::*;
#(
  parameter int VIDX    = 0,
  parameter int CTX_MAX = 1024
) (
  input  logic               clk,
  input  logic               rst_n,
  input  vac_cfg_t           cfg,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [7:0]         in_row,
  input  logic signed [39:0] in_data,
  output logic               out_valid,
  input  logic               out_ready,
  output gbus_req_t          out,
  output logic               busy
);
  logic        cc_valid, flush_pend;
  gbus_req_t   cc;
  logic        slot_free, accept, last_row, drop;
  logic [15:0] j, baddr;
  logic [7:0]  q;
  gbus_req_t   nb;          // the new result as a single-byte write
  gbus_req_t   merged;

  assign slot_free = !out_valid || out_ready;
  assign in_ready  = slot_free && !flush_pend;
  assign accept    = in_valid && in_ready;
  assign last_row  = (in_row == cfg.rows - 8'd1);
  assign q         = quant8(in_data, cfg.shift);

  always_comb begin
    drop = 1'b0;
    if (cfg.wsrc == WS_K) begin
      j    = 16'(in_row) * 16 + 16'(VIDX);
      drop = (j > cfg.pos);
    end else begin
      j = 16'(VIDX) * 16'(cfg.rows) + 16'(in_row);
    end
    nb = '0;
    unique case (cfg.dst)
      DST_RR: begin
        nb.dst = GB_RR;
        baddr  = 16'(cfg.rr_dst) + j;
      end
      DST_K: begin
        nb.dst = GB_KV;
        nb.tgt = cfg.pos[3:0];
        baddr  = (cfg.kv_wbase << 4) + (cfg.pos >> 4) * (16'(cfg.rows) << 4) + j;
      end
      DST_V: begin
        nb.dst = GB_LOCALV;
        baddr  = (cfg.kv_wbase << 4) + 16'(in_row) * 16'(CTX_MAX) + cfg.pos;
      end
      default: begin
        nb.dst = GB_GPPU;
        baddr  = j;
      end
    endcase
    if (cfg.dst == DST_GPPU) begin
      nb.addr = baddr;
      nb.be   = 4'hf;
      nb.data = (in_data > 40'sh7fffffff) ? 32'h7fffffff :
                (in_data < -40'sh80000000) ? 32'h80000000 : in_data[31:0];
    end else begin
      nb.addr = {baddr[15:2], 2'b00};
      nb.be   = 4'b0001 << baddr[1:0];
      nb.data = 32'(q) << (8 * baddr[1:0]);
    end
    merged = cc;
    merged.be = cc.be | nb.be;
    for (int b = 0; b < 4; b++)
      if (nb.be[b]) merged.data[b*8 +: 8] = nb.data[b*8 +: 8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out        <= '0;
      cc_valid   <= 1'b0;
      cc         <= '0;
      flush_pend <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (flush_pend && slot_free) begin
        out <= cc; out_valid <= 1'b1; cc_valid <= 1'b0; flush_pend <= 1'b0;
      end else if (accept) begin
        if (drop) begin
          if (last_row && cc_valid) begin
            out <= cc; out_valid <= 1'b1; cc_valid <= 1'b0;
          end
        end else if (cfg.dst == DST_GPPU || cfg.dst == DST_V) begin
          out <= nb; out_valid <= 1'b1;
        end else if (cc_valid && (cc.addr != nb.addr || cc.dst != nb.dst || cc.tgt != nb.tgt)) begin
          out <= cc; out_valid <= 1'b1;
          cc  <= nb; cc_valid <= 1'b1;
          if (last_row) flush_pend <= 1'b1;
        end else if (last_row) begin
          out <= cc_valid ? merged : nb; out_valid <= 1'b1; cc_valid <= 1'b0;
        end else begin
          cc <= cc_valid ? merged : nb; cc_valid <= 1'b1;
        end
      end
    end
  end

  assign busy = cc_valid || out_valid || flush_pend;
endmodule
