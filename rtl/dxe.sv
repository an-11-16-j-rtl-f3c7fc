// dxe: one decoder execution engine (one chip of the ring).
// Eight decoder execution tiles (DXT) share a token buffer that broadcasts
// the current token to all of them, a global PPU that reduces and
// requantises their row outputs, a top controller that sequences the layer
// programs, and a 16-channel quad-SPI interface with a ring link and a host
// link in each direction. Tiles are chained by VLINK (tile 0 at the top) so a
// GQA group can share one set of keys and values. One DXE works on one token
// at a time; while it computes, the next token arrives and the previous one
// leaves through the token buffer's other slots (token-level pipelining).
// The stall requests of all tiles are ORed into one stall that freezes every
// tile, keeping them in lockstep for the GPPU join and for VLINK.
// Structure and block set follow the source design; the defaults N_DXT=8
// and 16 VACs per tile are its numbers, memory sizes are this design's split
// of its 4 MB on-chip SRAM (16 KiB weights + 16 KiB KV cache per VAC).
module dxe
  import rdxe_pkg::*;
#(
  parameter int N_DXT    = 8,
  parameter int N_VAC    = 16,
  parameter int W_DEPTH  = 1024,
  parameter int KV_DEPTH = 1024,
  parameter int CTX_MAX  = 1024,
  parameter int RR_BYTES = 4096,
  parameter int D_MAX    = 1024,
  parameter int N_INSTR  = 64,
  parameter int SPI_DIV  = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  rx_sclk,
  input  logic [1:0]  rx_cs_n,
  input  logic [63:0] rx_dat [2],
  output logic [1:0]  rx_rdy,
  output logic [1:0]  tx_sclk,
  output logic [1:0]  tx_cs_n,
  output logic [63:0] tx_dat [2],
  input  logic [1:0]  tx_rdy,
  output evt_t        evt
);
  /*verilator no_inline_module*/
  // interface <-> controller
  logic              b_valid, b_link, b_first, t_valid, t_ready, t_link, t_last;
  logic [ACT_W-1:0]  b_data, t_data;
  logic [1:0]        rdy_int;
  // token buffer
  logic [1:0]  n_free, alloc_slot, commit_slot, rdy_slot, to_tx_slot, release_id;
  logic [1:0]  rx_slot, cur_slot, tx_slot;
  logic        alloc, commit, rdy_valid, take, to_tx, release_slot, rx_we, tx_re;
  hdr_t        commit_hdr, rdy_hdr;
  logic [7:0]  rx_beat, tx_beat;
  logic [ACT_W-1:0] tx_data, bc_data, gp_rdata, gp_wdata;
  logic        gp_re, gp_we;
  logic [7:0]  gp_rbeat, gp_wbeat;
  // tiles
  logic              dxt_start, gp_acc, ld_w_we, ld_kv_we, stall;
  logic [N_DXT-1:0]  dxt_mask, dxt_idle, stall_req, tb_re_t, gpv, fpe;
  vac_cfg_t          dxt_cfg;
  asrc_e             dxt_asrc;
  logic [11:0]       dxt_rr_src;
  logic [4:0]        dxt_n_log2;
  logic [1:0]        gqa_log2;
  logic [7:0]        tb_beat_t [N_DXT];
  logic [15:0]       gp_idx [N_DXT];
  logic [31:0]       gp_dat [N_DXT];
  logic              gp_ready;
  logic [2:0]        ld_dxt;
  logic [3:0]        ld_vac;
  logic [15:0]       ld_addr;
  logic [ACT_W-1:0]  ld_data;
  logic              res_start, res_done;
  logic [7:0]        res_len, bc_beat;
  logic [4:0]        res_shift;
  evt_t              cevt;

  io_interface #(.DIV(SPI_DIV)) u_io (
    .clk, .rst_n, .rx_sclk, .rx_cs_n, .rx_dat, .rx_rdy, .tx_sclk, .tx_cs_n, .tx_dat, .tx_rdy,
    .rdy_in(rdy_int), .b_valid, .b_link, .b_first, .b_data,
    .t_valid, .t_ready, .t_link, .t_last, .t_data);

  token_buffer #(.D_MAX(D_MAX)) u_tb (
    .clk, .rst_n, .n_free, .alloc, .alloc_slot, .commit, .commit_slot, .commit_hdr,
    .rdy_valid, .rdy_slot, .rdy_hdr, .take, .to_tx, .to_tx_slot, .release_slot, .release_id,
    .rx_we, .rx_slot, .rx_beat, .rx_data(b_data),
    .bc_re(|tb_re_t), .bc_slot(cur_slot), .bc_beat, .bc_data,
    .gp_re, .gp_we, .gp_slot(cur_slot), .gp_rbeat, .gp_wbeat, .gp_wdata, .gp_rdata,
    .tx_re, .tx_slot, .tx_beat, .tx_data);

  always_comb begin
    bc_beat = '0;
    for (int t = 0; t < N_DXT; t++) if (tb_re_t[t]) bc_beat = tb_beat_t[t];
  end

  top_ctrl #(.N_DXT(N_DXT), .N_INSTR(N_INSTR)) u_ctrl (
    .clk, .rst_n, .b_valid, .b_link, .b_first, .b_data, .rx_rdy(rdy_int),
    .t_valid, .t_ready, .t_link, .t_last, .t_data,
    .tb_n_free(n_free), .tb_alloc(alloc), .tb_alloc_slot(alloc_slot), .tb_commit(commit),
    .tb_commit_slot(commit_slot), .tb_commit_hdr(commit_hdr), .tb_rdy_valid(rdy_valid),
    .tb_rdy_slot(rdy_slot), .tb_rdy_hdr(rdy_hdr), .tb_take(take), .tb_to_tx(to_tx),
    .tb_to_tx_slot(to_tx_slot), .tb_release(release_slot), .tb_release_id(release_id),
    .tb_rx_we(rx_we), .tb_rx_slot(rx_slot), .tb_rx_beat(rx_beat), .cur_slot,
    .tb_tx_re(tx_re), .tb_tx_slot(tx_slot), .tb_tx_beat(tx_beat), .tb_tx_data(tx_data),
    .dxt_start, .dxt_mask, .dxt_cfg, .dxt_asrc, .dxt_rr_src, .dxt_n_log2, .gqa_log2,
    .dxt_idle, .gp_acc, .res_start, .res_len, .res_shift, .res_done,
    .ld_w_we, .ld_kv_we, .ld_dxt, .ld_vac, .ld_addr, .ld_data, .evt(cevt));

  assign stall = |stall_req;
  always_comb begin
    evt = cevt;
    evt.stall = stall && (dxt_idle != '1);
  end

  for (genvar t = 0; t < N_DXT; t++) begin : g_dxt
    logic [ACT_W-1:0] vl_in  [N_VAC];
    logic [ACT_W-1:0] vl_out [N_VAC];
    // the top of the VLINK chain has nothing above it
    if (t == 0) begin : g_top
      for (genvar v = 0; v < N_VAC; v++) begin : g_v
        assign vl_in[v] = '0;
      end
    end else begin : g_chain
      assign vl_in = g_dxt[t-1].vl_out;
    end
    dxt #(.TIDX(t), .N_VAC(N_VAC), .W_DEPTH(W_DEPTH), .KV_DEPTH(KV_DEPTH), .CTX_MAX(CTX_MAX),
          .RR_BYTES(RR_BYTES), .ARB_DEPTH(D_MAX / 16)) u_dxt (
      .clk, .rst_n, .start(dxt_start), .active(dxt_mask[t]), .cfg_in(dxt_cfg),
      .asrc_in(dxt_asrc), .rr_src_in(dxt_rr_src), .n_log2_in(dxt_n_log2), .gqa_log2,
      .idle(dxt_idle[t]), .stall, .stall_req(stall_req[t]),
      .tb_re(tb_re_t[t]), .tb_beat(tb_beat_t[t]), .tb_rdata(bc_data),
      .gp_valid(gpv[t]), .gp_ready(gp_ready && dxt_mask[t]), .gp_idx(gp_idx[t]), .gp_data(gp_dat[t]),
      .vl_in, .vl_out,
      .ld_w_we(ld_w_we && ld_dxt == 3'(t)), .ld_kv_we(ld_kv_we && ld_dxt == 3'(t)),
      .ld_vac, .ld_addr, .ld_data, .first_pass_evt(fpe[t]));
  end

  global_ppu #(.N_DXT(N_DXT), .D_MAX(D_MAX)) u_gppu (
    .clk, .rst_n, .mask(dxt_mask), .acc(gp_acc), .in_valid(gpv), .in_ready(gp_ready),
    .in_idx(gp_idx), .in_data(gp_dat), .res_start, .res_len, .res_shift, .res_done,
    .tb_re(gp_re), .tb_we(gp_we), .tb_rbeat(gp_rbeat), .tb_wbeat(gp_wbeat),
    .tb_rdata(gp_rdata), .tb_wdata(gp_wdata));
endmodule
