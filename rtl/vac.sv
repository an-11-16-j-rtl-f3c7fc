// vac: vector-accumulate core, the compute and storage element of a tile.
// Each VAC holds its own weight memory (WMEM) and KV cache, a 16-multiplier
// MAC, a recompute unit (RCU) and a post-processing unit (PPU). Activations
// arrive as 128-bit beats on the horizontal link (HLINK); the VAC registers
// each beat once and passes it on, so the 16 VACs of a tile form a systolic
// input chain and VAC k sees a beat k cycles after VAC 0.
// Pipeline: cycle 0 the beat arrives and the operand address is issued
// (WMEM: wbase + row*len + beat; K: same; V: wbase + row*CTX/16 + beat);
// cycle 1 the operand word is multiplied with the registered beat; the row's
// sum leaves the MAC one cycle after its last beat, waits in the RCU for the
// RC factor, and the PPU places it. KV read data go out on kv_rd_own and come
// back through the tile's VLINK as kv_rd_in, so a tile in a GQA group can use
// its group leader's keys and values.
// 'en' low stalls the whole core (tile-wide stall, see dxt).
module vac
  import rdxe_pkg::*;
#(
  parameter int VIDX     = 0,
  parameter int W_DEPTH  = 1024,
  parameter int KV_DEPTH = 1024,
  parameter int CTX_MAX  = 1024,
  parameter int RCU_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              clr,
  input  vac_cfg_t          cfg,
  input  logic              rc_valid,
  input  logic [RC_W-1:0]   rc,
  input  hl_t               hl_in,
  output hl_t               hl_out,
  output logic [ACT_W-1:0]  kv_rd_own,
  input  logic [ACT_W-1:0]  kv_rd_in,
  // result towards the GBUS
  output logic              gb_req_valid,
  input  logic              gb_req_ready,
  output gbus_req_t         gb_req,
  // key writes arriving from the GBUS
  input  logic              gb_kv_we,
  input  logic [15:0]       gb_kv_addr,
  input  logic [3:0]        gb_kv_be,
  input  logic [31:0]       gb_kv_data,
  // initialisation loads
  input  logic              ld_w_we,
  input  logic              ld_kv_we,
  input  logic [15:0]       ld_addr,
  input  logic [ACT_W-1:0]  ld_data,
  output logic [$clog2(RCU_DEPTH):0] rcu_level,
  output logic              busy
);
  /*verilator no_inline_module*/
  hl_t                      hl_q;
  logic [15:0]              maddr;
  logic [ACT_W-1:0]         w_rd, opnd;
  logic                     mac_v;
  logic [7:0]               mac_row;
  logic signed [ACC_W-1:0]  mac_res;
  logic                     r_valid, r_ready;
  logic [7:0]               r_row;
  logic signed [39:0]       r_data;
  logic                     p_valid, p_ready, p_busy, lv_ready;
  gbus_req_t                p_out;

  always_comb begin
    if (cfg.wsrc == WS_V)
      maddr = cfg.wbase + 16'(hl_in.row) * 16'(CTX_MAX / 16) + 16'(hl_in.beat);
    else
      maddr = cfg.wbase + 16'(hl_in.row) * 16'(cfg.len_beats) + 16'(hl_in.beat);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hl_q <= '0;
    else if (en) hl_q <= hl_in;
  end
  assign hl_out = hl_q;

  wmem #(.DEPTH(W_DEPTH)) u_wmem (
    .clk, .we(ld_w_we), .waddr(ld_addr[$clog2(W_DEPTH)-1:0]), .wdata(ld_data),
    .re(en && hl_in.valid && cfg.wsrc == WS_WMEM), .raddr(maddr[$clog2(W_DEPTH)-1:0]), .rdata(w_rd));

  kv_cache #(.DEPTH(KV_DEPTH)) u_kv (
    .clk,
    .gb_we(gb_kv_we), .gb_addr(gb_kv_addr), .gb_be(gb_kv_be), .gb_data(gb_kv_data),
    .lv_we(p_valid && p_out.dst == GB_LOCALV), .lv_addr(p_out.addr), .lv_be(p_out.be),
    .lv_data(p_out.data), .lv_ready(lv_ready),
    .ld_we(ld_kv_we), .ld_addr(ld_addr[$clog2(KV_DEPTH)-1:0]), .ld_data(ld_data),
    .re(en && hl_in.valid && cfg.wsrc != WS_WMEM), .raddr(maddr[$clog2(KV_DEPTH)-1:0]),
    .rdata(kv_rd_own));

  assign opnd = (cfg.wsrc == WS_WMEM) ? w_rd : kv_rd_in;

  mac_unit u_mac (
    .clk, .rst_n, .en,
    .in_valid(hl_q.valid), .in_first(hl_q.beat == 8'd0), .in_last(hl_q.last),
    .in_row(hl_q.row), .act(hl_q.data), .wgt(opnd),
    .res_valid(mac_v), .res_row(mac_row), .res(mac_res));

  rcu #(.DEPTH(RCU_DEPTH)) u_rcu (
    .clk, .rst_n, .clr, .rc_en(cfg.rc != RC_NONE), .rc_valid, .rc,
    .in_valid(mac_v && en), .in_row(mac_row), .in_data(mac_res),
    .out_valid(r_valid), .out_ready(r_ready), .out_row(r_row), .out_data(r_data),
    .level(rcu_level));

  ppu #(.VIDX(VIDX), .CTX_MAX(CTX_MAX)) u_ppu (
    .clk, .rst_n, .cfg,
    .in_valid(r_valid), .in_ready(r_ready), .in_row(r_row), .in_data(r_data),
    .out_valid(p_valid), .out_ready(p_ready), .out(p_out), .busy(p_busy));

  assign p_ready      = (p_out.dst == GB_LOCALV) ? lv_ready : gb_req_ready;
  assign gb_req_valid = p_valid && p_out.dst != GB_LOCALV;
  assign gb_req       = p_out;
  assign busy = hl_q.valid || mac_v || (rcu_level != 0) || p_busy;
endmodule
