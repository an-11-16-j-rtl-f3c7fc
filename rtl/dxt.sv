// dxt: decoder execution tile.
// Sixteen VACs on a horizontal link, a source mux, an activation reuse
// buffer, a row-reuse SRAM, a vector engine, the 32-bit GBUS and a VLINK
// stage, run by the tile's dataflow controller. One operation computes
// 'rows' dot products of length 16*len_beats in every VAC:
//   first row pass: beats are read from the selected source (token buffer
//   broadcast, own rr-SRAM, or rr-SRAM through the VE's GELU or exp lanes),
//   written into the activation reuse buffer, tapped by the VE for its
//   statistics, and sent down the HLINK;
//   later row passes replay the beats from the activation reuse buffer.
// Results leave through the VAC PPUs onto the GBUS (or straight into the VAC's
// own KV cache for V). The operation ends when the stream has left the last
// VAC and every FIFO and the bus are empty; 'idle' then rises again.
// Stall: when any RCU FIFO is nearly full the tile raises stall_req; the
// DXE ORs all requests into 'stall', which freezes the stream, the VACs and
// the VE statistics in every tile, so tiles stay in lockstep.
// Timing: a beat enters VAC 0 two cycles after it is fetched; one beat per
// unstalled cycle. The block set and its connections follow the source
// design; the controller, the latencies and the stall rule are this design's.
module dxt
  import rdxe_pkg::*;
#(
  parameter int TIDX      = 0,
  parameter int N_VAC     = 16,
  parameter int W_DEPTH   = 1024,
  parameter int KV_DEPTH  = 1024,
  parameter int CTX_MAX   = 1024,
  parameter int RR_BYTES  = 4096,
  parameter int ARB_DEPTH = 64,
  parameter int RCU_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // operation issue
  input  logic              start,
  input  logic              active,
  input  vac_cfg_t          cfg_in,
  input  asrc_e             asrc_in,
  input  logic [11:0]       rr_src_in,
  input  logic [4:0]        n_log2_in,
  input  logic [1:0]        gqa_log2,
  output logic              idle,
  // DXE-wide stall
  input  logic              stall,
  output logic              stall_req,
  // token buffer broadcast
  output logic              tb_re,
  output logic [7:0]        tb_beat,
  input  logic [ACT_W-1:0]  tb_rdata,
  // output to the global PPU
  output logic              gp_valid,
  input  logic              gp_ready,
  output logic [15:0]       gp_idx,
  output logic [31:0]       gp_data,
  // VLINK chain
  input  logic [ACT_W-1:0]  vl_in  [N_VAC],
  output logic [ACT_W-1:0]  vl_out [N_VAC],
  // initialisation loads
  input  logic              ld_w_we,
  input  logic              ld_kv_we,
  input  logic [3:0]        ld_vac,
  input  logic [15:0]       ld_addr,
  input  logic [ACT_W-1:0]  ld_data,
  // observation
  output logic              first_pass_evt
);
  /*verilator no_inline_module*/
  localparam int AAW = $clog2(ARB_DEPTH);
  typedef enum logic [1:0] {T_IDLE, T_RUN, T_DRAIN} tst_e;
  tst_e       st;
  vac_cfg_t   cfg;
  asrc_e      asrc;
  logic [11:0] rr_src;
  logic [4:0]  n_log2;
  logic        en, clr;
  logic [7:0]  r, b;
  logic        f_valid, f_first, f_last;
  logic [7:0]  f_row, f_beat;
  logic        fpd_q;
  logic [ACT_W-1:0] rr_rdata, arb_rdata, src_data, exp_data, gelu_data;
  hl_t         hl [N_VAC+1];
  logic [ACT_W-1:0] kv_own [N_VAC];
  logic [ACT_W-1:0] kv_use [N_VAC];
  logic [N_VAC-1:0] gq_valid, gq_ready, vbusy, near_full;
  gbus_req_t   gq [N_VAC];
  logic        rr_we;
  logic [15:0] rr_waddr;
  logic [3:0]  rr_wbe;
  logic [31:0] rr_wdata;
  logic [N_VAC-1:0] kv_we;
  logic [15:0] kv_addr;
  logic [3:0]  kv_be;
  logic [31:0] kv_data;
  logic        gb_busy, rc_valid;
  logic [RC_W-1:0] rc;
  logic signed [7:0] smax;

  assign en  = !stall;
  assign clr = start && active && st == T_IDLE;
  assign idle = (st == T_IDLE);

  // ---------------- dataflow controller ----------------
  logic issue;
  assign issue = (st == T_RUN) && en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= T_IDLE; cfg <= '0; asrc <= AS_TB; rr_src <= '0; n_log2 <= '0;
      r <= '0; b <= '0; f_valid <= 1'b0; f_first <= 1'b0; f_last <= 1'b0;
      f_row <= '0; f_beat <= '0; fpd_q <= 1'b0;
    end else begin
      fpd_q <= en && f_valid && f_first && f_last;
      unique case (st)
        T_IDLE: if (clr) begin
          cfg <= cfg_in; asrc <= asrc_in; rr_src <= rr_src_in; n_log2 <= n_log2_in;
          r <= '0; b <= '0; st <= T_RUN;
        end
        T_RUN: if (en) begin
          f_valid <= 1'b1; f_first <= (r == 0); f_last <= (b == cfg.len_beats - 8'd1);
          f_row <= r; f_beat <= b;
          if (b == cfg.len_beats - 8'd1) begin
            b <= '0;
            r <= r + 8'd1;
            if (r == cfg.rows - 8'd1) st <= T_DRAIN;
          end else b <= b + 8'd1;
        end
        default: begin
          if (en) f_valid <= 1'b0;
          if (!f_valid && vbusy == '0 && !gb_busy) st <= T_IDLE;
        end
      endcase
    end
  end
  assign first_pass_evt = fpd_q;

  // source reads (issued with the fetch, data one cycle later)
  assign tb_re   = issue && r == 0 && asrc == AS_TB;
  assign tb_beat = b;

  rr_sram #(.BYTES(RR_BYTES)) u_rr (
    .clk, .we(rr_we), .waddr(rr_waddr), .wbe(rr_wbe), .wdata(rr_wdata),
    .re(issue && r == 0 && asrc != AS_TB), .raddr(16'(rr_src) + (16'(b) << 4)), .rdata(rr_rdata));

  act_reuse_buffer #(.DEPTH(ARB_DEPTH)) u_arb (
    .clk, .we(en && f_valid && f_first), .waddr(f_beat[AAW-1:0]), .wdata(src_data),
    .re(issue && r != 0), .raddr(b[AAW-1:0]), .rdata(arb_rdata));

  // source mux
  always_comb begin
    unique case (asrc)
      AS_TB:      src_data = tb_rdata;
      AS_RR:      src_data = rr_rdata;
      AS_RR_GELU: src_data = gelu_data;
      default:    src_data = exp_data;
    endcase
  end

  vector_engine u_ve (
    .clk, .rst_n, .clr, .rc_mode(cfg.rc), .asrc, .n_log2, .pos(cfg.pos),
    .in_valid(en && f_valid && f_first), .in_beat(f_beat),
    .in_data(asrc == AS_TB ? tb_rdata : rr_rdata),
    .first_pass_done(fpd_q),
    .exp_data, .gelu_data,
    .trk_clr(clr && cfg_in.wsrc == WS_K), .trk_we(rr_we && cfg.wsrc == WS_K),
    .trk_be(rr_wbe), .trk_data(rr_wdata), .smax,
    .rc_valid, .rc);

  always_comb begin
    hl[0].valid = f_valid;
    hl[0].last  = f_last;
    hl[0].row   = f_row;
    hl[0].beat  = f_beat;
    hl[0].data  = f_first ? src_data : arb_rdata;
  end

  // ---------------- VAC array on the HLINK ----------------
  for (genvar v = 0; v < N_VAC; v++) begin : g_vac
    logic [$clog2(RCU_DEPTH):0] lvl;
    vac #(.VIDX(v), .W_DEPTH(W_DEPTH), .KV_DEPTH(KV_DEPTH), .CTX_MAX(CTX_MAX),
          .RCU_DEPTH(RCU_DEPTH)) u_vac (
      .clk, .rst_n, .en, .clr, .cfg, .rc_valid, .rc,
      .hl_in(hl[v]), .hl_out(hl[v+1]),
      .kv_rd_own(kv_own[v]), .kv_rd_in(kv_use[v]),
      .gb_req_valid(gq_valid[v]), .gb_req_ready(gq_ready[v]), .gb_req(gq[v]),
      .gb_kv_we(kv_we[v]), .gb_kv_addr(kv_addr), .gb_kv_be(kv_be), .gb_kv_data(kv_data),
      .ld_w_we(ld_w_we && ld_vac == 4'(v)), .ld_kv_we(ld_kv_we && ld_vac == 4'(v)),
      .ld_addr, .ld_data,
      .rcu_level(lvl), .busy(vbusy[v]));
    assign near_full[v] = (lvl >= ($clog2(RCU_DEPTH)+1)'(RCU_DEPTH - 2));
  end
  assign stall_req = |near_full;

  vlink #(.TIDX(TIDX), .N(N_VAC)) u_vlink (
    .gqa_log2, .own(kv_own), .from_above(vl_in), .to_vacs(kv_use), .to_below(vl_out));

  gbus #(.N(N_VAC)) u_gbus (
    .clk, .rst_n, .req_valid(gq_valid), .req_ready(gq_ready), .req(gq),
    .rr_we, .rr_addr(rr_waddr), .rr_be(rr_wbe), .rr_data(rr_wdata),
    .kv_we, .kv_addr, .kv_be, .kv_data,
    .gp_valid, .gp_ready, .gp_idx, .gp_data, .busy(gb_busy));
endmodule
