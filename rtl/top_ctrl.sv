// top_ctrl: the DXE's top controller.
// Instruction register file: N_INSTR 128-bit instructions (instr_t), written
// by CMD_INSTR frames. Each layer slot held by the DXE is a program starting
// at slot_pc[s] and ending with OP_END.
// Address router: CMD_LOAD frames carry a unified word address
// ([31:28] region 0 WMEM / 1 KV$, [27:25] tile, [24:21] VAC, [20:0] word) and
// are steered to the selected memory, one 128-bit word per data beat.
// Dataflow control: a received token (CMD_TOKEN) is taken from the token
// buffer; the layer slots run in order (in reverse order on odd passes when
// symmetric sharing is configured); every OP_DXT instruction is issued to
// all tiles at once with its derived fields (for Q x K the row count and for
// P x V the length follow from the token position; K/V addresses get the
// request's KV base req*req_stride) and the next instruction waits until all
// tiles are idle; OP_RES runs the global PPU's residual step. The finished
// token is then sent on: to the host when this DXE closes the last ring pass,
// otherwise to the next DXE, with its pass count advanced if this DXE closes
// a pass. Sending overlaps the next token's computation.
// Flow control: the ring link is offered a frame when a slot is free, the
// host link only when two are, so a token circulating in the ring always
// finds room. The block names follow the source design; the instruction set,
// the frame formats and all sequencing rules are this design's.
module top_ctrl
  import rdxe_pkg::*;
#(
  parameter int N_DXT   = 8,
  parameter int N_INSTR = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // received beats
  input  logic              b_valid,
  input  logic              b_link,
  input  logic              b_first,
  input  logic [ACT_W-1:0]  b_data,
  output logic [1:0]        rx_rdy,
  // transmit
  output logic              t_valid,
  input  logic              t_ready,
  output logic              t_link,
  output logic              t_last,
  output logic [ACT_W-1:0]  t_data,
  // token buffer
  input  logic [1:0]        tb_n_free,
  output logic              tb_alloc,
  input  logic [1:0]        tb_alloc_slot,
  output logic              tb_commit,
  output logic [1:0]        tb_commit_slot,
  output hdr_t              tb_commit_hdr,
  input  logic              tb_rdy_valid,
  input  logic [1:0]        tb_rdy_slot,
  input  hdr_t              tb_rdy_hdr,
  output logic              tb_take,
  output logic              tb_to_tx,
  output logic [1:0]        tb_to_tx_slot,
  output logic              tb_release,
  output logic [1:0]        tb_release_id,
  output logic              tb_rx_we,
  output logic [1:0]        tb_rx_slot,
  output logic [7:0]        tb_rx_beat,
  output logic [1:0]        cur_slot,
  output logic              tb_tx_re,
  output logic [1:0]        tb_tx_slot,
  output logic [7:0]        tb_tx_beat,
  input  logic [ACT_W-1:0]  tb_tx_data,
  // tiles
  output logic              dxt_start,
  output logic [N_DXT-1:0]  dxt_mask,
  output vac_cfg_t          dxt_cfg,
  output asrc_e             dxt_asrc,
  output logic [11:0]       dxt_rr_src,
  output logic [4:0]        dxt_n_log2,
  output logic [1:0]        gqa_log2,
  input  logic [N_DXT-1:0]  dxt_idle,
  output logic              gp_acc,
  // global PPU residual step
  output logic              res_start,
  output logic [7:0]        res_len,
  output logic [4:0]        res_shift,
  input  logic              res_done,
  // loads
  output logic              ld_w_we,
  output logic              ld_kv_we,
  output logic [2:0]        ld_dxt,
  output logic [3:0]        ld_vac,
  output logic [15:0]       ld_addr,
  output logic [ACT_W-1:0]  ld_data,
  output evt_t              evt
);
  evt_t evs;
  // ---------------- configuration and instruction memory ----------------
  cfg_t   cfg;
  instr_t imem [N_INSTR];

  // ---------------- receive side ----------------
  logic [1:0]  act;         // frame in progress per link
  hdr_t        fh  [2];     // frame header per link
  logic [15:0] fcnt [2];    // data beats received
  logic [1:0]  fslot [2];
  logic [31:0] faddr [2];
  hdr_t        hin;
  logic        dbeat;

  assign hin    = hdr_t'(b_data);
  assign rx_rdy = {(tb_n_free >= 2'd2) && !act[1], (tb_n_free >= 2'd1) && !act[0]};
  assign dbeat  = b_valid && !b_first;

  always_comb begin
    tb_alloc = b_valid && b_first && hin.cmd == CMD_TOKEN;
    tb_rx_we = 1'b0; tb_rx_slot = fslot[b_link]; tb_rx_beat = fcnt[b_link][7:0];
    tb_commit = 1'b0; tb_commit_slot = fslot[b_link]; tb_commit_hdr = fh[b_link];
    ld_w_we = 1'b0; ld_kv_we = 1'b0;
    ld_dxt  = faddr[b_link][27:25];
    ld_vac  = faddr[b_link][24:21];
    ld_addr = faddr[b_link][15:0];
    ld_data = b_data;
    if (dbeat && act[b_link]) begin
      unique case (fh[b_link].cmd)
        CMD_TOKEN: begin
          tb_rx_we = 1'b1;
          tb_commit = (fcnt[b_link] == fh[b_link].beats - 16'd1);
        end
        CMD_LOAD: begin
          ld_w_we  = faddr[b_link][31:28] == 4'd0;
          ld_kv_we = faddr[b_link][31:28] == 4'd1;
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act <= '0; cfg <= '0;
      for (int l = 0; l < 2; l++) begin
        fh[l] <= '0; fcnt[l] <= '0; fslot[l] <= '0; faddr[l] <= '0;
      end
    end else if (b_valid) begin
      if (b_first) begin
        fh[b_link]    <= hin;
        fcnt[b_link]  <= '0;
        faddr[b_link] <= hin.addr;
        fslot[b_link] <= tb_alloc_slot;
        act[b_link]   <= (hin.beats != 0);
      end else if (act[b_link]) begin
        fcnt[b_link]  <= fcnt[b_link] + 16'd1;
        faddr[b_link] <= faddr[b_link] + 32'd1;
        if (fh[b_link].cmd == CMD_INSTR) imem[faddr[b_link][$clog2(N_INSTR)-1:0]] <= instr_t'(b_data);
        if (fh[b_link].cmd == CMD_CFG)   cfg <= cfg_t'(b_data);
        if (fcnt[b_link] == fh[b_link].beats - 16'd1) act[b_link] <= 1'b0;
      end
    end
  end
  assign gqa_log2 = cfg.gqa_log2;

  // ---------------- sequencer ----------------
  typedef enum logic [2:0] {Q_IDLE, Q_SLOT, Q_FETCH, Q_WDXT, Q_WRES, Q_SEND} qst_e;
  qst_e        qs;
  hdr_t        tok;
  logic [3:0]  si;
  logic [7:0]  pc;
  logic        wait1;
  instr_t      ins;
  logic [3:0]  slot_eff;
  logic [15:0] req_base;
  logic        tx_busy;
  logic        rev;

  assign ins      = imem[pc[$clog2(N_INSTR)-1:0]];
  assign rev      = cfg.sym && tok.pass[0];
  assign slot_eff = rev ? (cfg.n_slots - 4'd1 - si) : si;
  assign req_base = 16'(tok.req) * cfg.req_stride;

  function automatic logic [4:0] log2c(input logic [7:0] v);
    logic [4:0] k;
    k = '0;
    for (int i = 0; i < 8; i++) if (v[i]) k = 5'(i);
    return k;
  endfunction

  logic [7:0] d_rows, d_len;
  always_comb begin
    d_rows = (ins.wsrc == WS_K) ? 8'(tok.pos >> 4) + 8'd1 : ins.rows;
    d_len  = (ins.wsrc == WS_V) ? 8'(tok.pos >> 4) + 8'd1 : ins.len_beats;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qs <= Q_IDLE; tok <= '0; si <= '0; pc <= '0; wait1 <= 1'b0; cur_slot <= '0;
      dxt_start <= 1'b0; dxt_mask <= '0; dxt_cfg <= '0; dxt_asrc <= AS_TB; dxt_rr_src <= '0;
      dxt_n_log2 <= '0; gp_acc <= 1'b0; res_start <= 1'b0; res_len <= '0; res_shift <= '0;
      evs <= '0;
    end else begin
      dxt_start <= 1'b0;
      res_start <= 1'b0;
      evs <= '0;
      unique case (qs)
        Q_IDLE: if (tb_rdy_valid) begin
          tok <= tb_rdy_hdr; cur_slot <= tb_rdy_slot; si <= '0; qs <= Q_SLOT;
          evs.tok_start <= 1'b1;
        end
        Q_SLOT: begin
          if (si == cfg.n_slots) qs <= Q_SEND;
          else begin
            pc <= cfg.slot_pc[slot_eff*8 +: 8];
            evs.slot_rev <= rev;
            qs <= Q_FETCH;
          end
        end
        Q_FETCH: begin
          unique case (ins.op)
            OP_DXT: begin
              dxt_start  <= 1'b1;
              dxt_mask   <= ins.dxt_mask;
              dxt_asrc   <= ins.asrc;
              dxt_rr_src <= ins.rr_src;
              dxt_n_log2 <= log2c(d_len) + 5'd4;
              gp_acc     <= ins.acc;
              dxt_cfg.wsrc      <= ins.wsrc;
              dxt_cfg.dst       <= ins.dst;
              dxt_cfg.rc        <= ins.rc;
              dxt_cfg.len_beats <= d_len;
              dxt_cfg.rows      <= d_rows;
              dxt_cfg.wbase     <= (ins.wsrc == WS_WMEM) ? ins.waddr : req_base + ins.kv_off;
              dxt_cfg.kv_wbase  <= req_base + ins.kv_off;
              dxt_cfg.pos       <= tok.pos;
              dxt_cfg.shift     <= ins.shift;
              dxt_cfg.rr_dst    <= ins.rr_dst;
              evs.op_tb   <= ins.asrc == AS_TB;
              evs.op_rr   <= ins.asrc != AS_TB;
              evs.op_rms  <= ins.rc == RC_RMS;
              evs.op_smax <= ins.rc == RC_SMAX;
              evs.op_gelu <= ins.asrc == AS_RR_GELU;
              evs.op_kwr  <= ins.dst == DST_K;
              evs.op_vwr  <= ins.dst == DST_V;
              evs.op_gqa  <= (ins.wsrc != WS_WMEM) && cfg.gqa_log2 != 0;
              wait1 <= 1'b1;
              qs <= Q_WDXT;
            end
            OP_RES: begin
              res_start <= 1'b1;
              res_len   <= ins.len_beats;
              res_shift <= ins.shift;
              evs.op_res <= 1'b1;
              qs <= Q_WRES;
            end
            default: begin
              si <= si + 4'd1;
              qs <= Q_SLOT;
            end
          endcase
        end
        Q_WDXT: begin
          wait1 <= 1'b0;
          if (!wait1 && dxt_idle == '1) begin
            pc <= pc + 8'd1; qs <= Q_FETCH;
          end
        end
        Q_WRES: if (res_done) begin
          pc <= pc + 8'd1; qs <= Q_FETCH;
        end
        default: if (!tx_busy) qs <= Q_IDLE;   // Q_SEND: handed to the TX engine
      endcase
    end
  end
  assign tb_take = (qs == Q_IDLE) && tb_rdy_valid;

  // ---------------- transmit engine ----------------
  typedef enum logic [1:0] {T_IDLE, T_HDR, T_RD, T_DAT} tx_e;
  tx_e         ts;
  hdr_t        th;
  logic        tlink;
  logic [1:0]  tslot;
  logic [15:0] tbeat;
  logic        launch, closes, done_all;

  assign closes   = cfg.ring_last;
  assign done_all = closes && (tok.pass + 8'd1 >= cfg.n_pass);
  assign launch   = (qs == Q_SEND) && !tx_busy;
  assign tx_busy  = (ts != T_IDLE);
  assign tb_to_tx = launch;
  assign tb_to_tx_slot = cur_slot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts <= T_IDLE; th <= '0; tlink <= 1'b0; tslot <= '0; tbeat <= '0;
    end else begin
      unique case (ts)
        T_IDLE: if (launch) begin
          th <= tok;
          th.pass <= closes ? tok.pass + 8'd1 : tok.pass;
          tlink <= done_all;
          tslot <= cur_slot; tbeat <= '0; ts <= T_HDR;
        end
        T_HDR: if (t_ready) ts <= T_RD;
        T_RD:  ts <= T_DAT;
        default: if (t_ready) begin
          if (tbeat == th.beats - 16'd1) ts <= T_IDLE;
          else begin tbeat <= tbeat + 16'd1; ts <= T_RD; end
        end
      endcase
    end
  end
  assign t_valid = (ts == T_HDR) || (ts == T_DAT);
  assign t_link  = tlink;
  assign t_last  = (ts == T_DAT) && (tbeat == th.beats - 16'd1);
  assign t_data  = (ts == T_HDR) ? ACT_W'(th) : tb_tx_data;
  assign tb_tx_re   = (ts == T_RD);
  assign tb_tx_slot = tslot;
  assign tb_tx_beat = tbeat[7:0];
  assign tb_release    = (ts == T_DAT) && t_ready && (tbeat == th.beats - 16'd1);
  assign tb_release_id = tslot;

  // events from the send path
  logic ev_fwd, ev_out, ev_pass;
  assign ev_fwd  = launch && !done_all;
  assign ev_out  = launch && done_all;
  assign ev_pass = launch && closes;
  always_comb begin
    evt = evs;
    evt.fwd_ring = ev_fwd;
    evt.out_host = ev_out;
    evt.pass_inc = ev_pass;
    evt.load     = ld_w_we || ld_kv_we;
    evt.stall    = 1'b0;          // added by the DXE
  end
endmodule
