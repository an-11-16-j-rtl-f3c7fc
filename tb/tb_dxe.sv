// tb_dxe: one chip whose ring output is wired back to its own ring input
// (reduced size: d_model 128, link clock divider 4), running two requests.
// Its tiles share keys and values in pairs (GQA over the VLINK). Every
// output token is compared with the reference model and every mechanism of
// the chip must occur.
`timescale 1ns/1ps
module tb_dxe;
  import rdxe_pkg::*;
  localparam int N_DXE = 1;
  localparam int DIV   = 4;
  localparam int D     = 128;
  localparam int NREQ  = 2;
  localparam int NTOK0 = 2, NTOK1 = 2, NTOK2 = 0;
  localparam int L    = D / 16;      // beats per token
  localparam int RO   = D / 16;      // rows per VAC of the D-row projections
  localparam int SLW  = 8 * L;       // WMEM words per layer slot
  localparam int NT   = 8;           // tiles
  localparam int NPASS = 2;
  localparam int SH_Q = 3, SH_S = 6, SH_PV = 0, SH_O = 5, SH_U = 3, SH_D = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int   cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [N_DXE-1:0] h_sclk, h_cs_n, h_rdy, o_sclk, o_cs_n;
  logic [63:0]      h_dat [N_DXE];
  logic [63:0]      o_dat [N_DXE];
  evt_t             evt   [N_DXE];

  rdxe #(.N_DXE(N_DXE), .SPI_DIV(DIV)) dut (
    .clk, .rst_n, .host_rx_sclk(h_sclk), .host_rx_cs_n(h_cs_n), .host_rx_dat(h_dat),
    .host_rx_rdy(h_rdy), .host_tx_sclk(o_sclk), .host_tx_cs_n(o_cs_n), .host_tx_dat(o_dat),
    .host_tx_rdy('1), .evt);

  int checks = 0, failures = 0;
  int ev_cnt [16];

  // ---------------- host link driver ----------------
  task automatic send_frame(input int i, input logic [127:0] beats[$]);
    int w;
    w = 0;
    while (!h_rdy[i]) begin
      @(negedge clk);
      w++;
      if (w > 50000) begin
        failures++;
        $display("FAIL: host link %0d never ready", i);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
    @(negedge clk);
    h_cs_n[i] = 1'b0;
    foreach (beats[k])
      for (int ph = 0; ph < 2; ph++) begin
        for (int c = 0; c < 16; c++)
          h_dat[i][c*4 +: 4] = (ph == 0) ? beats[k][c*8 + 4 +: 4] : beats[k][c*8 +: 4];
        repeat (DIV / 2) @(negedge clk);
        h_sclk[i] = 1'b1;
        repeat (DIV / 2) @(negedge clk);
        h_sclk[i] = 1'b0;
      end
    repeat (DIV) @(negedge clk);
    h_cs_n[i] = 1'b1;
    repeat (DIV) @(negedge clk);
  endtask

  // ---------------- reference model state ----------------
  logic [127:0] wm [int];                 // weights by (dxe, tile, vac, word)
  byte          kref [int];               // keys by (dxe, slot, req, tile, pos, j)
  byte          vref [int];
  localparam logic [8:0] LUT [16] = '{256, 245, 235, 225, 215, 206, 197, 189,
                                      181, 173, 166, 159, 152, 146, 140, 134};

  function automatic int wkey(int e, int t, int v, int w);
    return ((e * NT + t) * 16 + v) * 4096 + w;
  endfunction
  function automatic int kvkey(int e, int s, int rq, int t, int p, int j);
    return (((((e * 2 + s) * 8 + rq) * NT + t) * 1024 + p) * 16) + j;
  endfunction
  function automatic int wgt(int e, int t, int v, int w, int lane);
    logic [127:0] x;
    x = wm[wkey(e, t, v, w)];
    return int'($signed(x[lane*8 +: 8]));
  endfunction
  function automatic int q8(longint v, int sh);
    longint r;
    r = (sh == 0) ? v : ((v + (64'sd1 <<< (sh - 1))) >>> sh);
    if (r > 127) r = 127;
    if (r < -128) r = -128;
    return int'(r);
  endfunction
  function automatic longint rc_rms(byte x[]);
    longint unsigned ss, m, y, yy, t2, t3, yn;
    int k;
    ss = 0;
    foreach (x[i]) ss += longint'(x[i]) * longint'(x[i]);
    m = ss >> ($clog2(D));
    if (m == 0) return (1 << 25) - 1;
    k = 0;
    for (int i = 0; i < 32; i++) if (m[i]) k = i;
    y = (64'd1 << 24) >> ((k + 1) >> 1);
    yn = 0;
    repeat (5) begin
      yy = y * y;
      t2 = m * (yy >> 24);
      t3 = (t2 >= (64'd3 << 24)) ? 0 : (64'd3 << 24) - t2;
      yn = (y * t3) >> 25;
      y  = yn & ((64'd1 << 27) - 1);
    end
    return (yn > (1 << 25) - 1) ? (1 << 25) - 1 : longint'(yn);
  endfunction
  function automatic int expq(int s, int smax);
    int d, u, ip;
    d = s - smax;
    if (d > 0) d = 0;
    u  = -d * 23;
    ip = u >> 8;
    if (ip >= 15) return 0;
    return (127 * int'(LUT[(u >> 4) & 15])) >> (8 + ip);
  endfunction
  function automatic int gelu(int x);
    if (x >= 48) return x;
    if (x <= -48) return 0;
    return (x * (x + 48)) / 96;
  endfunction

  // odd chips (or a lone chip) share keys and values between tile pairs (GQA)
  function automatic bit is_gqa(int e);
    return (e % 2) == 1 || N_DXE == 1;
  endfunction

  // loop bounds held in variables so that the reference loops stay loops
  int c2 = 2, c3 = 3, c4 = 4, c16 = 16, cL = L, cRO = RO, cNT = NT, cD = D, cSLW = SLW,
      cNP = NPASS, cNX = N_DXE;

  // one layer slot of DXE e on token x (in place)
  task automatic ref_layer(input int e, input int s, input int rq, input int pos, inout byte x[]);
    int     base, kvo;
    longint rc, acc;
    byte    q [NT][16];
    byte    o [NT][16];
    byte    h [NT][32];
    longint part [];
    bit     gqa;
    base = s * SLW;
    gqa  = is_gqa(e);
    part = new[D];
    rc = rc_rms(x);
    for (int t = 0; t < c4; t++)
      for (int v = 0; v < c16; v++) begin
        for (int m = 0; m < c3; m++) begin
          acc = 0;
          for (int b = 0; b < cL; b++)
            for (int l = 0; l < c16; l++) acc += x[b*16+l] * wgt(e, t, v, base + m*L + b, l);
          acc = (acc * rc) >>> 24;
          if (m == 0) q[t][v] = byte'(q8(acc, SH_Q));
          else if (!gqa || t % 2 == 0) begin
            if (m == 1) kref[kvkey(e, s, rq, t, pos, v)] = byte'(q8(acc, SH_Q));
            else        vref[kvkey(e, s, rq, t, pos, v)] = byte'(q8(acc, SH_Q));
          end
        end
      end
    for (int t = 0; t < c4; t++) begin
      int lt, smax, sum;
      int sc [];
      int p  [];
      lt = gqa ? (t & ~1) : t;
      sc = new[pos + 1];
      p  = new[pos + 1];
      smax = -128;
      for (int tau = 0; tau <= pos; tau++) begin
        acc = 0;
        for (int j = 0; j < c16; j++) acc += q[t][j] * kref[kvkey(e, s, rq, lt, tau, j)];
        sc[tau] = q8(acc, SH_S);
        if (sc[tau] > smax) smax = sc[tau];
      end
      sum = 0;
      for (int tau = 0; tau <= pos; tau++) begin
        p[tau] = expq(sc[tau], smax);
        sum += p[tau];
      end
      rc = (sum == 0) ? (1 << 25) - 1 : (longint'(1) << 24) / sum;
      for (int j = 0; j < c16; j++) begin
        acc = 0;
        for (int tau = 0; tau <= pos; tau++) acc += p[tau] * vref[kvkey(e, s, rq, lt, tau, j)];
        o[t][j] = byte'(q8((acc * rc) >>> 24, SH_PV));
      end
    end
    // output projection, reduced over the four head tiles
    for (int i = 0; i < cD; i++) part[i] = 0;
    for (int t = 0; t < c4; t++)
      for (int v = 0; v < c16; v++)
        for (int r = 0; r < cRO; r++) begin
          acc = 0;
          for (int l = 0; l < c16; l++) acc += o[t][l] * wgt(e, t, v, base + 3*L + r, l);
          part[v*RO + r] += acc;
        end
    for (int i = 0; i < cD; i++) x[i] = byte'(q8(longint'(x[i]) * (longint'(1) <<< SH_O) + part[i], SH_O));
    // FFN
    rc = rc_rms(x);
    for (int t = 0; t < cNT; t++)
      for (int v = 0; v < c16; v++)
        for (int r = 0; r < c2; r++) begin
          acc = 0;
          for (int b = 0; b < cL; b++)
            for (int l = 0; l < c16; l++) acc += x[b*16+l] * wgt(e, t, v, base + 3*L + RO + r*L + b, l);
          h[t][v*2 + r] = byte'(q8((acc * rc) >>> 24, SH_U));
        end
    for (int i = 0; i < cD; i++) part[i] = 0;
    for (int t = 0; t < cNT; t++)
      for (int v = 0; v < c16; v++)
        for (int r = 0; r < cRO; r++) begin
          acc = 0;
          for (int b = 0; b < c2; b++)
            for (int l = 0; l < c16; l++)
              acc += gelu(h[t][b*16+l]) * wgt(e, t, v, base + 5*L + RO + r*2 + b, l);
          part[v*RO + r] += acc;
        end
    for (int i = 0; i < cD; i++) x[i] = byte'(q8(longint'(x[i]) * (longint'(1) <<< SH_D) + part[i], SH_D));
  endtask

  // ---------------- instruction and configuration images ----------------
  function automatic instr_t mk(op_e op, wsrc_e ws, asrc_e as, dst_e ds, rc_e rcm, bit ac,
                                int len, int rows, int wa, int kvo, int rs, int rd, int sh, int mask);
    instr_t i;
    i = '0;
    i.op = op; i.wsrc = ws; i.asrc = as; i.dst = ds; i.rc = rcm; i.acc = ac;
    i.len_beats = 8'(len); i.rows = 8'(rows); i.waddr = 16'(wa); i.kv_off = 16'(kvo);
    i.rr_src = 12'(rs); i.rr_dst = 12'(rd); i.shift = 5'(sh); i.dxt_mask = 8'(mask);
    return i;
  endfunction

  task automatic program_dxe(input int e);
    logic [127:0] fr [$];
    hdr_t   hd;
    cfg_t   cf;
    int     kvmask;
    kvmask = is_gqa(e) ? 8'h05 : 8'h0f;
    fr = {};
    hd = '0; hd.cmd = CMD_INSTR; hd.addr = 0; hd.beats = 32;
    fr.push_back(hd);
    for (int s = 0; s < 2; s++) begin
      int b, ko, vo;
      b = s * SLW; ko = s * 128; vo = s * 128 + 64;
      fr.push_back(mk(OP_DXT, WS_WMEM, AS_TB, DST_RR, RC_RMS, 0, L, 1, b, 0, 0, 0, SH_Q, 8'h0f));
      fr.push_back(mk(OP_DXT, WS_WMEM, AS_TB, DST_K, RC_RMS, 0, L, 1, b + L, ko, 0, 0, SH_Q, kvmask));
      fr.push_back(mk(OP_DXT, WS_WMEM, AS_TB, DST_V, RC_RMS, 0, L, 1, b + 2*L, vo, 0, 0, SH_Q, kvmask));
      fr.push_back(mk(OP_DXT, WS_K, AS_RR, DST_RR, RC_NONE, 0, 1, 0, 0, ko, 0, 64, SH_S, 8'h0f));
      fr.push_back(mk(OP_DXT, WS_V, AS_RR_EXP, DST_RR, RC_SMAX, 0, 0, 1, 0, vo, 64, 32, SH_PV, 8'h0f));
      fr.push_back(mk(OP_DXT, WS_WMEM, AS_RR, DST_GPPU, RC_NONE, 0, 1, RO, b + 3*L, 0, 32, 0, 0, 8'h0f));
      fr.push_back(mk(OP_RES, WS_WMEM, AS_TB, DST_RR, RC_NONE, 0, L, 0, 0, 0, 0, 0, SH_O, 0));
      fr.push_back(mk(OP_DXT, WS_WMEM, AS_TB, DST_RR, RC_RMS, 0, L, 2, b + 3*L + RO, 0, 0, 2048, SH_U, 8'hff));
      fr.push_back(mk(OP_DXT, WS_WMEM, AS_RR_GELU, DST_GPPU, RC_NONE, 0, 2, RO, b + 5*L + RO, 0, 2048, 0, 0, 8'hff));
      fr.push_back(mk(OP_RES, WS_WMEM, AS_TB, DST_RR, RC_NONE, 0, L, 0, 0, 0, 0, 0, SH_D, 0));
      fr.push_back(mk(OP_END, WS_WMEM, AS_TB, DST_RR, RC_NONE, 0, 0, 0, 0, 0, 0, 0, 0, 0));
      for (int k = 11; k < 16; k++) fr.push_back('0);
    end
    send_frame(e, fr);
    fr = {};
    hd = '0; hd.cmd = CMD_CFG; hd.beats = 1;
    cf = '0;
    cf.ring_last = (e == N_DXE - 1);
    cf.n_pass = NPASS; cf.sym = 1'b1; cf.n_slots = 2;
    cf.slot_pc = {8'd0, 8'd0, 8'd16, 8'd0};
    cf.gqa_log2 = is_gqa(e) ? 2'd1 : 2'd0;
    cf.req_stride = 256;
    fr.push_back(hd);
    fr.push_back(cf);
    send_frame(e, fr);
    // weights: one frame per VAC
    for (int t = 0; t < cNT; t++)
      for (int v = 0; v < c16; v++) begin
        fr = {};
        hd = '0; hd.cmd = CMD_LOAD; hd.beats = 16'(2 * SLW);
        hd.addr = {4'd0, 3'(t), 4'(v), 21'd0};
        fr.push_back(hd);
        for (int w = 0; w < c2 * cSLW; w++) begin
          logic [127:0] d;
          for (int l = 0; l < 16; l++) d[l*8 +: 8] = 8'($signed($urandom_range(31)) - 16);
          wm[wkey(e, t, v, w)] = d;
          fr.push_back(d);
        end
        send_frame(e, fr);
      end
  endtask

  // ---------------- host receive side ----------------
  byte    expq_out [int][];       // expected output per (req, pos)
  int     got_out  [int];
  int     outputs = 0;
  logic [127:0] rxb [N_DXE][$];
  logic [63:0]  hi  [N_DXE];
  logic [N_DXE-1:0] ph, psclk, pcs;

  always @(posedge clk) begin
    for (int i = 0; i < N_DXE; i++) begin
      if (!o_cs_n[i] && o_sclk[i] && !psclk[i]) begin
        if (!ph[i]) hi[i] = o_dat[i];
        else begin
          logic [127:0] bt;
          for (int c = 0; c < 16; c++) bt[c*8 +: 8] = {hi[i][c*4 +: 4], o_dat[i][c*4 +: 4]};
          rxb[i].push_back(bt);
        end
        ph[i] = !ph[i];
      end
      if (o_cs_n[i] && !pcs[i] && rxb[i].size() > 0) begin
        hdr_t hh;
        int   key;
        hh  = hdr_t'(rxb[i][0]);
        key = int'(hh.req) * 1024 + int'(hh.pos);
        checks++;
        if (hh.cmd != CMD_TOKEN || hh.pass != NPASS || i != N_DXE - 1 || !expq_out.exists(key)) begin
          failures++;
          $display("FAIL: unexpected frame on host link %0d cmd=%0d req=%0d pos=%0d pass=%0d", i, hh.cmd, hh.req, hh.pos, hh.pass);
        end else begin
          int bad;
          bad = 0;
          for (int k = 0; k < cD; k++)
            if ($signed(rxb[i][1 + k/16][(k%16)*8 +: 8]) != expq_out[key][k]) bad++;
          checks++;
          if (bad != 0) begin
            failures++;
            $display("FAIL: req %0d pos %0d: %0d of %0d elements differ", hh.req, hh.pos, bad, D);
          end
          got_out[key] = 1;
          outputs++;
        end
        rxb[i] = {};
      end
      if (o_cs_n[i]) ph[i] = 1'b0;
      psclk[i] = o_sclk[i];
      pcs[i]   = o_cs_n[i];
    end
    for (int i = 0; i < N_DXE; i++) begin
      if (evt[i].tok_start) ev_cnt[0]++;
      if (evt[i].slot_rev)  ev_cnt[1]++;
      if (evt[i].op_tb)     ev_cnt[2]++;
      if (evt[i].op_rr)     ev_cnt[3]++;
      if (evt[i].op_rms)    ev_cnt[4]++;
      if (evt[i].op_smax)   ev_cnt[5]++;
      if (evt[i].op_gelu)   ev_cnt[6]++;
      if (evt[i].op_kwr)    ev_cnt[7]++;
      if (evt[i].op_vwr)    ev_cnt[8]++;
      if (evt[i].op_gqa)    ev_cnt[9]++;
      if (evt[i].op_res)    ev_cnt[10]++;
      if (evt[i].stall)     ev_cnt[11]++;
      if (evt[i].fwd_ring)  ev_cnt[12]++;
      if (evt[i].out_host)  ev_cnt[13]++;
      if (evt[i].pass_inc)  ev_cnt[14]++;
      if (evt[i].load)      ev_cnt[15]++;
    end
  end

  // ---------------- stimulus ----------------
  initial begin
    h_sclk = '0; h_cs_n = '1;
    for (int i = 0; i < N_DXE; i++) h_dat[i] = '0;
    ph = '0; psclk = '0; pcs = '1;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    // load all DXEs in parallel
    for (int e = 0; e < N_DXE; e++) begin
      automatic int ee = e;
      fork program_dxe(ee); join_none
    end
    wait fork;
    $display("loaded at cycle %0d", cyc);
    run_requests();
    repeat (200) @(negedge clk);
    begin
      string nm [16] = '{"token start", "reversed slot (symmetric sharing)", "TB broadcast input",
                         "rr-SRAM unicast input", "RMSNorm recompute", "Softmax recompute", "GELU",
                         "iWuR key write", "local value write", "GQA shared KV", "residual add",
                         "stall", "ring forward", "host output", "ring pass closed", "load beat"};
      for (int k = 0; k < 16; k++) begin
        $display("mechanism %-34s : %0d", nm[k], ev_cnt[k]);
        checks++;
        if (ev_cnt[k] == 0) begin
          failures++;
          $display("FAIL: mechanism '%s' never happened", nm[k]);
        end
      end
    end
    checks++;
    if (outputs != expq_out.num()) begin
      failures++;
      $display("FAIL: %0d of %0d tokens came back", outputs, expq_out.num());
    end
    $display("done at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Requests: NTOK tokens each; request 0 and 1 start together, request 2
  // joins when request 1 has finished (finish early / join late).
  task automatic run_requests();
    int ntok [3] = '{NTOK0, NTOK1, NTOK2};
    int sent [3] = '{0, 0, 0};
    bit busy [3] = '{0, 0, 0};
    int key  [3];
    int nreq_done;
    nreq_done = 0;
    while (nreq_done < NREQ) begin
      for (int r = 0; r < NREQ; r++) begin
        if (busy[r] && got_out.exists(key[r])) begin
          busy[r] = 0;
          if (sent[r] == ntok[r]) nreq_done++;
        end
        if (!busy[r] && sent[r] < ntok[r] && (r != 2 || sent[1] == ntok[1] && !busy[1])) begin
          logic [127:0] fr [$];
          hdr_t hd;
          byte  x [];
          x = new[D];
          for (int k = 0; k < cD; k++) x[k] = byte'($signed($urandom_range(127)) - 64);
          hd = '0; hd.cmd = CMD_TOKEN; hd.req = 8'(r); hd.pos = 16'(sent[r]); hd.beats = 16'(L);
          fr = {};
          fr.push_back(hd);
          for (int b = 0; b < L; b++) begin
            logic [127:0] d;
            for (int l = 0; l < 16; l++) d[l*8 +: 8] = x[b*16+l];
            fr.push_back(d);
          end
          key[r] = r * 1024 + sent[r];
          for (int p = 0; p < cNP; p++)
            for (int e = 0; e < cNX; e++)
              for (int k = 0; k < c2; k++)
                ref_layer(e, (p % 2 == 1) ? 1 - k : k, r, sent[r], x);
          expq_out[key[r]] = x;
          busy[r] = 1;
          sent[r]++;
          send_frame(0, fr);
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
