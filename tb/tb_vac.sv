// tb_vac: one VAC (index 3) fed on its HLINK. (1) a 4-row x 2-beat GEMV out
// of WMEM with raw results to the global PPU: every row's 32-bit dot product
// and its row index; (2) the same GEMV with RMS recompute (RC = 0.5 in Q1.24)
// held valid by the vector engine; requantised to INT8 into the rr-SRAM: the four bytes must be concatenated
// into one GBUS write; (3) a V write-back (DST_V) lands in the own KV cache
// and is read back as a KV operand; (4) the HLINK forwards each beat one
// cycle later, and GBUS back-pressure does not lose results.
`timescale 1ns/1ps
module tb_vac;
  import rdxe_pkg::*;
  localparam int VIDX = 3;
  logic clk = 0, rst_n = 0, en = 1, clr = 0, rc_valid = 0;
  vac_cfg_t cfg;
  logic [RC_W-1:0] rc;
  hl_t hl_in, hl_out;
  logic [127:0] kv_rd_own, kv_rd_in, ld_data;
  logic gb_req_valid, gb_req_ready, gb_kv_we, ld_w_we, ld_kv_we, busy;
  gbus_req_t gb_req;
  logic [15:0] gb_kv_addr, ld_addr;
  logic [3:0] gb_kv_be;
  logic [31:0] gb_kv_data;
  logic [3:0] rcu_level;
  int checks = 0, failures = 0;
  logic signed [7:0] W [4][32], A [32];
  gbus_req_t got [$];
  hl_t hl_prev;
  always #5 clk = ~clk;
  assign kv_rd_in = kv_rd_own;
  vac #(.VIDX(VIDX), .W_DEPTH(64), .KV_DEPTH(256), .CTX_MAX(64)) dut (.*);
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  always @(posedge clk) begin
    if (gb_req_valid && gb_req_ready) got.push_back(gb_req);
    if (rst_n) begin
      checks++; if (hl_out !== hl_prev) begin failures++; $display("FAIL hlink forward"); end
    end
    hl_prev <= hl_in;
  end
  always @(negedge clk) gb_req_ready <= ($urandom_range(3) != 0);
  task automatic stream(input int rows, input int beats);
    for (int r = 0; r < rows; r++)
      for (int b = 0; b < beats; b++) begin
        hl_in = '0; hl_in.valid = 1; hl_in.row = 8'(r); hl_in.beat = 8'(b); hl_in.last = (b == beats - 1);
        for (int e = 0; e < 16; e++) hl_in.data[e*8 +: 8] = A[b*16 + e];
        @(negedge clk);
      end
    hl_in = '0;
  endtask
  initial begin
    hl_in = '0; hl_prev = '0; cfg = '0; rc = '0; gb_kv_we = 0; gb_kv_addr = 0; gb_kv_be = 0; gb_kv_data = 0;
    ld_w_we = 0; ld_kv_we = 0; ld_addr = 0; ld_data = 0; gb_req_ready = 1;
    for (int r = 0; r < 4; r++) for (int i = 0; i < 32; i++) W[r][i] = 8'($urandom);
    for (int i = 0; i < 32; i++) A[i] = 8'($urandom);
    repeat (3) @(negedge clk); rst_n = 1;
    // weights: row r, beat b at word 8 + r*2 + b
    for (int r = 0; r < 4; r++) for (int b = 0; b < 2; b++) begin
      ld_w_we = 1; ld_addr = 16'(8 + r * 2 + b);
      for (int e = 0; e < 16; e++) ld_data[e*8 +: 8] = W[r][b*16 + e];
      @(negedge clk);
    end
    ld_w_we = 0;
    // (1) raw to the global PPU
    cfg.wsrc = WS_WMEM; cfg.dst = DST_GPPU; cfg.rc = RC_NONE; cfg.len_beats = 2; cfg.rows = 4; cfg.wbase = 8;
    stream(4, 2);
    repeat (30) @(negedge clk);
    chk(got.size() == 4, $sformatf("gppu results %0d", got.size()));
    for (int r = 0; r < 4 && r < got.size(); r++) begin
      int s; s = 0; for (int i = 0; i < 32; i++) s += int'(W[r][i]) * int'(A[i]);
      chk(got[r].dst == GB_GPPU && got[r].addr == 16'(VIDX * 4 + r) && got[r].data == 32'(s),
          $sformatf("gppu row %0d got %0d exp %0d", r, $signed(got[r].data), s));
    end
    got.delete();
    chk(!busy, "idle after op");
    // (2) RMS recompute, requantised, concatenated
    clr = 1; @(negedge clk); clr = 0;
    cfg.dst = DST_RR; cfg.rc = RC_RMS; cfg.shift = 5; cfg.rr_dst = 12'h100;
    stream(4, 2);
    repeat (10) @(negedge clk);
    chk(got.size() == 0, "waits for the RC factor");
    rc = 25'(1 << 23); rc_valid = 1;
    repeat (30) @(negedge clk);
    chk(got.size() == 1, $sformatf("rr writes %0d", got.size()));
    if (got.size() > 0) begin
      chk(got[0].dst == GB_RR && got[0].addr == 16'h100 + 16'(VIDX * 4) && got[0].be == 4'hf, "concat write");
      for (int r = 0; r < 4; r++) begin
        int s; logic signed [39:0] y; s = 0;
        for (int i = 0; i < 32; i++) s += int'(W[r][i]) * int'(A[i]);
        y = (40'(s) * 40'(1 << 23)) >>> 24;
        chk(got[0].data[r*8 +: 8] == quant8(y, 5), $sformatf("rms byte %0d", r));
      end
    end
    got.delete();
    // (3) V write-back of 4 rows at position 5, read back as V operand
    rc_valid = 0; clr = 1; @(negedge clk); clr = 0;
    cfg.rc = RC_NONE; cfg.dst = DST_V; cfg.kv_wbase = 16'd32; cfg.pos = 16'd5; cfg.shift = 0;
    for (int r = 0; r < 4; r++) for (int i = 0; i < 32; i++) W[r][i] = (i < 2) ? 8'(r + 1) : 8'sd0;
    for (int r = 0; r < 4; r++) for (int b = 0; b < 2; b++) begin
      ld_w_we = 1; ld_addr = 16'(8 + r * 2 + b);
      for (int e = 0; e < 16; e++) ld_data[e*8 +: 8] = W[r][b*16 + e];
      @(negedge clk);
    end
    ld_w_we = 0;
    for (int i = 0; i < 32; i++) A[i] = (i < 2) ? 8'sd3 : 8'sd0;
    stream(4, 2);
    repeat (30) @(negedge clk);
    chk(got.size() == 0, "V stays local");
    // V row r is at word kv_wbase + r*CTX/16; position 5 is byte 5 of it
    cfg.wsrc = WS_V; cfg.dst = DST_GPPU; cfg.wbase = 16'd32; cfg.rows = 4; cfg.len_beats = 1;
    for (int i = 0; i < 32; i++) A[i] = (i == 5) ? 8'sd1 : 8'sd0;
    stream(4, 1);
    repeat (30) @(negedge clk);
    chk(got.size() == 4, "V read back");
    for (int r = 0; r < 4 && r < got.size(); r++)
      chk($signed(got[r].data) == 6 * (r + 1), $sformatf("V row %0d = %0d", r, $signed(got[r].data)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
