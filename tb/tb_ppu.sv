// tb_ppu: results of one VAC (index 5) under each placement mode. GEMV to
// rr-SRAM must be requantised and packed into word writes with byte enables;
// K writes must go to VAC pos%16 at the row-by-row address; QK scores beyond
// pos are dropped; V writes are local single bytes at the column address;
// GPPU results carry the raw value. A byte model built from the emitted
// writes is compared with the expected placement.
`timescale 1ns/1ps
module tb_ppu;
  import rdxe_pkg::*;
  logic clk = 0, rst_n = 0, iv, irdy, ov, ordy, busy; logic [7:0] irow; logic signed [39:0] idat;
  vac_cfg_t cfg; gbus_req_t o;
  int checks = 0, failures = 0, words;
  byte mem [int];
  int  gp [int];
  always #5 clk = ~clk;
  ppu #(.VIDX(5), .CTX_MAX(64)) dut (.clk, .rst_n, .cfg, .in_valid(iv), .in_ready(irdy), .in_row(irow),
      .in_data(idat), .out_valid(ov), .out_ready(ordy), .out(o), .busy);
  always @(posedge clk) if (ov && ordy) begin
    words++;
    if (o.dst == GB_GPPU) gp[o.addr] = o.data;
    else for (int b = 0; b < 4; b++) if (o.be[b]) mem[{o.dst, o.tgt, o.addr} + b] = byte'(o.data[b*8 +: 8]);
  end
  function automatic int q8(longint v, int sh);
    longint r; r = (sh == 0) ? v : ((v + (64'sd1 <<< (sh - 1))) >>> sh);
    return r > 127 ? 127 : r < -128 ? -128 : int'(r);
  endfunction
  task automatic run(input dst_e d, input wsrc_e ws, input int rows, input int pos, input int sh);
    longint vals [];
    vals = new[rows];
    cfg = '0; cfg.dst = d; cfg.wsrc = ws; cfg.rows = 8'(rows); cfg.pos = 16'(pos); cfg.shift = 5'(sh);
    cfg.rr_dst = 12'd100; cfg.kv_wbase = 16'd3;
    mem.delete(); gp.delete(); words = 0;
    for (int r = 0; r < rows; r++) begin
      vals[r] = longint'($signed($urandom)) >>> $urandom_range(31, 10);
      iv = 1; irow = 8'(r); idat = 40'(vals[r]);
      do @(negedge clk); while (!irdy);
      iv = 0; ordy = $urandom_range(1);
      repeat ($urandom_range(2)) @(negedge clk);
      ordy = 1;
    end
    repeat (6) @(negedge clk);
    for (int r = 0; r < rows; r++) begin
      int j, t, key; bit dropd;
      j = 5 * rows + r; t = r * 16 + 5; dropd = 0;
      unique case (d)
        DST_RR:   key = (ws == WS_K) ? {GB_RR, 4'd0, 16'(100 + t)} : {GB_RR, 4'd0, 16'(100 + j)};
        DST_K:    key = {GB_KV, 4'(pos % 16), 16'(3*16 + (pos/16)*16*rows + j)};
        DST_V:    key = {GB_LOCALV, 4'd0, 16'(3*16 + r*64 + pos)};
        default:  key = j;
      endcase
      if (ws == WS_K && t > pos) dropd = 1;
      checks++;
      if (dropd) begin
        if (mem.exists(key)) begin failures++; $display("FAIL: masked score written"); end
      end else if (d == DST_GPPU) begin
        if (!gp.exists(key) || gp[key] != int'(vals[r])) begin failures++; $display("FAIL gppu row %0d", r); end
      end else if (!mem.exists(key) || mem[key] != byte'(q8(vals[r], sh))) begin
        failures++; $display("FAIL dst %0d row %0d key %h", d, r, key);
      end
    end
    checks++;
    if (d == DST_RR && ws == WS_WMEM && rows == 8 && words > 3) begin failures++; $display("FAIL: no packing (%0d words)", words); end
  endtask
  initial begin
    iv = 0; ordy = 1; irow = 0; idat = 0; cfg = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (4) begin
      run(DST_RR, WS_WMEM, 8, 0, 4);
      run(DST_K, WS_WMEM, 4, $urandom_range(40), 3);
      run(DST_RR, WS_K, 3, $urandom_range(47), 2);
      run(DST_V, WS_WMEM, 2, $urandom_range(63), 1);
      run(DST_GPPU, WS_WMEM, 6, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
