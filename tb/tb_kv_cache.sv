// tb_kv_cache: iWuR writes into the KV cache. Keys arrive as 32-bit GBUS
// words with byte enables (row by row), values as local single-byte writes
// (column by column); a local write that collides with a GBUS write must be
// held off. Every 128-bit word is then read back against a byte model.
`timescale 1ns/1ps
module tb_kv_cache;
  logic clk = 0, gwe, lwe, lrdy, ldwe, re;
  logic [15:0] ga, la; logic [3:0] gbe, lbe; logic [31:0] gd, ld; logic [9:0] lda, ra;
  logic [127:0] ldd, rd;
  byte model [16384];
  int checks = 0, failures = 0, held = 0;
  always #5 clk = ~clk;
  kv_cache dut (.clk, .gb_we(gwe), .gb_addr(ga), .gb_be(gbe), .gb_data(gd), .lv_we(lwe), .lv_addr(la),
                .lv_be(lbe), .lv_data(ld), .lv_ready(lrdy), .ld_we(ldwe), .ld_addr(lda), .ld_data(ldd),
                .re, .raddr(ra), .rdata(rd));
  initial begin
    gwe = 0; lwe = 0; ldwe = 0; re = 0; ga = 0; la = 0; gbe = 0; lbe = 0; gd = 0; ld = 0; lda = 0; ldd = 0; ra = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); ldwe = 1; lda = 10'(i); ldd = {$urandom, $urandom, $urandom, $urandom};
      for (int b = 0; b < 16; b++) model[i*16+b] = byte'(ldd[b*8 +: 8]);
    end
    @(negedge clk); ldwe = 0;
    for (int i = 0; i < 3000; i++) begin
      int lb;
      gwe = $urandom_range(1); ga = 16'($urandom_range(4095) * 4); gbe = 4'($urandom); gd = $urandom;
      lb = $urandom_range(16383);
      lwe = $urandom_range(1); la = 16'(lb & ~3); lbe = 4'b1 << (lb & 3); ld = $urandom;
      #1;
      if (lwe && !lrdy) held++;
      if (gwe) begin for (int b = 0; b < 4; b++) if (gbe[b]) model[ga+b] = byte'(gd[b*8 +: 8]); end
      else if (lwe) begin for (int b = 0; b < 4; b++) if (lbe[b]) model[la+b] = byte'(ld[b*8 +: 8]); end
      @(negedge clk);
    end
    gwe = 0; lwe = 0;
    for (int r = 0; r < 1024; r++) begin
      re = 1; ra = 10'(r); @(negedge clk);
      for (int b = 0; b < 16; b++) begin checks++; if (byte'(rd[b*8 +: 8]) != model[r*16+b]) failures++; end
    end
    checks++; if (held == 0) begin failures++; $display("FAIL: no collision seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
