// tb_rr_sram: random 32-bit byte-enable writes against a byte model, then
// every 128-bit row read back.
`timescale 1ns/1ps
module tb_rr_sram;
  logic clk = 0, we, re; logic [15:0] wa, ra; logic [3:0] be; logic [31:0] wd; logic [127:0] rd;
  byte model [4096];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  rr_sram dut (.clk, .we, .waddr(wa), .wbe(be), .wdata(wd), .re, .raddr(ra), .rdata(rd));
  initial begin
    we = 0; re = 0; wa = 0; ra = 0; be = 0; wd = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); we = 1; wa = 16'(i * 4); be = 4'hf; wd = $urandom;
      for (int b = 0; b < 4; b++) model[i*4+b] = byte'(wd[b*8 +: 8]);
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk); we = 1; wa = 16'($urandom_range(1023) * 4); be = 4'($urandom); wd = $urandom;
      for (int b = 0; b < 4; b++) if (be[b]) model[wa+b] = byte'(wd[b*8 +: 8]);
    end
    @(negedge clk); we = 0;
    for (int r = 0; r < 256; r++) begin
      re = 1; ra = 16'(r * 16); @(negedge clk);
      for (int b = 0; b < 16; b++) begin
        checks++; if (byte'(rd[b*8 +: 8]) != model[r*16+b]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
