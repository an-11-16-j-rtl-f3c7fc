// tb_act_reuse_buffer: fill 64 beats, replay them three times in order, then
// read each word in the same cycle it is rewritten (write-through).
`timescale 1ns/1ps
module tb_act_reuse_buffer;
  logic clk = 0, we, re; logic [5:0] wa, ra; logic [127:0] wd, rd;
  logic [127:0] model [64];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  act_reuse_buffer dut (.clk, .we, .waddr(wa), .wdata(wd), .re, .raddr(ra), .rdata(rd));
  initial begin
    we = 0; re = 0; wa = 0; ra = 0; wd = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); we = 1; wa = 6'(i); wd = {$urandom, $urandom, $urandom, $urandom}; model[i] = wd;
    end
    @(negedge clk); we = 0;
    for (int p = 0; p < 3; p++)
      for (int i = 0; i < 64; i++) begin
        re = 1; ra = 6'(i); @(negedge clk);
        checks++; if (rd !== model[i]) begin failures++; $display("FAIL beat %0d", i); end
      end
    for (int i = 0; i < 64; i++) begin
      we = 1; wa = 6'(i); wd = {$urandom, $urandom, $urandom, $urandom}; model[i] = wd;
      re = 1; ra = 6'(i); @(negedge clk);
      checks++; if (rd !== model[i]) begin failures++; $display("FAIL write-through %0d", i); end
    end
    we = 0; re = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
