// tb_wmem: random writes, then reads checked one cycle later; rdata must
// hold while re is low.
`timescale 1ns/1ps
module tb_wmem;
  logic clk = 0, we, re; logic [9:0] wa, ra; logic [127:0] wd, rd;
  logic [127:0] model [1024];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  wmem dut (.clk, .we, .waddr(wa), .wdata(wd), .re, .raddr(ra), .rdata(rd));
  initial begin
    we = 0; re = 0; wa = 0; ra = 0; wd = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); we = 1; wa = 10'(i); wd = {$urandom, $urandom, $urandom, $urandom}; model[i] = wd;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 300; i++) begin
      logic [127:0] e;
      re = 1; ra = 10'($urandom); e = model[ra];
      @(negedge clk); re = 0; ra = ra + 1;
      checks++; if (rd !== e) begin failures++; $display("FAIL read"); end
      @(negedge clk);
      checks++; if (rd !== e) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
