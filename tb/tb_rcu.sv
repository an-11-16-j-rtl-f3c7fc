// tb_rcu: results pushed before the RC factor is valid must wait, then come
// out in order as floor(acc * rc / 2^24); with RC disabled they pass as is.
`timescale 1ns/1ps
module tb_rcu;
  import rdxe_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, rc_en, rc_valid, iv, ov, ordy;
  logic [24:0] rc; logic [7:0] irow, orow; logic signed [31:0] idat; logic signed [39:0] odat;
  logic [3:0] level;
  int checks = 0, failures = 0;
  longint q [$];
  always #5 clk = ~clk;
  rcu dut (.clk, .rst_n, .clr, .rc_en, .rc_valid, .rc, .in_valid(iv), .in_row(irow), .in_data(idat),
           .out_valid(ov), .out_ready(ordy), .out_row(orow), .out_data(odat), .level);
  initial begin
    rc_en = 1; rc_valid = 0; rc = 0; iv = 0; ordy = 1; irow = 0; idat = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int m = 0; m < 2; m++) begin
      rc_en = (m == 0); rc_valid = 0; ordy = 0; rc = 25'($urandom);
      clr = 1; @(negedge clk); clr = 0;
      for (int k = 0; k < 5; k++) begin
        iv = 1; idat = $signed($urandom) >>> $urandom_range(20); irow = 8'(k);
        q.push_back(rc_en ? ((longint'(idat) * longint'(rc)) >>> 24) : longint'(idat));
        @(negedge clk);
        iv = 0;
        checks++;
        if (rc_en && ov) begin failures++; $display("FAIL: output before RC valid"); end
      end
      rc_valid = 1; ordy = 1; #1;
      while (q.size() > 0) begin
        if (ov) begin
          checks++;
          if (odat != 40'(q[0])) begin failures++; $display("FAIL: got %0d exp %0d", odat, q[0]); end
          void'(q.pop_front());
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
