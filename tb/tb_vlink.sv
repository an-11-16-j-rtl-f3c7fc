// tb_vlink: a chain of eight tile links; with group size 1, 2, 4 and 8 each
// tile must receive the KV data of its group leader.
`timescale 1ns/1ps
module tb_vlink;
  import rdxe_pkg::*;
  logic [1:0] g;
  logic [127:0] own [8][16];
  logic [127:0] ch [9][16];
  logic [127:0] use_ [8][16];
  int checks = 0, failures = 0;
  for (genvar v = 0; v < 16; v++) begin : g0
    assign ch[0][v] = '0;
  end
  for (genvar t = 0; t < 8; t++) begin : g_t
    logic [127:0] o [16];
    logic [127:0] a [16];
    logic [127:0] b [16];
    logic [127:0] u [16];
    for (genvar v = 0; v < 16; v++) begin : g_v
      assign o[v] = own[t][v];
      assign a[v] = ch[t][v];
      assign ch[t+1][v] = b[v];
      assign use_[t][v] = u[v];
    end
    vlink #(.TIDX(t)) dut (.gqa_log2(g), .own(o), .from_above(a), .to_vacs(u), .to_below(b));
  end
  initial begin
    for (int t = 0; t < 8; t++) for (int v = 0; v < 16; v++) own[t][v] = {$urandom, $urandom, $urandom, $urandom};
    for (int k = 0; k < 4; k++) begin
      g = 2'(k); #1;
      for (int t = 0; t < 8; t++) for (int v = 0; v < 16; v++) begin
        checks++;
        if (use_[t][v] !== own[t & ~((1 << k) - 1)][v]) begin failures++; $display("FAIL g=%0d t=%0d", k, t); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
