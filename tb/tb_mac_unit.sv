// tb_mac_unit: random rows of 1-8 beats through the MAC; each finished sum
// is compared with a dot product computed here, and must appear exactly one
// cycle after the row's last beat. Stall cycles (en low) are mixed in.
`timescale 1ns/1ps
module tb_mac_unit;
  import rdxe_pkg::*;
  logic clk = 0, rst_n = 0, en, v, first, last;
  logic [7:0] row;
  logic [127:0] a, w;
  logic rv; logic [7:0] rrow; logic signed [31:0] res;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  mac_unit dut (.clk, .rst_n, .en, .in_valid(v), .in_first(first), .in_last(last), .in_row(row),
                .act(a), .wgt(w), .res_valid(rv), .res_row(rrow), .res);
  initial begin
    en = 1; v = 0; first = 0; last = 0; row = 0; a = 0; w = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      int nb; longint exp_s;
      nb = $urandom_range(8, 1); exp_s = 0;
      for (int b = 0; b < nb; b++) begin
        for (int l = 0; l < 16; l++) begin
          a[l*8 +: 8] = 8'($urandom); w[l*8 +: 8] = 8'($urandom);
          exp_s += $signed(a[l*8 +: 8]) * $signed(w[l*8 +: 8]);
        end
        v = 1; first = (b == 0); last = (b == nb - 1); row = 8'(n);
        @(negedge clk);
        v = 0;
        if ($urandom_range(3) == 0) begin en = 0; repeat ($urandom_range(3, 1)) @(negedge clk); en = 1; end
      end
      // the sum is valid now (registered after the last enabled beat)
      checks++;
      if (!(rv && res == 32'(exp_s) && rrow == 8'(n))) begin
        failures++; $display("FAIL row %0d: got v=%0d %0d exp %0d", n, rv, res, exp_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
