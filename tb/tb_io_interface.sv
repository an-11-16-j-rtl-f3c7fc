// tb_io_interface: two io_interface instances back to back (A's ring
// transmitter feeds B's ring receiver, A's host transmitter feeds B's host
// receiver). Frames of random beats are sent on both links at once; B must
// deliver every beat in order per link with the header flagged, and a beat
// must take 2*DIV core cycles on the link (128 bits per 32 cycles at DIV=16:
// 800 Mb/s at 200 MHz). A frame may only start while the receiver's rdy is high.
`timescale 1ns/1ps
module tb_io_interface;
  import rdxe_pkg::*;
  localparam int DIV = 16;
  logic clk = 0, rst_n = 0;
  logic [1:0] a_sclk, a_cs, b_rdy, b_rdyin, a_rdyin, dummy_rdy, b_tsclk, b_tcs;
  logic [63:0] a_dat [2];
  logic [63:0] b_tdat [2];
  logic [63:0] zero [2];
  logic a_bv, a_bl, a_bf, b_bv, b_bl, b_bf, t_valid, t_ready, t_link, t_last, b_tr;
  logic [127:0] a_bd, b_bd, t_data;
  logic [127:0] q [2][$];
  int checks = 0, failures = 0, first_t [2], last_t [2], nb [2];
  always #5 clk = ~clk;
  assign zero[0] = '0; assign zero[1] = '0;
  io_interface #(.DIV(DIV)) ua (.clk, .rst_n, .rx_sclk(2'b00), .rx_cs_n(2'b11), .rx_dat(zero), .rx_rdy(dummy_rdy),
    .tx_sclk(a_sclk), .tx_cs_n(a_cs), .tx_dat(a_dat), .tx_rdy(b_rdy), .rdy_in(a_rdyin),
    .b_valid(a_bv), .b_link(a_bl), .b_first(a_bf), .b_data(a_bd),
    .t_valid, .t_ready, .t_link, .t_last, .t_data);
  io_interface #(.DIV(DIV)) ub (.clk, .rst_n, .rx_sclk(a_sclk), .rx_cs_n(a_cs), .rx_dat(a_dat), .rx_rdy(b_rdy),
    .tx_sclk(b_tsclk), .tx_cs_n(b_tcs), .tx_dat(b_tdat), .tx_rdy(2'b11), .rdy_in(b_rdyin),
    .b_valid(b_bv), .b_link(b_bl), .b_first(b_bf), .b_data(b_bd),
    .t_valid(1'b0), .t_ready(b_tr), .t_link(1'b0), .t_last(1'b0), .t_data('0));
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (b_bv) begin
      checks++;
      if (q[b_bl].size() == 0 || b_bd != q[b_bl][0] || b_bf != (nb[b_bl] == 0)) begin
        failures++; $display("FAIL link %0d beat %0d", b_bl, nb[b_bl]);
      end
      if (q[b_bl].size() > 0) void'(q[b_bl].pop_front());
      if (nb[b_bl] == 0) first_t[b_bl] = cyc;
      last_t[b_bl] = cyc;
      nb[b_bl]++;
    end
  end
  initial begin
    a_rdyin = 0; b_rdyin = 2'b00; t_valid = 0; t_link = 0; t_last = 0; t_data = 0;
    nb[0] = 0; nb[1] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (100) @(negedge clk);
    checks++; if (!a_cs[0] || !a_cs[1]) begin failures++; $display("FAIL: frame without rdy"); end
    b_rdyin = 2'b11;
    for (int f = 0; f < 4; f++) begin
      int n; n = $urandom_range(12, 3);
      nb[f % 2] = 0;
      for (int k = 0; k < n; k++) begin
        t_valid = 1; t_link = 1'(f % 2); t_last = (k == n - 1);
        t_data = {$urandom, $urandom, $urandom, $urandom};
        q[f % 2].push_back(t_data);
        do @(negedge clk); while (!t_ready);
      end
      t_valid = 0;
      while (q[f % 2].size() > 0) @(negedge clk);
      checks++;
      if ((last_t[f % 2] - first_t[f % 2]) != (n - 1) * 2 * DIV) begin
        failures++; $display("FAIL: %0d beats took %0d cycles", n, last_t[f % 2] - first_t[f % 2]);
      end
      repeat (3 * DIV) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
