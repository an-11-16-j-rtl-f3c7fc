// tb_gbus: sixteen requesters post random RR, KV and GPPU writes; every
// request must be delivered exactly once to the right port, at most one per
// cycle, round robin (no requester waits more than 16 grants), and GPPU
// words must wait while the global PPU is not ready.
`timescale 1ns/1ps
module tb_gbus;
  import rdxe_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] rv, rr; gbus_req_t rq [16];
  logic rwe, gpv, gpr, busy; logic [15:0] ra, ka, gi; logic [3:0] rbe, kbe; logic [31:0] rdt, kd, gd; logic [15:0] kwe;
  int checks = 0, failures = 0, sent = 0, got = 0, waitc [16];
  int pend [int];
  always #5 clk = ~clk;
  gbus dut (.clk, .rst_n, .req_valid(rv), .req_ready(rr), .req(rq), .rr_we(rwe), .rr_addr(ra), .rr_be(rbe),
            .rr_data(rdt), .kv_we(kwe), .kv_addr(ka), .kv_be(kbe), .kv_data(kd), .gp_valid(gpv), .gp_ready(gpr),
            .gp_idx(gi), .gp_data(gd), .busy);
  always @(posedge clk) if (rst_n) begin
    int n;
    n = int'(rwe) + $countones(kwe) + int'(gpv && gpr);
    if (n > 1) begin failures++; $display("FAIL: two writes in a cycle"); end
    if (rwe) begin checks++; if (!pend.exists({2'(GB_RR), 4'd0, rdt[25:0]})) failures++; else begin pend.delete({2'(GB_RR), 4'd0, rdt[25:0]}); got++; end end
    for (int v = 0; v < 16; v++) if (kwe[v]) begin
      checks++; if (!pend.exists({2'(GB_KV), 4'(v), kd[25:0]})) failures++; else begin pend.delete({2'(GB_KV), 4'(v), kd[25:0]}); got++; end
    end
    if (gpv && gpr) begin checks++; if (!pend.exists({2'(GB_GPPU), 4'd0, gd[25:0]})) failures++; else begin pend.delete({2'(GB_GPPU), 4'd0, gd[25:0]}); got++; end end
  end
  initial begin
    rv = 0; gpr = 0;
    for (int v = 0; v < 16; v++) rq[v] = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      logic [15:0] fire;
      for (int v = 0; v < 16; v++) begin
        if (!rv[v] && $urandom_range(7) == 0) begin
          gbdst_e d; d = gbdst_e'($urandom_range(2));
          rq[v].dst = d; rq[v].tgt = 4'($urandom); rq[v].addr = 16'($urandom); rq[v].be = 4'($urandom);
          rq[v].data = {6'd0, 10'(c), 4'(v), 12'(sent)};
          pend[{2'(d), (d == GB_KV) ? rq[v].tgt : 4'd0, rq[v].data[25:0]}] = 1;
          rv[v] = 1; sent++; waitc[v] = 0;
        end
      end
      gpr = ($urandom_range(3) != 0);
      #1 fire = rv & rr;
      @(negedge clk);
      // round robin: a waiting requester sees at most 15 other grants
      for (int v = 0; v < 16; v++)
        if (rv[v] && !fire[v] && fire != 0) begin
          waitc[v]++;
          if (waitc[v] > 15) begin failures++; $display("FAIL: starvation of %0d", v); waitc[v] = 0; end
        end
      rv = rv & ~fire;
    end
    gpr = 1;
    while (rv != 0) begin
      logic [15:0] fire;
      #1 fire = rv & rr;
      @(negedge clk); rv = rv & ~fire;
    end
    repeat (5) @(negedge clk);
    checks++; if (got != sent || pend.num() != 0) begin failures++; $display("FAIL: sent %0d got %0d", sent, got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
