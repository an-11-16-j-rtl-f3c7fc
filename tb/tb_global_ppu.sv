// tb_global_ppu: eight tiles present partial rows; the row sum is only taken
// when every tile of the mask presents it, accumulation adds to the earlier
// sum, and the residual step writes sat8(x + round(partial >>> shift)) back
// to a token-buffer model, two cycles per beat.
`timescale 1ns/1ps
module tb_global_ppu;
  import rdxe_pkg::*;
  logic clk = 0, rst_n = 0, acc, irdy, rs, rd, tre, twe;
  logic [7:0] mask, iv, rl, trb, twb; logic [4:0] sh; logic [15:0] ii [8]; logic [31:0] id [8];
  logic [127:0] trd, twd;
  logic [127:0] tbm [64];
  longint part [1024];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  global_ppu dut (.clk, .rst_n, .mask, .acc, .in_valid(iv), .in_ready(irdy), .in_idx(ii), .in_data(id),
    .res_start(rs), .res_len(rl), .res_shift(sh), .res_done(rd), .tb_re(tre), .tb_we(twe), .tb_rbeat(trb),
    .tb_wbeat(twb), .tb_rdata(trd), .tb_wdata(twd));
  always @(posedge clk) begin
    if (tre) trd <= tbm[trb];
    if (twe) tbm[twb] <= twd;
  end
  function automatic int q8(longint v, int sh);
    longint r; r = (sh == 0) ? v : ((v + (64'sd1 <<< (sh - 1))) >>> sh);
    return r > 127 ? 127 : r < -128 ? -128 : int'(r);
  endfunction
  initial begin
    logic [127:0] old [64];
    int cyc0, len;
    iv = 0; acc = 0; mask = 0; rs = 0; rl = 0; sh = 0;
    for (int t = 0; t < 8; t++) begin ii[t] = 0; id[t] = 0; end
    for (int b = 0; b < 64; b++) tbm[b] = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(negedge clk); rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      mask = (pass == 0) ? 8'hff : 8'h0f; acc = (pass == 1);
      for (int i = 0; i < 1024; i++) begin
        longint s; s = 0;
        for (int t = 0; t < 8; t++) begin
          ii[t] = 16'(i); id[t] = $urandom_range(20000) - 10000;
          if (mask[t]) s += $signed(id[t]);
        end
        // tiles arrive one after another; the join waits for the last one
        iv = 0;
        for (int t = 0; t < 8; t++) begin
          iv[t] = mask[t]; #0.5;
          checks++;
          if (irdy != (t >= 7 || (mask >> (t + 1)) == 0)) begin failures++; $display("FAIL: join at tile %0d", t); end
        end
        part[i] = (pass == 1 ? part[i] : 0) + s;
        @(negedge clk);
      end
      iv = 0;
    end
    len = 64; sh = 5'd6;
    for (int b = 0; b < 64; b++) old[b] = tbm[b];
    rs = 1; rl = 8'(len); @(negedge clk); rs = 0; cyc0 = 0;
    while (!rd) begin @(negedge clk); cyc0++; end
    checks++; if (cyc0 != 2 * len) begin failures++; $display("FAIL: residual took %0d cycles", cyc0); end
    @(negedge clk);
    for (int b = 0; b < 64; b++)
      for (int l = 0; l < 16; l++) begin
        int e; longint x;
        x = longint'($signed(old[b][l*8 +: 8]));
        e = q8(x * 64 + longint'(int'(part[b*16+l])), 6);
        checks++; if ($signed(tbm[b][l*8 +: 8]) != e) begin failures++; $display("FAIL res %0d", b*16+l); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
