// tb_vector_engine: (1) RMS: random INT8 vectors of 16..1024 elements; the
// factor must match 2^24/sqrt(mean(x^2)) (mean truncated to an integer) to
// 2^-12 relative, within 8 cycles of the end of the pass. (2) Softmax: score
// writes set the maximum; the exp lanes must match p = round-free
// 127*2^(-(smax-s)*23/256) with positions beyond pos masked, and the factor
// must equal floor(2^24 / sum p). (3) GELU lanes against x(x+3)/6.
`timescale 1ns/1ps
module tb_vector_engine;
  import rdxe_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, iv = 0, fpd = 0, twe = 0, tclr = 0;
  rc_e mode; logic [4:0] nl; logic [15:0] pos; logic [7:0] beat; logic [127:0] din, ed, gd;
  logic [3:0] tbe; logic [31:0] tdat; logic signed [7:0] smax; logic rcv; logic [24:0] rc;
  int checks = 0, failures = 0;
  localparam int LUT [16] = '{256, 245, 235, 225, 215, 206, 197, 189, 181, 173, 166, 159, 152, 146, 140, 134};
  always #5 clk = ~clk;
  vector_engine dut (.clk, .rst_n, .clr, .rc_mode(mode), .asrc(AS_TB), .n_log2(nl), .pos, .in_valid(iv),
    .in_beat(beat), .in_data(din), .first_pass_done(fpd), .exp_data(ed), .gelu_data(gd),
    .trk_clr(tclr), .trk_we(twe), .trk_be(tbe), .trk_data(tdat), .smax, .rc_valid(rcv), .rc);
  function automatic int expq(int s, int m);
    int d, u, ip;
    d = s - m; if (d > 0) d = 0; u = -d * 23; ip = u >> 8;
    if (ip >= 15) return 0;
    return (127 * LUT[(u >> 4) & 15]) >> (8 + ip);
  endfunction
  initial begin
    mode = RC_NONE; nl = 0; pos = 0; beat = 0; din = 0; tbe = 0; tdat = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // RMS
    for (int n = 0; n < 40; n++) begin
      int nb, amp, waitc; longint ss; real m, er;
      nb = 1 << $urandom_range(6); amp = $urandom_range(127, 1); ss = 0;
      mode = RC_RMS; nl = 5'($clog2(nb * 16));
      clr = 1; @(negedge clk); clr = 0;
      for (int b = 0; b < nb; b++) begin
        for (int l = 0; l < 16; l++) begin
          int x; x = $urandom_range(2 * amp) - amp; if (x > 127) x = 127;
          din[l*8 +: 8] = 8'(x); ss += x * x;
        end
        iv = 1; beat = 8'(b); @(negedge clk); iv = 0;
      end
      fpd = 1; @(negedge clk); fpd = 0;
      waitc = 0;
      while (!rcv && waitc < 20) begin @(negedge clk); waitc++; end
      m = real'(ss >> $clog2(nb * 16));
      checks++;
      if (m == 0) begin
        if (rc != '1) failures++;
      end else begin
        er = (real'(rc) - 16777216.0 / $sqrt(m)) / (16777216.0 / $sqrt(m));
        if (er > 2.5e-4 || er < -2.5e-4 || waitc > 8) begin
          failures++; $display("FAIL rms m=%f rc=%0d exp=%f wait=%0d", m, rc, 16777216.0 / $sqrt(m), waitc);
        end
      end
    end
    // Softmax
    for (int n = 0; n < 20; n++) begin
      int sc [64]; int mx, sum, p, waitc, nb;
      pos = 16'($urandom_range(63)); nb = (pos >> 4) + 1;
      mode = RC_SMAX; clr = 1; tclr = 1; @(negedge clk); clr = 0; tclr = 0;
      mx = -128;
      for (int t = 0; t < 64; t++) sc[t] = $urandom_range(255) - 128;
      for (int t = 0; t <= pos; t++) begin
        twe = 1; tbe = 4'b1 << (t % 4); tdat = 32'(sc[t] & 255) << (8 * (t % 4));
        if (sc[t] > mx) mx = sc[t];
        @(negedge clk);
      end
      twe = 0;
      checks++; if (smax != 8'(mx)) begin failures++; $display("FAIL smax %0d exp %0d", smax, mx); end
      sum = 0;
      for (int b = 0; b < nb; b++) begin
        for (int l = 0; l < 16; l++) din[l*8 +: 8] = 8'(sc[b*16+l]);
        iv = 1; beat = 8'(b); #1;
        for (int l = 0; l < 16; l++) begin
          p = (b*16 + l <= pos) ? expq(sc[b*16+l], mx) : 0; sum += p;
          checks++; if (ed[l*8 +: 8] != 8'(p)) begin failures++; $display("FAIL exp"); end
        end
        @(negedge clk); iv = 0;
      end
      fpd = 1; @(negedge clk); fpd = 0;
      waitc = 0; while (!rcv && waitc < 40) begin @(negedge clk); waitc++; end
      checks++;
      if (rc != 25'((64'd1 << 24) / sum)) begin failures++; $display("FAIL smax rc %0d exp %0d", rc, (64'd1 << 24) / sum); end
    end
    // GELU
    for (int x = -128; x < 128; x++) begin
      int e;
      din[7:0] = 8'(x); #1;
      e = (x >= 48) ? x : (x <= -48) ? 0 : (x * (x + 48)) / 96;
      checks++; if ($signed(gd[7:0]) != e) begin failures++; $display("FAIL gelu %0d", x); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
