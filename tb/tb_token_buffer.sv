// tb_token_buffer: random slot life cycles against a reference model of the
// slot states (FREE/RX/READY/BUSY/TX), the free count, oldest-first
// selection of ready tokens and the four data ports.
`timescale 1ns/1ps
module tb_token_buffer;
  import rdxe_pkg::*;
  localparam int D_MAX = 256, NSLOT = 3, BPS = D_MAX / 16;
  logic clk = 0, rst_n = 0;
  logic [1:0] n_free, alloc_slot, commit_slot, rdy_slot, to_tx_slot, release_id, rx_slot, bc_slot, gp_slot, tx_slot;
  logic alloc, commit, rdy_valid, take, to_tx, release_slot, rx_we, bc_re, gp_re, gp_we, tx_re;
  hdr_t commit_hdr, rdy_hdr;
  logic [7:0] rx_beat, bc_beat, gp_rbeat, gp_wbeat, tx_beat;
  logic [127:0] rx_data, bc_data, gp_wdata, gp_rdata, tx_data;
  int checks = 0, failures = 0;
  int st [NSLOT];               // 0 free 1 rx 2 ready 3 busy 4 tx
  int order [$];
  logic [127:0] mm [NSLOT][BPS];
  always #5 clk = ~clk;
  token_buffer #(.D_MAX(D_MAX), .NSLOT(NSLOT)) dut (.*);
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic idle();
    alloc = 0; commit = 0; take = 0; to_tx = 0; release_slot = 0; rx_we = 0; bc_re = 0; gp_re = 0; gp_we = 0; tx_re = 0;
  endtask
  initial begin
    idle(); commit_slot = 0; commit_hdr = '0; to_tx_slot = 0; release_id = 0;
    rx_slot = 0; bc_slot = 0; gp_slot = 0; tx_slot = 0; rx_beat = 0; bc_beat = 0; gp_rbeat = 0; gp_wbeat = 0; tx_beat = 0;
    rx_data = 0; gp_wdata = 0;
    for (int s = 0; s < NSLOT; s++) st[s] = 0;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int it = 0; it < 400; it++) begin
      int nf, op, s, eb; int exp_rdy;
      nf = 0; for (int k = 0; k < NSLOT; k++) if (st[k] == 0) nf++;
      chk(n_free == 2'(nf), $sformatf("n_free %0d exp %0d", n_free, nf));
      exp_rdy = order.size() > 0 ? order[0] : -1;
      chk(rdy_valid == (exp_rdy >= 0) && (exp_rdy < 0 || rdy_slot == 2'(exp_rdy)), "oldest ready");
      idle();
      op = $urandom_range(4);
      s = $urandom_range(NSLOT - 1);
      case (op)
        0: if (nf > 0) begin
             int fs; fs = -1; for (int k = 0; k < NSLOT; k++) if (st[k] == 0 && fs < 0) fs = k;
             chk(alloc_slot == 2'(fs), "alloc slot");
             alloc = 1; st[fs] = 1;
             // fill the slot with data through the receive port
             @(negedge clk); idle();
             for (int b = 0; b < BPS; b++) begin
               rx_we = 1; rx_slot = 2'(fs); rx_beat = 8'(b); rx_data = {$urandom, $urandom, $urandom, $urandom};
               mm[fs][b] = rx_data; @(negedge clk);
             end
             idle(); commit = 1; commit_slot = 2'(fs); commit_hdr = '0; commit_hdr.req = 8'(fs + 1);
             st[fs] = 2; order.push_back(fs);
           end
        1: if (order.size() > 0) begin
             take = 1; st[order[0]] = 3;
             chk(rdy_hdr.req == 8'(order[0] + 1), "ready header");
             void'(order.pop_front());
           end
        2: if (st[s] == 3) begin
             // residual update through the global PPU port, then broadcast read
             eb = $urandom_range(BPS - 1);
             gp_we = 1; gp_slot = 2'(s); gp_wbeat = 8'(eb); gp_wdata = {$urandom, $urandom, $urandom, $urandom};
             mm[s][eb] = gp_wdata; @(negedge clk); idle();
             bc_re = 1; bc_slot = 2'(s); bc_beat = 8'(eb); gp_re = 1; gp_rbeat = 8'($urandom_range(BPS - 1));
             @(negedge clk); idle();
             chk(bc_data == mm[s][eb], "broadcast read");
             chk(gp_rdata == mm[s][gp_rbeat], "gppu read");
             to_tx = 1; to_tx_slot = 2'(s); st[s] = 4;
           end
        3: if (st[s] == 4) begin
             eb = $urandom_range(BPS - 1);
             tx_re = 1; tx_slot = 2'(s); tx_beat = 8'(eb);
             @(negedge clk); idle();
             chk(tx_data == mm[s][eb], "transmit read");
             release_slot = 1; release_id = 2'(s); st[s] = 0;
           end
        default: ;
      endcase
      @(negedge clk); idle();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
