// io_rx: receiver of one 16-channel quad-SPI link (helper of io_interface).
// A link has one clock (sclk), one frame select (cs_n, low during a frame),
// 16 channels of 4 data lines and a flow-control line back to the sender
// (rdy, driven by the DXE). sclk, cs_n and data are brought into the core
// clock domain through two flip-flops; data are sampled on each rising edge
// of the synchronised sclk. Channel c carries byte c of a 128-bit beat, high
// nibble first, so a beat takes two link clocks. A finished beat waits in the
// output register until it is taken (out_valid/out_ready); at 16 core clocks
// per link clock a beat arrives every 32 cycles, so one register suffices.
// The 16 channels of 4 lines follow the source design; the framing, the
// nibble order and the shared clock/select are this design's.
module io_rx
  import rdxe_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sclk,
  input  logic              cs_n,
  input  logic [63:0]       dat,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [ACT_W-1:0]  out_data,
  output logic              out_first     // first beat of a frame (header)
);
  logic [2:0]        sclk_s;
  logic [1:0]        cs_s;
  logic [63:0]       d_s1, d_s2;
  logic [63:0]       hi;
  logic              phase, first_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0; cs_s <= '1; d_s1 <= '0; d_s2 <= '0; hi <= '0;
      phase <= 1'b0; first_pend <= 1'b1;
      out_valid <= 1'b0; out_data <= '0; out_first <= 1'b0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      cs_s   <= {cs_s[0], cs_n};
      d_s1   <= dat;
      d_s2   <= d_s1;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (cs_s[1]) begin
        phase <= 1'b0; first_pend <= 1'b1;
      end else if (sclk_s[1] && !sclk_s[2]) begin
        if (!phase) hi <= d_s2;
        else begin
          for (int c = 0; c < 16; c++)
            out_data[c*8 +: 8] <= {hi[c*4 +: 4], d_s2[c*4 +: 4]};
          out_valid  <= 1'b1;
          out_first  <= first_pend;
          first_pend <= 1'b0;
        end
        phase <= !phase;
      end
    end
  end

  overrun_a: assert property (@(posedge clk) disable iff (!rst_n)
    !(out_valid && !out_ready && !cs_s[1] && sclk_s[1] && !sclk_s[2] && phase))
    else $error("io_rx: beat overrun");
endmodule
