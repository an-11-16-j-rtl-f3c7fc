// io_tx: transmitter of one 16-channel quad-SPI link (helper of io_interface).
// Takes 128-bit beats (valid/ready, 'last' marks the end of a frame) and
// shifts each out as two link clocks of 64 bits: channel c sends byte c,
// high nibble first. sclk is the core clock divided by DIV (low half first);
// data change while sclk is low. A frame starts only when the receiver's
// rdy line is high; cs_n stays low from the first beat to the last.
// The link width follows the source design (16 channels x 4 lines, one
// token moved while the previous one is computed); DIV, the frame rule and
// the flow-control line are this design's.
module io_tx
  import rdxe_pkg::*;
#(
  parameter int DIV = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [ACT_W-1:0]  in_data,
  input  logic              in_last,
  output logic              sclk,
  output logic              cs_n,
  output logic [63:0]       dat,
  input  logic              rdy
);
  typedef enum logic [1:0] {X_IDLE, X_SHIFT, X_GAP} xst_e;
  xst_e             st;
  logic [ACT_W-1:0] sh;
  logic             lastq, ph;
  logic [$clog2(DIV)-1:0] cnt;
  logic             in_frame;

  // the next beat of a frame is taken in the last cycle of the current one,
  // so a frame streams without gaps: one beat per 2*DIV core clocks
  assign in_ready = ((st == X_IDLE) && (in_frame || rdy)) ||
                    ((st == X_SHIFT) && ph && !lastq && cnt == $clog2(DIV)'(DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= X_IDLE; sh <= '0; lastq <= 1'b0; ph <= 1'b0; cnt <= '0;
      sclk <= 1'b0; cs_n <= 1'b1; dat <= '0; in_frame <= 1'b0;
    end else begin
      unique case (st)
        X_IDLE: if (in_valid && in_ready) begin
          sh <= in_data; lastq <= in_last; ph <= 1'b0; cnt <= '0;
          cs_n <= 1'b0; in_frame <= 1'b1; st <= X_SHIFT;
          for (int c = 0; c < 16; c++) dat[c*4 +: 4] <= in_data[c*8 + 4 +: 4];
        end
        X_SHIFT: begin
          cnt <= cnt + 1'b1;
          if (cnt == $clog2(DIV)'(DIV / 2 - 1)) sclk <= 1'b1;
          if (cnt == $clog2(DIV)'(DIV - 1)) begin
            sclk <= 1'b0;
            if (!ph) begin
              ph <= 1'b1;
              for (int c = 0; c < 16; c++) dat[c*4 +: 4] <= sh[c*8 +: 4];
            end else if (in_valid && !lastq) begin
              sh <= in_data; lastq <= in_last; ph <= 1'b0; cnt <= '0;
              for (int c = 0; c < 16; c++) dat[c*4 +: 4] <= in_data[c*8 + 4 +: 4];
            end else begin
              st <= X_GAP;
            end
          end
        end
        default: begin
          // hold cs_n one more link clock after the last beat of a frame
          cnt <= cnt + 1'b1;
          if (!lastq) st <= X_IDLE;
          else if (cnt == $clog2(DIV)'(DIV - 1)) begin
            cs_n <= 1'b1; in_frame <= 1'b0; st <= X_IDLE;
          end
        end
      endcase
    end
  end
endmodule
