// io_interface: the DXE's I/O interface.
// Two 16-channel quad-SPI receive links (ring: from the previous DXE;
// host: loads, configuration and new tokens) and two transmit links (ring:
// to the next DXE; host: finished tokens). Received beats from both links
// are merged into one beat stream for the controller, round robin, each
// tagged with its link and with 'first' for a frame header. The transmit
// side sends one frame at a time on the link chosen by tx_link.
// Bandwidth: 64 data lines; with DIV=16 at 200 MHz each line runs at
// 12.5 Mb/s, 800 Mb/s per link as in the source design. The two-link
// arrangement and the merge are this design's.
module io_interface
  import rdxe_pkg::*;
#(
  parameter int DIV = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // links: index 0 ring, 1 host
  input  logic [1:0]        rx_sclk,
  input  logic [1:0]        rx_cs_n,
  input  logic [63:0]       rx_dat [2],
  output logic [1:0]        rx_rdy,
  output logic [1:0]        tx_sclk,
  output logic [1:0]        tx_cs_n,
  output logic [63:0]       tx_dat [2],
  input  logic [1:0]        tx_rdy,
  // to/from the controller
  input  logic [1:0]        rdy_in,
  output logic              b_valid,
  output logic              b_link,
  output logic              b_first,
  output logic [ACT_W-1:0]  b_data,
  input  logic              t_valid,
  output logic              t_ready,
  input  logic              t_link,
  input  logic              t_last,
  input  logic [ACT_W-1:0]  t_data
);
  logic [1:0]       ov, ordy, ofirst;
  logic [ACT_W-1:0] od [2];
  logic             rr;
  logic [1:0]       tr;

  for (genvar l = 0; l < 2; l++) begin : g_link
    io_rx u_rx (.clk, .rst_n, .sclk(rx_sclk[l]), .cs_n(rx_cs_n[l]), .dat(rx_dat[l]),
                .out_valid(ov[l]), .out_ready(ordy[l]), .out_data(od[l]), .out_first(ofirst[l]));
    io_tx #(.DIV(DIV)) u_tx (.clk, .rst_n, .in_valid(t_valid && t_link == l), .in_ready(tr[l]),
                .in_data(t_data), .in_last(t_last), .sclk(tx_sclk[l]), .cs_n(tx_cs_n[l]),
                .dat(tx_dat[l]), .rdy(tx_rdy[l]));
  end
  assign rx_rdy  = rdy_in;
  assign t_ready = tr[t_link];

  always_comb begin
    logic pick;
    pick = (ov[rr]) ? rr : !rr;
    b_valid = ov[pick];
    b_link  = pick;
    b_first = ofirst[pick];
    b_data  = od[pick];
    ordy    = '0;
    ordy[pick] = ov[pick];
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= 1'b0;
    else if (b_valid) rr <= !b_link;
  end
endmodule
