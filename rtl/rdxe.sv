// rdxe: the ring of decoder execution engines (top level).
// N_DXE chips are connected in a ring by their ring links: DXE i sends to
// DXE (i+1) mod N_DXE. Every chip also has its own host link, used to load
// weights, instructions and configuration; the host injects new tokens into
// DXE 0 and receives finished tokens from the chip configured to close the
// last pass. Each chip holds the weights of one or more layers and keeps
// them; tokens of many requests circulate, one per chip at a time, so
// requests of different lengths join and leave the pipeline freely, and a
// token may travel the ring several times to reuse the same weights (layer
// sharing). Four chips is the arrangement the source design draws; the ring
// links, host links and pass counting are this design's realisation.
// Ports: per chip one host link in each direction (sclk, cs_n, 16x4 data
// lines, rdy) and one event vector.
module rdxe
  import rdxe_pkg::*;
#(
  parameter int N_DXE    = 4,
  parameter int N_DXT    = 8,
  parameter int N_VAC    = 16,
  parameter int W_DEPTH  = 1024,
  parameter int KV_DEPTH = 1024,
  parameter int CTX_MAX  = 1024,
  parameter int D_MAX    = 1024,
  parameter int SPI_DIV  = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [N_DXE-1:0] host_rx_sclk,
  input  logic [N_DXE-1:0] host_rx_cs_n,
  input  logic [63:0]      host_rx_dat [N_DXE],
  output logic [N_DXE-1:0] host_rx_rdy,
  output logic [N_DXE-1:0] host_tx_sclk,
  output logic [N_DXE-1:0] host_tx_cs_n,
  output logic [63:0]      host_tx_dat [N_DXE],
  input  logic [N_DXE-1:0] host_tx_rdy,
  output evt_t             evt [N_DXE]
);
  logic [N_DXE-1:0] r_sclk, r_cs_n, r_rdy;
  logic [63:0]      r_dat [N_DXE];

  for (genvar i = 0; i < N_DXE; i++) begin : g_dxe
    localparam int P = (i + N_DXE - 1) % N_DXE;   // upstream chip
    logic [1:0]  rx_sclk, rx_cs_n, rx_rdy, tx_sclk, tx_cs_n, tx_rdy;
    logic [63:0] rx_dat [2];
    logic [63:0] tx_dat [2];
    assign rx_sclk = {host_rx_sclk[i], r_sclk[P]};
    assign rx_cs_n = {host_rx_cs_n[i], r_cs_n[P]};
    assign rx_dat[0] = r_dat[P];
    assign rx_dat[1] = host_rx_dat[i];
    assign host_rx_rdy[i] = rx_rdy[1];
    assign tx_rdy = {host_tx_rdy[i], r_rdy[(i + 1) % N_DXE]};
    assign r_sclk[i] = tx_sclk[0];
    assign r_cs_n[i] = tx_cs_n[0];
    assign r_dat[i]  = tx_dat[0];
    assign r_rdy[i]  = rx_rdy[0];
    assign host_tx_sclk[i] = tx_sclk[1];
    assign host_tx_cs_n[i] = tx_cs_n[1];
    assign host_tx_dat[i]  = tx_dat[1];
    dxe #(.N_DXT(N_DXT), .N_VAC(N_VAC), .W_DEPTH(W_DEPTH), .KV_DEPTH(KV_DEPTH),
          .CTX_MAX(CTX_MAX), .D_MAX(D_MAX), .SPI_DIV(SPI_DIV)) u_dxe (
      .clk, .rst_n, .rx_sclk, .rx_cs_n, .rx_dat, .rx_rdy, .tx_sclk, .tx_cs_n, .tx_dat, .tx_rdy,
      .evt(evt[i]));
  end
endmodule
