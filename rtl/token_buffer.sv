// token_buffer: the DXE's token buffer (TB).
// Holds up to NSLOT token vectors of D_MAX INT8 elements with their headers.
// A slot cycles FREE -> RX (being received) -> READY -> BUSY (the token's
// layers run; the global PPU overwrites it with each layer's residual output)
// -> TX (being sent on) -> FREE. Ready tokens are taken oldest first.
// Because one slot can be received and one sent while a third is computed,
// the next token's transfer hides behind the current token's computation.
// Ports (all 128-bit beats of 16 elements): a receive write port, a
// broadcast read port shared by all tiles, a residual read/write port for the
// global PPU and a transmit read port. Reads are synchronous and hold while
// their enable is low. The TB, its broadcast to the tiles and the overlap of
// transfer and compute follow the source design; the slot count, the
// states and the port set are this design's.
module token_buffer
  import rdxe_pkg::*;
#(
  parameter int D_MAX = 1024,
  parameter int NSLOT = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  // slot management
  output logic [1:0]        n_free,
  input  logic              alloc,           // take a free slot for reception
  output logic [1:0]        alloc_slot,
  input  logic              commit,          // reception of commit_slot is complete
  input  logic [1:0]        commit_slot,
  input  hdr_t              commit_hdr,
  output logic              rdy_valid,       // oldest ready token
  output logic [1:0]        rdy_slot,
  output hdr_t              rdy_hdr,
  input  logic              take,
  input  logic              to_tx,           // BUSY slot goes to TX
  input  logic [1:0]        to_tx_slot,
  input  logic              release_slot,    // TX slot becomes free
  input  logic [1:0]        release_id,
  // data ports
  input  logic              rx_we,
  input  logic [1:0]        rx_slot,
  input  logic [7:0]        rx_beat,
  input  logic [ACT_W-1:0]  rx_data,
  input  logic              bc_re,
  input  logic [1:0]        bc_slot,
  input  logic [7:0]        bc_beat,
  output logic [ACT_W-1:0]  bc_data,
  input  logic              gp_re,
  input  logic              gp_we,
  input  logic [1:0]        gp_slot,
  input  logic [7:0]        gp_rbeat,
  input  logic [7:0]        gp_wbeat,
  input  logic [ACT_W-1:0]  gp_wdata,
  output logic [ACT_W-1:0]  gp_rdata,
  input  logic              tx_re,
  input  logic [1:0]        tx_slot,
  input  logic [7:0]        tx_beat,
  output logic [ACT_W-1:0]  tx_data
);
  localparam int BPS = D_MAX / 16;       // beats per slot
  localparam int AW  = $clog2(NSLOT * BPS);
  typedef enum logic [2:0] {SL_FREE, SL_RX, SL_READY, SL_BUSY, SL_TX} sl_e;

  logic [ACT_W-1:0] mem [NSLOT * BPS];
  sl_e              st   [NSLOT];
  hdr_t             hdr  [NSLOT];
  logic [15:0]      age  [NSLOT];
  logic [15:0]      stamp;

  function automatic logic [AW-1:0] ra(input logic [1:0] s, input logic [7:0] b);
    return AW'(32'(s) * BPS + 32'(b));
  endfunction

  always_comb begin
    n_free = '0;
    alloc_slot = '0;
    for (int s = NSLOT - 1; s >= 0; s--)
      if (st[s] == SL_FREE) begin
        n_free = n_free + 2'd1;
        alloc_slot = 2'(s);
      end
    rdy_valid = 1'b0;
    rdy_slot  = '0;
    for (int s = 0; s < NSLOT; s++)
      if (st[s] == SL_READY && (!rdy_valid || age[s] < age[rdy_slot])) begin
        rdy_valid = 1'b1;
        rdy_slot  = 2'(s);
      end
    rdy_hdr = hdr[rdy_slot];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSLOT; s++) begin
        st[s] <= SL_FREE; hdr[s] <= '0; age[s] <= '0;
      end
      stamp <= '0;
    end else begin
      if (alloc && n_free != 0) st[alloc_slot] <= SL_RX;
      if (commit) begin
        st[commit_slot]  <= SL_READY;
        hdr[commit_slot] <= commit_hdr;
        age[commit_slot] <= stamp;
        stamp <= stamp + 16'd1;
      end
      if (take && rdy_valid) st[rdy_slot] <= SL_BUSY;
      if (to_tx) st[to_tx_slot] <= SL_TX;
      if (release_slot) st[release_id] <= SL_FREE;
    end
  end

  always_ff @(posedge clk) begin
    if (rx_we) mem[ra(rx_slot, rx_beat)] <= rx_data;
    if (gp_we) mem[ra(gp_slot, gp_wbeat)] <= gp_wdata;
    if (bc_re) bc_data  <= mem[ra(bc_slot, bc_beat)];
    if (gp_re) gp_rdata <= mem[ra(gp_slot, gp_rbeat)];
    if (tx_re) tx_data  <= mem[ra(tx_slot, tx_beat)];
  end

  alloc_a: assert property (@(posedge clk) disable iff (!rst_n) alloc |-> n_free != 0)
    else $error("token buffer: allocation with no free slot");
endmodule
