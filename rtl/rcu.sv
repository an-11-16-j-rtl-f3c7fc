// rcu: recompute unit of a VAC (vector recompute, VRC).
// Finished dot products wait in a small FIFO until the tile's vector engine
// has produced the RC factor of the current operation (1/RMS for RMSNorm,
// 1/sum(exp) for Softmax); each is then multiplied by the unsigned Q1.24
// factor, y = (acc * rc) >>> 24. With RC disabled the value passes unchanged.
// The FIFO and the multiply follow the source design; the FIFO depth, the
// Q1.24 format of the 25-bit factor and the floor rounding are this design's.
// Interface: push side from the MAC, pop side valid/ready towards the PPU.
// 'level' lets the tile stall its activation stream before the FIFO fills.
module rcu
  import rdxe_pkg::*;
#(
  parameter int DEPTH = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,        // start of an operation
  input  logic                    rc_en,      // operation uses a factor
  input  logic                    rc_valid,   // factor is ready
  input  logic [RC_W-1:0]         rc,
  input  logic                    in_valid,
  input  logic [7:0]              in_row,
  input  logic signed [ACC_W-1:0] in_data,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [7:0]              out_row,
  output logic signed [39:0]      out_data,
  output logic [$clog2(DEPTH):0]  level
);
  localparam int AW = $clog2(DEPTH);
  logic signed [ACC_W-1:0] mem_d [DEPTH];
  logic [7:0]              mem_r [DEPTH];
  logic [AW-1:0]           wp, rp;
  logic                    pop;
  logic signed [ACC_W+RC_W:0] prod;

  assign out_valid = (level != 0) && (!rc_en || rc_valid);
  assign pop       = out_valid && out_ready;
  assign out_row   = mem_r[rp];
  assign prod      = mem_d[rp] * $signed({1'b0, rc});
  assign out_data  = rc_en ? 40'(prod >>> RC_FRAC) : 40'(mem_d[rp]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; level <= '0;
    end else if (clr) begin
      wp <= '0; rp <= '0; level <= '0;
    end else begin
      if (in_valid) begin
        mem_d[wp] <= in_data;
        mem_r[wp] <= in_row;
        wp <= wp + 1'b1;
      end
      if (pop) rp <= rp + 1'b1;
      level <= level + (in_valid ? 1 : 0) - (pop ? 1 : 0);
    end
  end

  overflow_a: assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && !pop && level == ($clog2(DEPTH)+1)'(DEPTH)))
    else $error("rcu FIFO overflow");
endmodule
