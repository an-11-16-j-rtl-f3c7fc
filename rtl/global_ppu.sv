// global_ppu: the DXE's global post-processing unit.
// Row reduction adder: when every participating tile presents a 32-bit
// partial sum for the same output row (tiles run in lockstep), the sums are
// added and stored (or accumulated) in a partial-sum buffer of D_MAX rows.
// This combines projections whose input is split across tiles (unicast
// mode: attention output projection, FFN down projection).
// Residual/reduction quant: on 'res_start' it walks len beats of 16 rows,
// reads the residual token from the token buffer, and writes back
// x + round(partial >>> shift), saturated to INT8; 'res_done' pulses at the
// end. One row per cycle in, 16 rows per cycle out (two cycles per beat).
// Both functions follow the source design's block names; the buffer, the
// join rule and the formula are this design's.
module global_ppu
  import rdxe_pkg::*;
#(
  parameter int N_DXT = 8,
  parameter int D_MAX = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_DXT-1:0]  mask,
  input  logic              acc,
  input  logic [N_DXT-1:0]  in_valid,
  output logic              in_ready,
  input  logic [15:0]       in_idx [N_DXT],
  input  logic [31:0]       in_data [N_DXT],
  input  logic              res_start,
  input  logic [7:0]        res_len,
  input  logic [4:0]        res_shift,
  output logic              res_done,
  output logic              tb_re,
  output logic              tb_we,
  output logic [7:0]        tb_rbeat,
  output logic [7:0]        tb_wbeat,
  input  logic [ACT_W-1:0]  tb_rdata,
  output logic [ACT_W-1:0]  tb_wdata
);
  localparam int RW = $clog2(D_MAX);
  logic signed [31:0] part [D_MAX];
  logic [15:0]        idx;
  logic signed [31:0] sum;
  logic               fire;

  // join: all participating tiles present the same row
  always_comb begin
    in_ready = (mask != '0);
    idx = '0;
    sum = '0;
    for (int t = 0; t < N_DXT; t++)
      if (mask[t]) begin
        if (!in_valid[t]) in_ready = 1'b0;
        idx = in_idx[t];
        sum = sum + $signed(in_data[t]);
      end
  end
  assign fire = in_ready;

  typedef enum logic [1:0] {R_IDLE, R_READ, R_WRITE} rst_e;
  rst_e       rs;
  logic [7:0] beat;

  assign tb_re    = (rs == R_READ);
  assign tb_rbeat = beat;
  assign tb_wbeat = beat;
  assign tb_we    = (rs == R_WRITE);
  always_comb
    for (int l = 0; l < 16; l++) begin
      logic signed [31:0] p;
      logic signed [39:0] q;
      p = part[RW'(32'(beat) * 16 + l)];
      q = (res_shift == 0) ? 40'(p) : ((40'(p) + (40'sd1 <<< (res_shift - 1))) >>> res_shift);
      tb_wdata[l*8 +: 8] = sat8(40'($signed(tb_rdata[l*8 +: 8])) + q);
    end

  always_ff @(posedge clk) begin
    if (fire) part[idx[RW-1:0]] <= (acc ? part[idx[RW-1:0]] : 32'sd0) + sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs <= R_IDLE; beat <= '0; res_done <= 1'b0;
    end else begin
      res_done <= 1'b0;
      unique case (rs)
        R_IDLE:  if (res_start) begin beat <= '0; rs <= R_READ; end
        R_READ:  rs <= R_WRITE;
        default: begin
          if (beat == res_len - 8'd1) begin
            rs <= R_IDLE; res_done <= 1'b1;
          end else begin
            beat <= beat + 8'd1; rs <= R_READ;
          end
        end
      endcase
    end
  end

  join_a: assert property (@(posedge clk) disable iff (!rst_n)
    fire |-> (mask & in_valid) == mask) else $error("global PPU join mismatch");
endmodule
