// vector_engine: the tile's vector engine (VE) for vector recompute (VRC).
// It works beside the MACs instead of in front of them:
//  * RMSNorm: while the first pass of the activation stream goes to the VACs,
//    the VE sums x^2; then m = sum >> log2(n) and 1/sqrt(m) is found with five
//    Newton-Raphson steps y <- y*(3 - m*y^2)/2 (start 2^-ceil(msb(m)/2)).
//  * Softmax: while the scores are written to the rr-SRAM (Q x K write back)
//    the VE keeps their maximum; during P x V it turns scores s into
//    p = 127 * 2^(-(smax-s)*23/256) (an exp with scores in Q4 fixed point,
//    a 16-entry 2^-f table and a shift), masks positions beyond the token,
//    and sums p; then 1/sum is found by a 25-step restoring division.
//  * GELU: a per-lane approximation y = x(x+3)/6 on (-3,3), x above, 0 below
//    (x in Q4 fixed point), used on the activation path of the FFN.
// The factor (rc, unsigned Q1.24 in 25 bits) is held with rc_valid until the
// next operation starts. What the VE computes (1/RMS by Newton-Raphson,
// max, exp, 1/sum(exp), GELU) follows the source design; the fixed-point
// formats, the exp and GELU approximations and the integer datapath (the
// source uses BF16 in the VE) are this implementation's choices.
// Timing: stats accumulate on in_valid beats; rc_valid rises 6 cycles (RMS)
// or 26 cycles (Softmax) after first_pass_done.
module vector_engine
  import rdxe_pkg::*;
#(
  parameter int LANES = N_MUL
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr,
  input  rc_e                rc_mode,
  input  asrc_e              asrc,
  input  logic [4:0]         n_log2,       // log2 of the element count (RMS)
  input  logic [15:0]        pos,
  // activation stream tap (first pass only)
  input  logic               in_valid,
  input  logic [7:0]         in_beat,
  input  logic [LANES*8-1:0] in_data,      // raw source data
  input  logic               first_pass_done,
  // lane transforms for the source mux
  output logic [LANES*8-1:0] exp_data,
  output logic [LANES*8-1:0] gelu_data,
  // score write-back tap for the running maximum
  input  logic               trk_clr,
  input  logic               trk_we,
  input  logic [3:0]         trk_be,
  input  logic [31:0]        trk_data,
  output logic signed [7:0]  smax,
  // recompute factor
  output logic               rc_valid,
  output logic [RC_W-1:0]    rc
);
  localparam logic [8:0] EXP2_LUT [16] = '{9'd256, 9'd245, 9'd235, 9'd225, 9'd215, 9'd206, 9'd197, 9'd189,
                                           9'd181, 9'd173, 9'd166, 9'd159, 9'd152, 9'd146, 9'd140, 9'd134};

  // ---------------- lane transforms ----------------
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic signed [7:0]  x;
      logic signed [9:0]  d;
      logic [13:0]        u;
      logic [15:0]        p;
      logic signed [15:0] g;
      x = $signed(in_data[l*8 +: 8]);
      // exp path
      d = 10'(x) - 10'(smax);
      if (d > 0) d = '0;
      u = 14'(-d) * 14'd23;
      p = (16'd127 * 16'(EXP2_LUT[u[7:4]])) >> (5'd8 + 5'(u[13:8]));
      if (u[13:8] >= 6'd15 || (16'(in_beat) * 16 + 16'(l)) > pos) p = '0;
      exp_data[l*8 +: 8] = p[7:0];
      // GELU path
      if (x >= 8'sd48)       g = 16'(x);
      else if (x <= -8'sd48) g = '0;
      else                   g = (16'(x) * (16'(x) + 16'sd48)) / 16'sd96;
      gelu_data[l*8 +: 8] = g[7:0];
    end
  end

  // ---------------- first-pass statistics ----------------
  logic [31:0] sumsq, sump;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sumsq <= '0; sump <= '0;
    end else if (clr) begin
      sumsq <= '0; sump <= '0;
    end else if (in_valid) begin
      logic [31:0] s2, s1;
      s2 = sumsq; s1 = sump;
      for (int l = 0; l < LANES; l++) begin
        s2 += 32'($signed(in_data[l*8 +: 8]) * $signed(in_data[l*8 +: 8]));
        s1 += 32'(exp_data[l*8 +: 8]);
      end
      sumsq <= s2; sump <= s1;
    end
  end

  // ---------------- running maximum of written scores ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) smax <= -8'sd128;
    else if (trk_clr) smax <= -8'sd128;
    else if (trk_we) begin
      logic signed [7:0] m;
      m = smax;
      for (int b = 0; b < 4; b++)
        if (trk_be[b] && $signed(trk_data[b*8 +: 8]) > m) m = $signed(trk_data[b*8 +: 8]);
      smax <= m;
    end
  end

  // ---------------- RC factor ----------------
  typedef enum logic [1:0] {S_IDLE, S_NR, S_DIV, S_DONE} st_e;
  st_e         st;
  logic [4:0]  cnt;
  logic [31:0] m_q;
  logic [26:0] y;          // Newton-Raphson estimate, Q24
  logic [31:0] rem;        // divider remainder
  logic [RC_W-1:0] quo;

  function automatic logic [4:0] msb32(input logic [31:0] v);
    logic [4:0] k;
    k = '0;
    for (int i = 0; i < 32; i++) if (v[i]) k = 5'(i);
    return k;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cnt <= '0; m_q <= '0; y <= '0; rem <= '0; quo <= '0;
      rc <= '0; rc_valid <= 1'b0;
    end else if (clr) begin
      st <= S_IDLE; rc_valid <= 1'b0;
    end else begin
      unique case (st)
        S_IDLE: if (first_pass_done && rc_mode != RC_NONE) begin
          if (rc_mode == RC_RMS) begin
            logic [31:0] m;
            m = sumsq >> n_log2;
            m_q <= m;
            if (m == 0) begin
              rc <= '1; rc_valid <= 1'b1; st <= S_DONE;
            end else begin
              y   <= 27'(1 << 24) >> ((msb32(m) + 5'd1) >> 1);
              cnt <= 5'd5; st <= S_NR;
            end
          end else begin
            if (sump == 0) begin
              rc <= '1; rc_valid <= 1'b1; st <= S_DONE;
            end else begin
              rem <= '0; quo <= '0; cnt <= 5'(RC_W); st <= S_DIV;
            end
          end
        end
        S_NR: begin
          logic [53:0] yy;
          logic [63:0] t2;
          logic [27:0] t3;
          logic [54:0] yn;
          yy = 54'(y) * 54'(y);                  // Q48
          t2 = 64'(m_q) * 64'(yy >> 24);         // Q24
          t3 = (t2 >= 64'(3 << 24)) ? '0 : 28'((64'(3) << 24) - t2);
          yn = (55'(y) * 55'(t3)) >> 25;
          y  <= 27'(yn);
          cnt <= cnt - 5'd1;
          if (cnt == 5'd1) begin
            rc <= (yn > 55'((1 << RC_W) - 1)) ? '1 : RC_W'(yn);
            rc_valid <= 1'b1;
            st <= S_DONE;
          end
        end
        S_DIV: begin
          // dividend 2^24, quotient bit by bit from bit 24 down
          logic [32:0] r2;
          r2 = {rem, (cnt == 5'd25)};   // dividend has a single one at bit 24
          if (r2 >= 33'(sump)) begin
            rem <= 32'(r2 - 33'(sump));
            quo <= {quo[RC_W-2:0], 1'b1};
          end else begin
            rem <= r2[31:0];
            quo <= {quo[RC_W-2:0], 1'b0};
          end
          cnt <= cnt - 5'd1;
          if (cnt == 5'd1) st <= S_DONE;
        end
        default: begin
          if (!rc_valid && rc_mode == RC_SMAX) begin
            rc <= quo; rc_valid <= 1'b1;
          end
        end
      endcase
    end
  end
endmodule
