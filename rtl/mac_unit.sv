// mac_unit: the multiply-and-accumulate unit of a VAC.
// N_MUL signed INT8 x INT8 products are summed by an adder tree and added to
// an accumulator; a row of a dot product arrives as consecutive beats, the
// first beat (beat index 0) restarts the accumulator and the beat flagged
// last emits the finished sum one cycle later on res_*. The multiplier count,
// adder tree and accumulator follow the source design; the 32-bit accumulator
// and the registered output are this implementation's choices.
// Timing: one beat per enabled cycle; 'en' low freezes the unit (stall).
module mac_unit
  import rdxe_pkg::*;
#(
  parameter int NM = N_MUL
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic                  in_valid,
  input  logic                  in_first,
  input  logic                  in_last,
  input  logic [7:0]            in_row,
  input  logic [NM*8-1:0]       act,
  input  logic [NM*8-1:0]       wgt,
  output logic                  res_valid,
  output logic [7:0]            res_row,
  output logic signed [ACC_W-1:0] res
);
  logic signed [ACC_W-1:0] acc_q;
  logic signed [ACC_W-1:0] tree_sum;

  // Adder tree over the products (sized by the tool; written as a reduction).
  always_comb begin
    tree_sum = '0;
    for (int i = 0; i < NM; i++)
      tree_sum += ACC_W'($signed(act[i*8 +: 8]) * $signed(wgt[i*8 +: 8]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      res_valid <= 1'b0;
      res_row   <= '0;
      res       <= '0;
    end else if (en) begin
      res_valid <= 1'b0;
      if (in_valid) begin
        if (in_last) begin
          res_valid <= 1'b1;
          res_row   <= in_row;
          res       <= (in_first ? '0 : acc_q) + tree_sum;
        end
        acc_q <= (in_first ? '0 : acc_q) + tree_sum;
      end
    end
  end
endmodule
