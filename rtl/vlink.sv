// vlink: vertical link of one tile for grouped-query attention (GQA).
// Tiles are chained top to bottom. A tile that leads its KV group (tile index
// a multiple of the group size 2**gqa_log2) hands its own KV-cache read data
// to its VACs and down the chain; a follower hands on what arrives from the
// tile above. All tiles of a group run the same operation in lockstep, so a
// follower's VACs receive the leader's K or V words in the very cycle they
// need them, and only the leader has to store the group's keys and values.
// Combinational; one 128-bit word per VAC. The chaining follows the source
// design; the leader rule and the combinational pass-through are this
// design's choices.
module vlink
  import rdxe_pkg::*;
#(
  parameter int TIDX = 0,
  parameter int N    = 16
) (
  input  logic [1:0]       gqa_log2,
  input  logic [ACT_W-1:0] own [N],
  input  logic [ACT_W-1:0] from_above [N],
  output logic [ACT_W-1:0] to_vacs [N],
  output logic [ACT_W-1:0] to_below [N]
);
  logic leader;
  assign leader = ((TIDX & ((1 << gqa_log2) - 1)) == 0);
  always_comb
    for (int v = 0; v < N; v++) begin
      to_vacs[v]  = leader ? own[v] : from_above[v];
      to_below[v] = to_vacs[v];
    end
endmodule
