// cmlp_combiner: the sum unit that lets the board run a coupled MLP (CMLP):
// two MLPs classify the same input, and their output vectors are added class
// by class before ranking.
//
// A CMLP (several MLPs on one input, outputs summed) is one of the
// hierarchical structures the chip is meant to build. How the sum is done on
// this board is this design's choice. The two members run as root (chip 0)
// and leaf (chip 1) of the normal tree sequence, so they already share the
// input and the pipeline. This unit watches both chips' output streams:
//   * chip 0's outputs are stored by class, in one of two banks chosen by the
//     job tag (bit 0 = input bank), so the next pattern's root cannot
//     overwrite them before the leaf of this pattern is read out;
//   * as chip 1 reads out an output k of bank b, the unit adds the stored
//     chip 0 value of class k in bank b and inserts the sum into its own
//     ranked-list sorter. Chip 1's out_clear also clears this list.
// Because chip 1's stream runs in class order, the summed list is complete
// in the same clock as chip 1's own list, so top_o is valid together with
// chip 1's done. Sums of two activations (0 .. 127 each) need 9 bits. The
// list is read through rd_pos_i (asynchronous) and holds until chip 1's
// next readout begins. The sum unit needs no configuration: the sequencer
// decides per root class whether its result is the leaf class or the sum.
module cmlp_combiner
  import mlp_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // chip 0 output stream
  input  logic                  a_valid_i,
  input  logic [OUT_IDX_W-1:0]  a_idx_i,
  input  logic signed [V_W-1:0] a_val_i,
  input  tag_t                  a_tag_i,
  // chip 1 output stream
  input  logic                  b_clear_i,
  input  logic                  b_valid_i,
  input  logic [OUT_IDX_W-1:0]  b_idx_i,
  input  logic signed [V_W-1:0] b_val_i,
  input  tag_t                  b_tag_i,
  // summed ranked list
  input  logic [OUT_IDX_W-1:0]  rd_pos_i,
  output logic [OUT_IDX_W-1:0]  rd_idx_o,
  output logic signed [V_W:0]   rd_val_o,
  output logic [OUT_IDX_W-1:0]  top_o
);

  logic signed [V_W-1:0] a_mem [2][MAX_OUT];
  logic signed [V_W:0]   sum;

  always_ff @(posedge clk)
    if (a_valid_i) a_mem[a_tag_i[0]][a_idx_i] <= a_val_i;

  assign sum = (V_W+1)'(a_mem[b_tag_i[0]][b_idx_i]) + (V_W+1)'(b_val_i);

  class_sorter #(.N(MAX_OUT), .VW(V_W + 1)) u_sort (
    .clk, .rst_n,
    .clear_i(b_clear_i), .ins_valid_i(b_valid_i), .ins_idx_i(b_idx_i), .ins_val_i(sum),
    .rd_pos_i(rd_pos_i), .rd_idx_o(rd_idx_o), .rd_val_o(rd_val_o),
    .top_o(top_o), .count_o()
  );

endmodule
