// class_sorter: turns the output neurons of a pattern into the list of
// classes in decreasing order of output value.
//
// The chip reports a ranked list of classes: first the class of the output
// neuron with the highest value, then the second highest, and so on. That
// much is the chip description. How the list is built is this design's
// choice: an insertion sorter, a shift register of MAX_OUT entries, each an
// (index, value) pair. clear_i empties it. Each ins_valid_i clock inserts one
// neuron in a single clock. The new entry goes before the first entry with a
// lower value (or the first empty one), and everything from there on moves
// down one place. The outputs arrive in index order, so of two equal values
// the lower index stays first. The list can be read at any time through
// rd_pos_i (asynchronous read). top_o is entry 0, and count_o is the number
// of entries held. VW sets the value width: the chip ranks 8-bit neuron
// outputs, the board's coupled-MLP sum unit ranks 9-bit sums.
module class_sorter
  import mlp_pkg::*;
#(
  parameter int unsigned N  = MAX_OUT,
  parameter int unsigned VW = V_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear_i,
  input  logic                    ins_valid_i,
  input  logic [OUT_IDX_W-1:0]    ins_idx_i,
  input  logic signed [VW-1:0]    ins_val_i,
  input  logic [$clog2(N)-1:0]    rd_pos_i,
  output logic [OUT_IDX_W-1:0]    rd_idx_o,
  output logic signed [VW-1:0]    rd_val_o,
  output logic [OUT_IDX_W-1:0]    top_o,
  output logic [$clog2(N):0]      count_o
);

  typedef struct packed {
    logic                  valid;
    logic [OUT_IDX_W-1:0]  idx;
    logic signed [VW-1:0]  val;
  } entry_t;

  entry_t list_q [N];
  logic   [N-1:0] goes_before;   // new entry sorts at or before position p
  logic   [N-1:0] before_prev;   // goes_before of position p-1

  always_comb begin
    for (int p = 0; p < N; p++)
      goes_before[p] = !list_q[p].valid || (ins_val_i > list_q[p].val);
    before_prev = {goes_before[N-2:0], 1'b0};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N; p++) list_q[p] <= '0;
      count_o <= '0;
    end else if (clear_i) begin
      for (int p = 0; p < N; p++) list_q[p].valid <= 1'b0;
      count_o <= '0;
    end else if (ins_valid_i) begin
      // entries are kept valid-first and sorted, so goes_before is a
      // thermometer code: 0 up to the insert point, 1 from it on
      for (int p = 0; p < N; p++) begin
        if (goes_before[p]) begin
          if (!before_prev[p])
            list_q[p] <= '{valid: 1'b1, idx: ins_idx_i, val: ins_val_i};
          else
            list_q[p] <= list_q[p-1];
        end
      end
      count_o <= count_o + 1'b1;
    end
  end

  assign rd_idx_o = list_q[rd_pos_i].idx;
  assign rd_val_o = list_q[rd_pos_i].val;
  assign top_o    = list_q[0].idx;

endmodule
