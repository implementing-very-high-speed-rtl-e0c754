// topology_ram: on-chip RAM holding the topology of every network the chip
// may be asked to run (root and leaves of a tree).
//
// Each of the MAX_NETS entries holds the input, hidden and output counts and
// the base word addresses of the two layers' weights in external memory.
// The host downloads the entries before classification starts, so a
// network's shape is chosen at run time, per job. That much follows the
// chip description.
//
// The host-side layout is this design's own choice. Each entry is reached as
// 8 half-word fields at address {net, field}:
//   0 n_in, 1 n_hid, 2 n_out, 3 w1_base[15:0], 4 w1_base[19:16],
//   5 w2_base[15:0], 6 w2_base[19:16], 7 unused.
// Writes take effect at the clock edge. The read port is asynchronous: the
// whole entry is available in the cycle its net index is presented.
module topology_ram
  import mlp_pkg::*;
#(
  parameter int unsigned NETS = MAX_NETS
) (
  input  logic                      clk,
  input  logic                      we_i,
  input  logic [$clog2(NETS)+2:0]   waddr_i,   // {net, field}
  input  logic [15:0]               wdata_i,
  input  logic [$clog2(NETS)-1:0]   raddr_i,
  output topo_t                     rdata_o
);

  topo_t mem [NETS];

  always_ff @(posedge clk) begin
    if (we_i) begin
      unique case (waddr_i[2:0])
        3'd0: mem[waddr_i[$clog2(NETS)+2:3]].n_in           <= wdata_i[6:0];
        3'd1: mem[waddr_i[$clog2(NETS)+2:3]].n_hid          <= wdata_i[7:0];
        3'd2: mem[waddr_i[$clog2(NETS)+2:3]].n_out          <= wdata_i[6:0];
        3'd3: mem[waddr_i[$clog2(NETS)+2:3]].w1_base[15:0]  <= wdata_i;
        3'd4: mem[waddr_i[$clog2(NETS)+2:3]].w1_base[19:16] <= wdata_i[3:0];
        3'd5: mem[waddr_i[$clog2(NETS)+2:3]].w2_base[15:0]  <= wdata_i;
        3'd6: mem[waddr_i[$clog2(NETS)+2:3]].w2_base[19:16] <= wdata_i[3:0];
        default: ;
      endcase
    end
  end

  assign rdata_o = mem[raddr_i];

endmodule
