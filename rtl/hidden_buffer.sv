// hidden_buffer: dual-port, two-bank RAM between the two layers.
//
// The first layer writes each hidden activation into its bank as soon as the
// neuron is finished. The second layer reads one activation per clock from
// the other bank, one clock after it presents the address (synchronous read).
// Two banks let the layers work on two patterns at the same time.
//
// The chip decouples its two layers and runs them in parallel. The
// two-bank RAM is how this design does that; the RAM itself is not
// described.
module hidden_buffer
  import mlp_pkg::*;
(
  input  logic                    clk,
  input  logic                    we_i,
  input  logic                    wbank_i,
  input  logic [HID_IDX_W-1:0]    waddr_i,
  input  logic signed [V_W-1:0]   wdata_i,
  input  logic                    rbank_i,
  input  logic [HID_IDX_W-1:0]    raddr_i,
  output logic signed [V_W-1:0]   rdata_o
);

  logic signed [V_W-1:0] mem [2*MAX_HID];

  always_ff @(posedge clk) begin
    if (we_i) mem[{wbank_i, waddr_i}] <= wdata_i;
    rdata_o <= mem[{rbank_i, raddr_i}];
  end

endmodule
