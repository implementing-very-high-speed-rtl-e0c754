// input_buffer: dual-port, two-bank RAM holding the input feature vector of
// a pattern.
//
// The write port belongs to the host side. It writes one 8-bit feature at
// {bank, index}. The read port belongs to the first layer. It returns two
// consecutive features, index 2k and 2k+1, one per multiplier, one clock
// after the address is presented (synchronous read). The host can fill one
// bank while the first layer works on the other.
//
// The chip has dual-port RAMs, but their use is not given. Using one of them
// as a two-bank input buffer is this design's reading.
module input_buffer
  import mlp_pkg::*;
(
  input  logic                    clk,
  // write port
  input  logic                    we_i,
  input  logic                    wbank_i,
  input  logic [IN_IDX_W-1:0]     widx_i,
  input  logic signed [V_W-1:0]   wdata_i,
  // read port: pair index
  input  logic                    rbank_i,
  input  logic [IN_IDX_W-2:0]     rpair_i,
  output logic signed [V_W-1:0]   rdata_o [NMUL]
);

  logic signed [V_W-1:0] mem_even [2*MAX_IN/2];
  logic signed [V_W-1:0] mem_odd  [2*MAX_IN/2];

  always_ff @(posedge clk) begin
    if (we_i) begin
      if (widx_i[0]) mem_odd [{wbank_i, widx_i[IN_IDX_W-1:1]}] <= wdata_i;
      else           mem_even[{wbank_i, widx_i[IN_IDX_W-1:1]}] <= wdata_i;
    end
    rdata_o[0] <= mem_even[{rbank_i, rpair_i}];
    rdata_o[1] <= mem_odd [{rbank_i, rpair_i}];
  end

endmodule
