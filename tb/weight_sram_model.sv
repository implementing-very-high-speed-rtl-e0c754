// weight_sram_model: behavioural model of one board weight RAM, a commercial
// synchronous SRAM of 16-bit words (two 8-bit weights). It returns the word
// at addr one clock after the address is presented, and it writes wdata
// when we is high. Only the low ABITS address bits are decoded, to keep
// simulations small; the real part decodes all 20.
module weight_sram_model #(
  parameter int unsigned ABITS = 16
) (
  input  logic        clk,
  input  logic [19:0] addr,
  input  logic        we,
  input  logic [15:0] wdata,
  output logic [15:0] rdata
);
  logic [15:0] mem [2**ABITS];

  initial for (int i = 0; i < 2**ABITS; i++) mem[i] = 16'h0;

  always_ff @(posedge clk) begin
    if (we) mem[addr[ABITS-1:0]] <= wdata;
    rdata <= mem[addr[ABITS-1:0]];
  end
endmodule
