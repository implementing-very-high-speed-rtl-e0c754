// mlp_pkg: sizes, number formats and types shared by the MLP co-processor
// and the mezzanine glue logic.
//
// Largest network one chip runs: 64 inputs, 128 hidden neurons, 64 outputs.
// A tree has up to 64 networks (one root plus up to 63 leaves). Weights are
// 8 bits wide and sit in external memory behind a 20-bit address. All of
// these sizes come from the chip description. Each layer has two multipliers,
// so a chip does 4 connections per clock. At 32 MHz that is the quoted
// 128 MCPS.
//
// The number formats are this design's own choice:
//   * neuron values (inputs and hidden activations) are signed 8-bit Q0.7.
//     The bias input is the constant +1.0, i.e. 128, so multiplier operands
//     are 9 bits wide;
//   * weights are signed 8-bit Q2.5 (range -4 .. +3.97);
//   * a product is then Q.12. The accumulator is 24 bits wide, enough for
//     129 full-scale terms.
// A weight memory word holds two weights, one per multiplier of a layer. The
// lower byte goes to the even-numbered term.
package mlp_pkg;

  localparam int unsigned MAX_IN    = 64;   // inputs per network
  localparam int unsigned MAX_HID   = 128;  // hidden neurons per network
  localparam int unsigned MAX_OUT   = 64;   // output neurons per network
  localparam int unsigned MAX_NETS  = 64;   // root + 63 leaves
  localparam int unsigned WADDR_W   = 20;   // weight address space
  localparam int unsigned W_W       = 8;    // weight width
  localparam int unsigned NMUL      = 2;    // multipliers per layer
  localparam int unsigned WWORD_W   = NMUL * W_W;
  localparam int unsigned V_W       = 8;    // neuron value width
  localparam int unsigned ACC_W     = 24;   // accumulator width

  localparam int unsigned IN_IDX_W  = $clog2(MAX_IN);    // 6
  localparam int unsigned HID_IDX_W = $clog2(MAX_HID);   // 7
  localparam int unsigned OUT_IDX_W = $clog2(MAX_OUT);   // 6
  localparam int unsigned NET_W     = $clog2(MAX_NETS);  // 6

  // Value of the bias input (+1.0 in Q0.7).
  localparam logic signed [V_W:0] BIAS_VALUE = 9'sd128;

  // Topology of one network, as held in the topology RAM.
  typedef struct packed {
    logic [6:0]         n_in;     // 1..64
    logic [7:0]         n_hid;    // 1..128
    logic [6:0]         n_out;    // 1..64
    logic [WADDR_W-1:0] w1_base;  // first word of the first-layer weights
    logic [WADDR_W-1:0] w2_base;  // first word of the second-layer weights
  } topo_t;

  // Job tag carried through a chip and returned with its result.
  localparam int unsigned TAG_W = 8;
  typedef logic [TAG_W-1:0] tag_t;

  // Job handed from the first to the second layer.
  typedef struct packed {
    topo_t topo;
    tag_t  tag;
    logic  hbank;
  } l2_job_t;

  // Number of weight words per first-layer neuron: n_in inputs + bias,
  // two per word.
  function automatic logic [5:0] l1_words(input logic [6:0] n_in);
    logic [7:0] t;
    t = {1'b0, n_in} + 8'd2;
    return t[6:1];
  endfunction

  // Number of weight words per second-layer row: n_out outputs, two per word.
  function automatic logic [5:0] l2_words(input logic [6:0] n_out);
    logic [7:0] t;
    t = {1'b0, n_out} + 8'd1;
    return t[6:1];
  endfunction

endpackage
