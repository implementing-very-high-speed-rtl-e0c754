// mlp_mezzanine: the neural co-processor board, a single-size Industry Pack
// module. It runs TMLP classification: a root MLP on one chip, then the leaf
// MLP chosen by the root on the other.
//
// The board carries two MLP chips, their weight RAMs and a glue logic chip,
// and appears to the host as an IP bus I/O space (see glue_chip for the
// register map). The weight RAMs are commercial SRAM parts, so their ports
// are brought out. Each chip has one RAM per layer, four RAMs in all. A RAM
// word is 16 bits, two 8-bit weights. The RAM must return the word at
// wram_addr_o one clock after the address (synchronous read), and it writes
// wram_wdata_o when wram_we_o is high. wram_rd_o marks the clocks in which a
// layer or the host reads the RAM. RAM index: 0 chip0 layer1, 1 chip0
// layer2, 2 chip1 layer1, 3 chip1 layer2.
//
// Each chip does 4 connections per clock, so the board does 8 at most. A
// pattern costs n_hid*ceil((n_in+1)/2) first-layer clocks on each chip. The
// board accepts a new pattern once per the slowest of the four layer phases.
// It pipelines up to two patterns: a pattern's root and the previous
// pattern's leaf run at the same time. The sum unit (cmlp_combiner) adds the
// two chips' output vectors class by class; leaf-map entries marked coupled
// report the winner of that sum instead of the leaf's own.
module mlp_mezzanine
  import mlp_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // IP bus, I/O space
  input  logic                 ip_iosel_n,
  input  logic                 ip_rw_n,
  input  logic [5:0]           ip_a,
  input  logic [1:0]           ip_bs_n,
  input  logic [15:0]          ip_d_i,
  output logic [15:0]          ip_d_o,
  output logic                 ip_ack_n,
  output logic                 ip_intreq0_n,
  output logic                 ip_intreq1_n,
  // weight RAMs
  output logic [WADDR_W-1:0]   wram_addr_o  [4],
  output logic                 wram_rd_o    [4],
  output logic                 wram_we_o    [4],
  output logic [WWORD_W-1:0]   wram_wdata_o [4],
  input  logic [WWORD_W-1:0]   wram_rdata_i [4]
);

  logic                  cfg_we, cfg_sel;
  logic [NET_W+2:0]      cfg_addr;
  logic [15:0]           cfg_wdata;
  logic [OUT_IDX_W-1:0]  res_pos;
  logic [OUT_IDX_W-1:0]  res_idx [2];
  logic signed [V_W-1:0] res_val [2];
  logic                  start [2], bank [2], ready [2], done [2];
  logic [NET_W-1:0]      net [2];
  tag_t                  tag [2], done_tag [2];
  logic [OUT_IDX_W-1:0]  top [2];
  logic [WADDR_W-1:0]    chip_waddr [4];
  logic                  chip_wrd [4];
  logic                  out_clear [2], out_valid [2];
  logic [OUT_IDX_W-1:0]  out_idx [2];
  logic signed [V_W-1:0] out_val [2];
  tag_t                  out_tag [2];
  logic [OUT_IDX_W-1:0]  comb_idx, comb_top;
  logic signed [V_W:0]   comb_val;

  glue_chip u_glue (
    .clk, .rst_n,
    .ip_iosel_n, .ip_rw_n, .ip_a, .ip_bs_n, .ip_d_i, .ip_d_o, .ip_ack_n, .ip_intreq0_n, .ip_intreq1_n,
    .cfg_we_o(cfg_we), .cfg_sel_o(cfg_sel), .cfg_addr_o(cfg_addr), .cfg_wdata_o(cfg_wdata),
    .res_pos_o(res_pos),
    .c0_res_idx_i(res_idx[0]), .c0_res_val_i(res_val[0]),
    .c1_res_idx_i(res_idx[1]), .c1_res_val_i(res_val[1]),
    .c0_start_o(start[0]), .c0_net_o(net[0]), .c0_bank_o(bank[0]), .c0_tag_o(tag[0]),
    .c0_ready_i(ready[0]), .c0_done_i(done[0]), .c0_done_tag_i(done_tag[0]), .c0_top_i(top[0]),
    .c1_start_o(start[1]), .c1_net_o(net[1]), .c1_bank_o(bank[1]), .c1_tag_o(tag[1]),
    .c1_ready_i(ready[1]), .c1_done_i(done[1]), .c1_done_tag_i(done_tag[1]), .c1_top_i(top[1]),
    .comb_res_idx_i(comb_idx), .comb_res_val_i(comb_val), .comb_top_i(comb_top),
    .chip_waddr_i(chip_waddr), .chip_wrd_i(chip_wrd), .wram_addr_o, .wram_rd_o, .wram_we_o, .wram_wdata_o, .wram_rdata_i
  );

  for (genvar c = 0; c < 2; c++) begin : g_chip
    mlp_chip u_chip (
      .clk, .rst_n,
      .cfg_we_i(cfg_we), .cfg_sel_i(cfg_sel), .cfg_addr_i(cfg_addr), .cfg_wdata_i(cfg_wdata),
      .start_i(start[c]), .start_net_i(net[c]), .start_bank_i(bank[c]), .start_tag_i(tag[c]),
      .ready_o(ready[c]), .done_o(done[c]), .done_tag_o(done_tag[c]), .done_top_o(top[c]),
      .res_pos_i(res_pos), .res_idx_o(res_idx[c]), .res_val_o(res_val[c]),
      .res_count_o(),
      .out_clear_o(out_clear[c]), .out_valid_o(out_valid[c]), .out_idx_o(out_idx[c]),
      .out_val_o(out_val[c]), .out_tag_o(out_tag[c]),
      .w1_rd_o(chip_wrd[2*c]),   .w1_addr_o(chip_waddr[2*c]),   .w1_data_i(wram_rdata_i[2*c]),
      .w2_rd_o(chip_wrd[2*c+1]), .w2_addr_o(chip_waddr[2*c+1]), .w2_data_i(wram_rdata_i[2*c+1])
    );
  end

  cmlp_combiner u_sum (
    .clk, .rst_n,
    .a_valid_i(out_valid[0]), .a_idx_i(out_idx[0]), .a_val_i(out_val[0]), .a_tag_i(out_tag[0]),
    .b_clear_i(out_clear[1]), .b_valid_i(out_valid[1]), .b_idx_i(out_idx[1]), .b_val_i(out_val[1]),
    .b_tag_i(out_tag[1]),
    .rd_pos_i(res_pos), .rd_idx_o(comb_idx), .rd_val_o(comb_val), .top_o(comb_top)
  );

endmodule
