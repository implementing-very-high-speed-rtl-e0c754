// mlp_chip: the MLP co-processor. It runs one two-layer MLP of up to
// 64 inputs, 128 hidden and 64 outputs per job. The job names the network's
// topology among those downloaded into the chip.
//
// Inside (from the chip description): a FIRST LAYER and a SECOND LAYER
// matrix-vector unit, each with its own activation function and two
// multipliers. That gives 4 connections per clock, 128 MCPS at 32 MHz. Also
// on chip: topology RAM, dual-port input and hidden RAMs, and a class sorter
// that gives the result as a ranked list of classes. Weights live in
// external memory, which the chip addresses directly through a 20-bit
// address. Each layer has its own weight port. The two layers work on two
// different patterns at once: while the second layer finishes pattern p,
// the first layer computes the hidden layer of pattern p+1 into the other
// hidden bank.
//
// This design's own choices: the sequencing of this controller, the two-bank
// buffers, the job tag and all port protocols.
//
// Interface
//  * cfg_*: host writes. cfg_sel_i = 0 writes the topology RAM at
//    {net, field} (see topology_ram). cfg_sel_i = 1 writes input feature
//    cfg_addr_i[5:0] of input bank cfg_addr_i[6], from cfg_wdata_i[7:0].
//  * start_i with start_net_i, start_bank_i, start_tag_i starts a job. It is
//    accepted only in a clock where ready_o is high.
//  * done_o pulses when a job's ranked list is complete. done_tag_o is the
//    job's tag and done_top_o its winning class. The list stays readable
//    through res_pos_i until the readout of the next job begins.
//  * out_*: the output neurons of the job in readout, one per clock in index
//    order, as they enter the class sorter. out_tag_o is that job's tag and
//    out_clear_o marks the start of a readout. The board sums two chips'
//    outputs through these ports when it runs coupled MLPs.
//  * w1_* / w2_*: weight ports of the two layers. The memory must return the
//    word one clock after w*_rd_o and w*_addr_o.
module mlp_chip
  import mlp_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // configuration
  input  logic                  cfg_we_i,
  input  logic                  cfg_sel_i,
  input  logic [NET_W+2:0]      cfg_addr_i,
  input  logic [15:0]           cfg_wdata_i,
  // jobs
  input  logic                  start_i,
  input  logic [NET_W-1:0]      start_net_i,
  input  logic                  start_bank_i,
  input  tag_t                  start_tag_i,
  output logic                  ready_o,
  output logic                  done_o,
  output tag_t                  done_tag_o,
  output logic [OUT_IDX_W-1:0]  done_top_o,
  // ranked result list
  input  logic [OUT_IDX_W-1:0]  res_pos_i,
  output logic [OUT_IDX_W-1:0]  res_idx_o,
  output logic signed [V_W-1:0] res_val_o,
  output logic [OUT_IDX_W:0]    res_count_o,
  // output neuron stream
  output logic                  out_clear_o,
  output logic                  out_valid_o,
  output logic [OUT_IDX_W-1:0]  out_idx_o,
  output logic signed [V_W-1:0] out_val_o,
  output tag_t                  out_tag_o,
  // external weight memory
  output logic                  w1_rd_o,
  output logic [WADDR_W-1:0]    w1_addr_o,
  input  logic [WWORD_W-1:0]    w1_data_i,
  output logic                  w2_rd_o,
  output logic [WADDR_W-1:0]    w2_addr_o,
  input  logic [WWORD_W-1:0]    w2_data_i
);

  topo_t                 topo;
  logic                  ib_rbank;
  logic [IN_IDX_W-2:0]   ib_rpair;
  logic signed [V_W-1:0] ib_rdata [NMUL];
  logic                  hb_we, hb_wbank, hb_rbank;
  logic [HID_IDX_W-1:0]  hb_waddr, hb_raddr;
  logic signed [V_W-1:0] hb_wdata, hb_rdata;
  logic                  l1_busy, l1_done, l2_busy, l2_start, l2_rows_done, l2_done;
  l2_job_t               l1_job, pend_job;
  logic                  pend_valid;
  tag_t                  l2_tag;
  logic                  out_clear, out_valid;
  logic [OUT_IDX_W-1:0]  out_idx;
  logic signed [V_W-1:0] out_val;
  logic [1:0]            hb_full;
  logic                  l1_hbank;      // hidden bank the next L1 job writes
  logic                  l2_hbank;      // hidden bank the second layer reads
  logic                  start_ok;

  assign ready_o  = !l1_busy && !hb_full[l1_hbank] && !pend_valid;
  assign start_ok = start_i && ready_o;

  topology_ram u_topo (
    .clk, .we_i(cfg_we_i && !cfg_sel_i), .waddr_i(cfg_addr_i), .wdata_i(cfg_wdata_i),
    .raddr_i(start_net_i), .rdata_o(topo)
  );

  input_buffer u_in (
    .clk, .we_i(cfg_we_i && cfg_sel_i), .wbank_i(cfg_addr_i[IN_IDX_W]),
    .widx_i(cfg_addr_i[IN_IDX_W-1:0]), .wdata_i(cfg_wdata_i[V_W-1:0]),
    .rbank_i(ib_rbank), .rpair_i(ib_rpair), .rdata_o(ib_rdata)
  );

  first_layer u_l1 (
    .clk, .rst_n,
    .start_i(start_ok), .topo_i(topo), .tag_i(start_tag_i),
    .ibank_i(start_bank_i), .hbank_i(l1_hbank),
    .busy_o(l1_busy), .done_o(l1_done), .job_o(l1_job),
    .ib_rbank_o(ib_rbank), .ib_rpair_o(ib_rpair), .ib_rdata_i(ib_rdata),
    .w_rd_o(w1_rd_o), .w_addr_o(w1_addr_o), .w_data_i(w1_data_i),
    .hb_we_o(hb_we), .hb_wbank_o(hb_wbank), .hb_waddr_o(hb_waddr), .hb_wdata_o(hb_wdata)
  );

  hidden_buffer u_hid (
    .clk, .we_i(hb_we), .wbank_i(hb_wbank), .waddr_i(hb_waddr), .wdata_i(hb_wdata),
    .rbank_i(hb_rbank), .raddr_i(hb_raddr), .rdata_o(hb_rdata)
  );

  assign l2_start = pend_valid && !l2_busy;

  second_layer u_l2 (
    .clk, .rst_n,
    .start_i(l2_start), .job_i(pend_job),
    .busy_o(l2_busy), .rows_done_o(l2_rows_done), .done_o(l2_done), .done_tag_o(l2_tag),
    .hb_rbank_o(hb_rbank), .hb_raddr_o(hb_raddr), .hb_rdata_i(hb_rdata),
    .w_rd_o(w2_rd_o), .w_addr_o(w2_addr_o), .w_data_i(w2_data_i),
    .out_clear_o(out_clear), .out_valid_o(out_valid), .out_idx_o(out_idx), .out_val_o(out_val)
  );

  class_sorter u_sort (
    .clk, .rst_n,
    .clear_i(out_clear), .ins_valid_i(out_valid), .ins_idx_i(out_idx), .ins_val_i(out_val),
    .rd_pos_i(res_pos_i), .rd_idx_o(res_idx_o), .rd_val_o(res_val_o),
    .top_o(done_top_o), .count_o(res_count_o)
  );

  assign out_clear_o = out_clear;
  assign out_valid_o = out_valid;
  assign out_idx_o   = out_idx;
  assign out_val_o   = out_val;
  assign out_tag_o   = l2_tag;

  // Job hand-over from the first to the second layer, and hidden bank
  // bookkeeping: a bank is full from the end of its first-layer job until the
  // second layer has read its last row.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hb_full     <= '0;
      l1_hbank    <= 1'b0;
      pend_valid  <= 1'b0;
      pend_job    <= '0;
      done_o      <= 1'b0;
      done_tag_o  <= '0;
      l2_hbank    <= 1'b0;
    end else begin
      if (l1_done) begin
        hb_full[l1_hbank] <= 1'b1;
        l1_hbank          <= !l1_hbank;
        pend_valid        <= 1'b1;
        pend_job          <= l1_job;
      end
      if (l2_start) begin
        pend_valid <= 1'b0;
        l2_hbank   <= pend_job.hbank;
      end
      if (l2_rows_done) hb_full[l2_hbank] <= 1'b0;
      done_o     <= l2_done;
      done_tag_o <= l2_tag;
    end
  end


endmodule
