// tmlp_sequencer: runs a Tree of MLPs (TMLP) on the board's two MLP chips.
//
// A TMLP has one root MLP and up to 63 leaf MLPs. The root sorts a pattern
// into a superclass (a defect family). The superclass picks exactly one leaf,
// and the leaf classifies the same input into a detailed class. That is the
// scheme as described. How it maps onto the hardware is this design's
// choice. Chip 0 always runs the root, network ROOT_NET of its topology RAM.
// Chip 1 runs the leaf, network leaf_map[root class] of its own topology RAM.
// The two chips form a pipeline: chip 0 can already run the root of the next
// pattern while chip 1 runs a leaf. A leaf_map entry with its valid bit clear
// makes the root class final: no leaf runs for it.
//
// A leaf_map entry may also be marked coupled. The leaf then still runs on
// the same input, but the pattern's result is the class with the highest
// sum of root and leaf outputs (comb_top_i, from the sum unit), not the
// leaf's own winner. Pointing every entry at one coupled leaf makes the
// board a two-member coupled MLP (CMLP); mixing entries gives a tree whose
// second level is coupled (TCMLP). Both structures are named in the chip
// description. Using the leaf map to select them is this design's choice.
//
// Patterns live in the chips' two input banks. go_i hands over the pattern
// the host has just written into bank hbank_o, and hbank_o then flips. A bank
// stays busy until its result is in the result FIFO. go_ready_o is high when
// the next bank is free and the FIFO has room for every pattern in flight,
// so no result is ever dropped. Results leave the FIFO in pattern order. A
// pattern without a leaf waits until chip 1 holds no earlier pattern.
module tmlp_sequencer
  import mlp_pkg::*;
#(
  parameter logic [NET_W-1:0] ROOT_NET   = '0,
  parameter int unsigned      FIFO_DEPTH = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // host side
  input  logic                  go_i,
  output logic                  go_ready_o,
  output logic                  hbank_o,
  output logic                  idle_o,
  input  logic                  lm_we_i,
  input  logic [OUT_IDX_W-1:0]  lm_addr_i,
  input  logic                  lm_valid_i,
  input  logic [NET_W-1:0]      lm_net_i,
  input  logic                  lm_coupled_i,
  output logic                  res_valid_o,
  output logic [15:0]           res_o,       // {2'b0, coupled, leaf_valid, root[5:0], class[5:0]}
  input  logic                  res_pop_i,
  output logic [$clog2(FIFO_DEPTH):0] res_count_o,
  // chip 0 (root)
  output logic                  c0_start_o,
  output logic [NET_W-1:0]      c0_net_o,
  output logic                  c0_bank_o,
  output tag_t                  c0_tag_o,
  input  logic                  c0_ready_i,
  input  logic                  c0_done_i,
  input  tag_t                  c0_done_tag_i,
  input  logic [OUT_IDX_W-1:0]  c0_top_i,
  // chip 1 (leaf)
  output logic                  c1_start_o,
  output logic [NET_W-1:0]      c1_net_o,
  output logic                  c1_bank_o,
  output tag_t                  c1_tag_o,
  input  logic                  c1_ready_i,
  input  logic                  c1_done_i,
  input  tag_t                  c1_done_tag_i,
  input  logic [OUT_IDX_W-1:0]  c1_top_i,
  // sum unit: winning class of root + leaf outputs, valid with c1_done_i
  input  logic [OUT_IDX_W-1:0]  comb_top_i
);

  // leaf map: root class -> leaf network
  logic                 lm_valid [MAX_OUT];
  logic                 lm_cpl   [MAX_OUT];
  logic [NET_W-1:0]     lm_net   [MAX_OUT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MAX_OUT; i++) begin
        lm_valid[i] <= 1'b0;
        lm_cpl[i]   <= 1'b0;
        lm_net[i]   <= '0;
      end
    end else if (lm_we_i) begin
      lm_valid[lm_addr_i] <= lm_valid_i;
      lm_cpl[lm_addr_i]   <= lm_coupled_i;
      lm_net[lm_addr_i]   <= lm_net_i;
    end
  end

  // per-bank pattern state
  logic [1:0]            busy_q;       // pattern held, result not yet queued
  logic [1:0]            root_pend;    // waiting for chip 0
  logic [1:0]            leaf_pend;    // root done, waiting for chip 1 (or for order)
  logic [1:0]            has_leaf;
  logic [1:0]            coupled;
  logic [NET_W-1:0]      leaf_net  [2];
  logic [OUT_IDX_W-1:0]  root_cls  [2];
  logic                  rq_ptr, lq_ptr;
  logic [1:0]            c1_inflight;

  // result FIFO
  logic [15:0]           fifo [FIFO_DEPTH];
  logic [$clog2(FIFO_DEPTH)-1:0] wp, rp;
  logic [$clog2(FIFO_DEPTH):0]   cnt;
  logic                  push;
  logic [15:0]           push_data;
  logic [1:0]            n_busy;

  logic                  c0_bank_done, c1_bank_done;
  logic                  pass_through;

  assign n_busy      = 2'(busy_q[0]) + 2'(busy_q[1]);
  assign go_ready_o  = !busy_q[hbank_o]
                    && ((32'(cnt) + 32'(n_busy)) < FIFO_DEPTH);
  assign idle_o      = (busy_q == 2'b00);
  assign res_valid_o = (cnt != 0);
  assign res_o       = fifo[rp];
  assign res_count_o = cnt;

  assign c0_bank_done = c0_done_tag_i[0];
  assign c1_bank_done = c1_done_tag_i[0];

  assign c0_start_o = root_pend[rq_ptr] && c0_ready_i;
  assign c0_net_o   = ROOT_NET;
  assign c0_bank_o  = rq_ptr;
  assign c0_tag_o   = tag_t'(rq_ptr);

  assign c1_start_o = leaf_pend[lq_ptr] && has_leaf[lq_ptr] && c1_ready_i;
  assign c1_net_o   = leaf_net[lq_ptr];
  assign c1_bank_o  = lq_ptr;
  assign c1_tag_o   = tag_t'(lq_ptr);

  // a pattern whose root class has no leaf leaves once chip 1 is empty
  assign pass_through = leaf_pend[lq_ptr] && !has_leaf[lq_ptr] && (c1_inflight == 2'd0);

  always_comb begin
    push      = 1'b0;
    push_data = '0;
    if (c1_done_i) begin
      push      = 1'b1;
      push_data = coupled[c1_bank_done]
                ? {2'b0, 1'b1, 1'b1, root_cls[c1_bank_done], comb_top_i}
                : {2'b0, 1'b0, 1'b1, root_cls[c1_bank_done], c1_top_i};
    end else if (pass_through) begin
      push      = 1'b1;
      push_data = {3'b0, 1'b0, root_cls[lq_ptr], 6'd0};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q      <= '0;
      root_pend   <= '0;
      leaf_pend   <= '0;
      has_leaf    <= '0;
      coupled     <= '0;
      leaf_net    <= '{default: '0};
      root_cls    <= '{default: '0};
      rq_ptr      <= 1'b0;
      lq_ptr      <= 1'b0;
      hbank_o     <= 1'b0;
      c1_inflight <= '0;
      wp          <= '0;
      rp          <= '0;
      cnt         <= '0;
    end else begin
      if (go_i && go_ready_o) begin
        busy_q[hbank_o]    <= 1'b1;
        root_pend[hbank_o] <= 1'b1;
        hbank_o            <= !hbank_o;
      end
      if (c0_start_o) begin
        root_pend[rq_ptr] <= 1'b0;
        rq_ptr            <= !rq_ptr;
      end
      if (c0_done_i) begin
        leaf_pend[c0_bank_done] <= 1'b1;
        has_leaf[c0_bank_done]  <= lm_valid[c0_top_i];
        coupled[c0_bank_done]   <= lm_cpl[c0_top_i];
        leaf_net[c0_bank_done]  <= lm_net[c0_top_i];
        root_cls[c0_bank_done]  <= c0_top_i;
      end
      if (c1_start_o || pass_through) begin
        leaf_pend[lq_ptr] <= 1'b0;
        lq_ptr            <= !lq_ptr;
      end
      if (pass_through) busy_q[lq_ptr] <= 1'b0;
      if (c1_done_i)    busy_q[c1_bank_done] <= 1'b0;
      c1_inflight <= c1_inflight + 2'(c1_start_o) - 2'(c1_done_i);
      if (push) begin
        fifo[wp] <= push_data;
        wp       <= wp + 1'b1;
      end
      if (res_pop_i && res_valid_o) rp <= rp + 1'b1;
      cnt <= cnt + ($clog2(FIFO_DEPTH)+1)'(push)
                 - ($clog2(FIFO_DEPTH)+1)'(res_pop_i && res_valid_o);
    end
  end

  // the FIFO reservation in go_ready_o guarantees room for every result
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    push |-> (32'(cnt) < FIFO_DEPTH || (res_pop_i && res_valid_o)));

endmodule
