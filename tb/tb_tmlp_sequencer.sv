// tb_tmlp_sequencer: the TMLP sequencer between two behavioural chip
// stand-ins. Each stand-in takes up to two jobs and finishes them in order
// after a random time. Its winning class comes from the tb's record of the
// pattern held in the job's input bank. The test programs a random leaf map,
// some entries without a leaf, and feeds 300 patterns at random pace while
// popping results at random pace. Each result must arrive in pattern order.
// Its root class and its leaf class must be right, and the leaf must have
// run on the network the leaf map names. Each mechanism must occur: root
// without a leaf, host held off (go not ready), both chips busy at once,
// and a full result FIFO. Some leaf-map entries are marked coupled. Their
// result must carry the sum unit's class, which the test derives from the
// leaf stand-in's class.
module tb_tmlp_sequencer;
  import mlp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        go, go_ready, hbank, idle, lm_we, lm_valid, res_valid, res_pop;
  logic [5:0]  lm_addr, lm_net, comb_top;
  logic        lm_cpl;
  logic [15:0] res;
  logic [2:0]  res_count;
  logic        c_start [2], c_bank [2], c_ready [2], c_done [2];
  logic [5:0]  c_net [2], c_top [2];
  tag_t        c_tag [2], c_done_tag [2];

  int checks = 0, failures = 0;
  int n_passthrough = 0, n_go_wait = 0, n_both_busy = 0, n_fifo_full = 0, n_coupled = 0;
  int map_valid [64], map_net [64], map_cpl [64];
  int rc [$], lc [$];           // per pattern: root class, leaf class
  int bank_pat [2];             // pattern held in each bank
  int next_pat = 0, next_res = 0;
  bit paused = 0;

  tmlp_sequencer #(.ROOT_NET(6'd0), .FIFO_DEPTH(4)) dut (
    .clk, .rst_n, .go_i(go), .go_ready_o(go_ready), .hbank_o(hbank), .idle_o(idle),
    .lm_we_i(lm_we), .lm_addr_i(lm_addr), .lm_valid_i(lm_valid), .lm_net_i(lm_net), .lm_coupled_i(lm_cpl),
    .res_valid_o(res_valid), .res_o(res), .res_pop_i(res_pop), .res_count_o(res_count),
    .c0_start_o(c_start[0]), .c0_net_o(c_net[0]), .c0_bank_o(c_bank[0]), .c0_tag_o(c_tag[0]),
    .c0_ready_i(c_ready[0]), .c0_done_i(c_done[0]), .c0_done_tag_i(c_done_tag[0]), .c0_top_i(c_top[0]),
    .c1_start_o(c_start[1]), .c1_net_o(c_net[1]), .c1_bank_o(c_bank[1]), .c1_tag_o(c_tag[1]),
    .c1_ready_i(c_ready[1]), .c1_done_i(c_done[1]), .c1_done_tag_i(c_done_tag[1]), .c1_top_i(c_top[1]),
    .comb_top_i(comb_top));

  // sum unit stand-in: its winner is a fixed function of the leaf's winner
  assign comb_top = c_top[1] ^ 6'h2a;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // chip stand-ins
  for (genvar c = 0; c < 2; c++) begin : g_stub
    int   q_time [$];
    int   q_bank [$];
    tag_t q_tag  [$];
    int   now = 0;
    assign c_ready[c] = (q_time.size() < 2) && ($urandom_range(3) != 0) && rst_n;
    always @(posedge clk) begin
      now <= now + 1;
      c_done[c] <= 1'b0;
      if (q_time.size() > 0 && now >= q_time[0]) begin
        int b;
        b = q_bank.pop_front();
        void'(q_time.pop_front());
        c_done[c]     <= 1'b1;
        c_done_tag[c] <= q_tag.pop_front();
        c_top[c]      <= 6'((c == 0) ? rc[bank_pat[b]] : lc[bank_pat[b]]);
      end
      if (c_start[c]) begin
        if (c == 0) check(c_net[c] == 6'd0, "root runs network 0");
        else check(map_valid[rc[bank_pat[c_bank[c]]]] == 1 && int'(c_net[c]) == map_net[rc[bank_pat[c_bank[c]]]],
                   "leaf network from the leaf map");
        check(c_tag[c][0] == c_bank[c], "tag carries bank");
        q_time.push_back(((q_time.size() > 0) ? q_time[$] : now) + 3 + $urandom_range(30));
        q_bank.push_back(int'(c_bank[c]));
        q_tag.push_back(c_tag[c]);
      end
    end
  end

  always @(posedge clk) begin
    if (g_stub[0].q_time.size() > 0 && g_stub[1].q_time.size() > 0) n_both_busy++;
    if (go && !go_ready) n_go_wait++;
    if (res_count == 3'd4) n_fifo_full++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result consumer
  initial begin
    res_pop = 0;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      res_pop = 0;
      if (next_pat == 100 && !paused) begin
        paused = 1;
        repeat (300) @(negedge clk);   // host busy elsewhere: results pile up
      end
      if (res_valid && ($urandom_range(2) == 0 || next_pat > 200)) begin
        int p;
        bit exp_leaf, exp_cpl;
        int exp_cls;
        p = next_res;
        exp_leaf = map_valid[rc[p]] == 1;
        exp_cpl  = exp_leaf && map_cpl[rc[p]] == 1;
        exp_cls  = exp_cpl ? (lc[p] ^ 'h2a) : lc[p];
        check(res[13] == exp_cpl && res[12] == exp_leaf && int'(res[11:6]) == rc[p]
              && (!exp_leaf || int'(res[5:0]) == exp_cls),
              $sformatf("result %0d = %h, expected leaf %0d coupled %0d root %0d class %0d",
                        p, res, exp_leaf, exp_cpl, rc[p], exp_cls));
        if (!exp_leaf) n_passthrough++;
        if (exp_cpl) n_coupled++;
        next_res++;
        res_pop = 1;
      end
    end
  end

  initial begin
    go = 0; lm_we = 0; lm_addr = 0; lm_valid = 0; lm_net = 0; lm_cpl = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 64; k++) begin
      map_valid[k] = ($urandom_range(3) != 0);
      map_net[k] = rnd(1, 63);
      map_cpl[k] = ($urandom_range(2) == 0);
      @(negedge clk);
      lm_we = 1; lm_addr = 6'(k); lm_valid = 1'(map_valid[k]); lm_net = 6'(map_net[k]);
      lm_cpl = 1'(map_cpl[k]);
    end
    @(negedge clk); lm_we = 0;
    check(idle, "idle after reset");
    for (int p = 0; p < 300; p++) begin
      rc.push_back(rnd(0, 63));
      lc.push_back(rnd(0, 63));
      // go waits for a free bank; the features go in once it is free
      @(negedge clk);
      go = 1;
      while (!go_ready) @(negedge clk);
      bank_pat[hbank] = p;
      @(negedge clk);
      go = 0;
      next_pat = p + 1;
      repeat ($urandom_range(p < 150 ? 2 : 20)) @(negedge clk);
    end
    while (next_res < 300) @(negedge clk);
    repeat (5) @(negedge clk);
    check(idle && res_count == 0, "idle at the end");
    check(n_passthrough > 0, "root without leaf never happened");
    check(n_go_wait > 0, "host never held off");
    check(n_both_busy > 0, "chips never busy together");
    check(n_fifo_full > 0, "result FIFO never full");
    check(n_coupled > 0, "no coupled result");
    $display("pass-through %0d, go waits %0d, both busy %0d, fifo full %0d",
             n_passthrough, n_go_wait, n_both_busy, n_fifo_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
