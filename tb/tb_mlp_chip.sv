// tb_mlp_chip: the MLP chip with two stand-in weight RAMs, one per layer.
// Downloads six topologies (the steel application's root and
// leaf, the largest 64-128-64, and random ones). It then checks:
//  * single jobs: the whole ranked list against the reference model, and
//    the output stream (every class once, in order, with the job's tag);
//  * back-to-back job pairs on the two input banks: winning class and tag
//    of each, and that the two layers really overlapped (pipelining);
//  * rate: with the pipeline full, jobs complete no slower than one per
//    max(first-layer, second-layer) time, at 4 connections per clock.
module tb_mlp_chip;
  import mlp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  cfg_we, cfg_sel;
  logic [8:0]            cfg_addr;
  logic [15:0]           cfg_wdata;
  logic                  start, start_bank, ready, done;
  logic [5:0]            start_net, done_top, res_pos, res_idx;
  tag_t                  start_tag, done_tag;
  logic signed [7:0]     res_val;
  logic [6:0]            res_count;
  logic                  w1_rd, w2_rd;
  logic [19:0]           w1_addr, w2_addr;
  logic [15:0]           w1_data, w2_data;
  logic                  wr_we [2];
  logic [19:0]           wr_addr;
  logic [15:0]           wr_data;
  logic                  out_clear, out_valid;
  logic [5:0]            out_idx;
  logic signed [7:0]     out_val;
  tag_t                  out_tag;
  int s_idx [$], s_val [$], s_tag [$];
  int n_clear = 0;

  int checks = 0, failures = 0;
  int overlap_clocks = 0;
  int done_times [$];
  int done_tops  [$];
  int done_tags  [$];

  mlp_chip dut (.clk, .rst_n, .cfg_we_i(cfg_we), .cfg_sel_i(cfg_sel), .cfg_addr_i(cfg_addr),
    .cfg_wdata_i(cfg_wdata), .start_i(start), .start_net_i(start_net), .start_bank_i(start_bank),
    .start_tag_i(start_tag), .ready_o(ready), .done_o(done), .done_tag_o(done_tag),
    .done_top_o(done_top), .res_pos_i(res_pos), .res_idx_o(res_idx), .res_val_o(res_val),
    .res_count_o(res_count),
    .out_clear_o(out_clear), .out_valid_o(out_valid), .out_idx_o(out_idx), .out_val_o(out_val),
    .out_tag_o(out_tag),
    .w1_rd_o(w1_rd), .w1_addr_o(w1_addr), .w1_data_i(w1_data),
    .w2_rd_o(w2_rd), .w2_addr_o(w2_addr), .w2_data_i(w2_data));

  weight_sram_model #(.ABITS(16)) u_w1 (.clk, .addr(wr_we[0] ? wr_addr : w1_addr), .we(wr_we[0]),
    .wdata(wr_data), .rdata(w1_data));
  weight_sram_model #(.ABITS(16)) u_w2 (.clk, .addr(wr_we[1] ? wr_addr : w2_addr), .we(wr_we[1]),
    .wdata(wr_data), .rdata(w2_data));

  always_ff @(posedge clk) begin
    if (w1_rd && w2_rd) overlap_clocks <= overlap_clocks + 1;
    if (out_clear) n_clear <= n_clear + 1;
    if (out_valid) begin
      s_idx.push_back(int'(out_idx));
      s_val.push_back(int'(out_val));
      s_tag.push_back(int'(out_tag));
    end
    if (done) begin
      done_times.push_back(int'($time / 10));
      done_tops.push_back(int'(done_top));
      done_tags.push_back(int'(done_tag));
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  mlp_net nets [6];
  int     b1 [6], b2 [6];

  task automatic cfg(bit sel, int addr, int data);
    @(negedge clk);
    cfg_we = 1; cfg_sel = sel; cfg_addr = 9'(addr); cfg_wdata = 16'(data);
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic load_net(int n);
    for (int w = 0; w < nets[n].l1_size(); w++) begin
      @(negedge clk); wr_we[0] = 1; wr_addr = 20'(b1[n] + w); wr_data = nets[n].w1_word(w);
    end
    @(negedge clk); wr_we[0] = 0;
    for (int w = 0; w < nets[n].l2_size(); w++) begin
      @(negedge clk); wr_we[1] = 1; wr_addr = 20'(b2[n] + w); wr_data = nets[n].w2_word(w);
    end
    @(negedge clk); wr_we[1] = 0;
    cfg(0, n * 8 + 0, nets[n].n_in);
    cfg(0, n * 8 + 1, nets[n].n_hid);
    cfg(0, n * 8 + 2, nets[n].n_out);
    cfg(0, n * 8 + 3, b1[n] & 16'hffff);
    cfg(0, n * 8 + 4, b1[n] >> 16);
    cfg(0, n * 8 + 5, b2[n] & 16'hffff);
    cfg(0, n * 8 + 6, b2[n] >> 16);
  endtask

  task automatic load_input(bit bank, int x [64]);
    for (int i = 0; i < 64; i++) cfg(1, {bank, 6'(i)}, x[i] & 8'hff);
  endtask

  task automatic start_job(int n, bit bank, int tag);
    @(negedge clk);
    while (!ready) @(negedge clk);
    start = 1; start_net = 6'(n); start_bank = bank; start_tag = 8'(tag);
    @(negedge clk); start = 0;
  endtask

  initial begin
    int x [64], x2 [64], o [64], order [64];
    int shape [6][3] = '{'{23, 20, 4}, '{23, 25, 9}, '{64, 128, 64}, '{16, 10, 6}, '{5, 3, 2}, '{40, 60, 30}};
    int addr1 = 0, addr2 = 0;
    cfg_we = 0; cfg_sel = 0; cfg_addr = 0; cfg_wdata = 0; start = 0; start_net = 0;
    start_bank = 0; start_tag = 0; res_pos = 0; wr_we = '{0, 0}; wr_addr = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6; n++) begin
      nets[n] = new(shape[n][0], shape[n][1], shape[n][2]);
      b1[n] = addr1; b2[n] = addr2;
      addr1 += nets[n].l1_size() + 3;
      addr2 += nets[n].l2_size() + 5;
      load_net(n);
    end

    // single jobs, whole ranked list
    for (int t = 0; t < 8; t++) begin
      int n;
      bit bank;
      n = t % 6;
      bank = 1'(t);
      random_input(nets[n].n_in, x);
      load_input(bank, x);
      nets[n].outputs(x, o);
      rank(o, nets[n].n_out, order);
      done_tops.delete(); done_tags.delete(); done_times.delete();
      s_idx.delete(); s_val.delete(); s_tag.delete(); n_clear = 0;
      start_job(n, bank, 100 + t);
      while (done_tops.size() == 0) @(negedge clk);
      check(done_tags[0] == 100 + t, "tag of single job");
      check(int'(res_count) == nets[n].n_out, "list length");
      // the output stream: every output once, in class order, with the tag
      check(s_idx.size() == nets[n].n_out && n_clear == 1,
            $sformatf("stream of %0d outputs, %0d clears", s_idx.size(), n_clear));
      for (int k = 0; k < s_idx.size(); k++)
        check(s_idx[k] == k && s_val[k] == o[k] && s_tag[k] == 100 + t,
              $sformatf("net %0d stream %0d: class %0d value %0d tag %0d", n, k, s_idx[k], s_val[k], s_tag[k]));
      check(done_tops[0] == order[0], $sformatf("net %0d top %0d expected %0d", n, done_tops[0], order[0]));
      for (int r = 0; r < nets[n].n_out; r++) begin
        res_pos = 6'(r);
        #1;
        check(int'(res_idx) == order[r] && int'(res_val) == o[order[r]],
              $sformatf("net %0d rank %0d: class %0d (%0d) expected %0d (%0d)", n, r,
                        res_idx, res_val, order[r], o[order[r]]));
      end
    end

    // back-to-back pairs on the two banks
    for (int t = 0; t < 6; t++) begin
      int na, nb;
      int oa [64], ob [64], ra [64], rb [64];
      na = t % 6;
      nb = (t + 2) % 6;
      random_input(nets[na].n_in, x);
      random_input(nets[nb].n_in, x2);
      load_input(0, x);
      load_input(1, x2);
      nets[na].outputs(x, oa); rank(oa, nets[na].n_out, ra);
      nets[nb].outputs(x2, ob); rank(ob, nets[nb].n_out, rb);
      done_tops.delete(); done_tags.delete(); done_times.delete();
      start_job(na, 0, 2 * t);
      start_job(nb, 1, 2 * t + 1);
      while (done_tops.size() < 2) @(negedge clk);
      check(done_tags[0] == 2 * t && done_tags[1] == 2 * t + 1, "pair tags in order");
      check(done_tops[0] == ra[0] && done_tops[1] == rb[0],
            $sformatf("pair %0d tops %0d %0d expected %0d %0d", t, done_tops[0], done_tops[1], ra[0], rb[0]));
    end

    // rate: four jobs of the largest net, back to back
    begin
      int l1c, l2c, gap;
      random_input(64, x);
      load_input(0, x);
      load_input(1, x);
      nets[2].outputs(x, o); rank(o, 64, order);
      l1c = nets[2].n_hid * nets[2].l1_words();
      l2c = (nets[2].n_hid + 1) * nets[2].l2_words() + 64;
      done_tops.delete(); done_tags.delete(); done_times.delete();
      fork
        for (int k = 0; k < 4; k++) start_job(2, 1'(k), k);
      join
      while (done_tops.size() < 4) @(negedge clk);
      for (int k = 1; k < 4; k++) begin
        gap = done_times[k] - done_times[k-1];
        check(gap <= ((l1c > l2c) ? l1c : l2c) + 4,
              $sformatf("jobs %0d clocks apart, first layer needs %0d", gap, l1c));
        check(done_tops[k] == order[0], "top of rate job");
      end
      $display("largest net: %0d clocks per pattern, %0d connections, %0d connections/clock x100",
               done_times[3] - done_times[2], 64 * 128 + 128 * 64,
               100 * (129 * 64 + 65 * 128) / (done_times[3] - done_times[2]));
    end

    check(overlap_clocks > 0, "layers never worked at the same time");
    $display("layer overlap clocks: %0d", overlap_clocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
