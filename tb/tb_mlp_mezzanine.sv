// tb_mlp_mezzanine: end-to-end test of the board at its default (and only)
// size, driven over the IP bus like a host CPU would, with four weight RAM
// stand-ins.
//
// Part 1, the steel-defect tree: a 23-20-4 root and four 23-25-9 leaves,
// with root class k choosing leaf k. The host downloads weights, topologies
// and the leaf map. It classifies patterns one by one, checking the root
// class, the leaf class and the leaf's whole ranked list against the
// reference model; the one-by-one time must stay under 1/2611 s. It then
// streams 40 patterns with the pipeline full, checking each result and the
// rate: the pattern interval must stay under 640 clocks (20 us at 32 MHz).
// Part 2, the largest tree: a 64-128-64 root and a 64-128-64 leaf. Half the
// root classes choose that leaf and half have no leaf.
// Part 3, a coupled MLP on the same two 64-128-64 networks: every leaf-map
// entry is marked coupled. Each result must name the class with the highest
// root + leaf output sum, streamed with the pipeline full. The whole summed
// list is checked for patterns classified one by one.
// Every mechanism is counted and must occur: layer overlap inside a chip,
// both chips busy at once, bus cycles stretched by a busy input bank,
// results with and without a leaf, the result interrupt, and the go-ready
// interrupt both raised and withdrawn.
module tb_mlp_mezzanine;
  import mlp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        iosel_n, rw_n, ack_n, intreq_n, intreq1_n;
  logic [5:0]  a;
  logic [1:0]  bs_n;
  logic [15:0] d_i, d_o;
  logic [19:0] wram_addr [4];
  logic        wram_rd [4], wram_we [4];
  logic [15:0] wram_wdata [4], wram_rdata [4];

  int checks = 0, failures = 0;
  int n_layer_overlap = 0, n_chips_overlap = 0, n_stretched = 0, n_leaf = 0, n_noleaf = 0, n_irq = 0;
  int n_irq1_on = 0, n_irq1_off = 0, n_coupled = 0;
  int t_obo, t_obo_max = 0;
  bit irq1_armed = 0;

  mlp_mezzanine dut (.clk, .rst_n, .ip_iosel_n(iosel_n), .ip_rw_n(rw_n), .ip_a(a), .ip_bs_n(bs_n),
    .ip_d_i(d_i), .ip_d_o(d_o), .ip_ack_n(ack_n), .ip_intreq0_n(intreq_n), .ip_intreq1_n(intreq1_n),
    .wram_addr_o(wram_addr), .wram_rd_o(wram_rd), .wram_we_o(wram_we),
    .wram_wdata_o(wram_wdata), .wram_rdata_i(wram_rdata));

  for (genvar r = 0; r < 4; r++) begin : g_ram
    weight_sram_model #(.ABITS(16)) u_ram (.clk, .addr(wram_addr[r]), .we(wram_we[r]),
      .wdata(wram_wdata[r]), .rdata(wram_rdata[r]));
  end

  always @(posedge clk) begin
    if ((wram_rd[0] && wram_rd[1]) || (wram_rd[2] && wram_rd[3])) n_layer_overlap++;
    if ((wram_rd[0] || wram_rd[1]) && (wram_rd[2] || wram_rd[3])) n_chips_overlap++;
    if (!intreq_n) n_irq++;
    if (!intreq1_n) irq1_armed = 1;
    if (irq1_armed && !intreq1_n) n_irq1_on++;
    if (irq1_armed && intreq1_n) n_irq1_off++;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic ip_cycle(bit rd, int addr, int wdata, output int rdata, output int wait_clk);
    @(negedge clk);
    iosel_n = 0; rw_n = rd; a = 6'(addr); d_i = 16'(wdata); bs_n = 2'b00;
    wait_clk = 0;
    do begin
      @(posedge clk); #1;
      wait_clk++;
    end while (ack_n);
    rdata = int'(d_o);
    if (wait_clk > 3) n_stretched++;
    @(negedge clk);
    iosel_n = 1;
  endtask

  task automatic ip_wr(int addr, int data);
    int r, w;
    ip_cycle(0, addr, data, r, w);
  endtask

  task automatic ip_rd(int addr, output int data);
    int w;
    ip_cycle(1, addr, 0, data, w);
  endtask

  task automatic window(int target, int addr);
    ip_wr(1, addr & 16'hffff);
    ip_wr(2, (target << 8) | (addr >> 16));
  endtask

  // download a network into one chip's RAMs at the given bases, and its
  // topology into slot 'slot' of both chips
  task automatic load_net(mlp_net net, int chip, int slot, int b1, int b2);
    window(2 * chip, b1);
    for (int w = 0; w < net.l1_size(); w++) ip_wr(3, int'(net.w1_word(w)));
    window(2 * chip + 1, b2);
    for (int w = 0; w < net.l2_size(); w++) ip_wr(3, int'(net.w2_word(w)));
    window(4, slot * 8);
    ip_wr(3, net.n_in); ip_wr(3, net.n_hid); ip_wr(3, net.n_out);
    ip_wr(3, b1 & 16'hffff); ip_wr(3, b1 >> 16);
    ip_wr(3, b2 & 16'hffff); ip_wr(3, b2 >> 16);
  endtask

  task automatic send_pattern(int x [64], int n_in);
    window(5, 0);
    for (int i = 0; i < n_in; i++) ip_wr(3, x[i] & 8'hff);
    ip_wr(0, 7);   // GO, both interrupts enabled
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  mlp_net root, leaf [4], big_root, big_leaf;
  int     leaf_of [64];          // root class -> leaf index, -1 = no leaf

  // expected result word of a pattern
  function automatic int expect_word(mlp_net r, mlp_net lv [4], int x [64], output int lorder [64]);
    int o [64], ord [64], rc;
    r.outputs(x, o);
    rank(o, r.n_out, ord);
    rc = ord[0];
    if (leaf_of[rc] < 0) return (1 << 15) | (rc << 6);
    lv[leaf_of[rc]].outputs(x, o);
    rank(o, lv[leaf_of[rc]].n_out, lorder);
    return (1 << 15) | (1 << 12) | (rc << 6) | lorder[0];
  endfunction

  // expected result word of a coupled pattern, with the summed list
  function automatic int expect_coupled(int x [64], output int sum [64], output int sord [64]);
    int ro [64], lo [64], rord [64];
    big_root.outputs(x, ro);
    big_leaf.outputs(x, lo);
    rank(ro, 64, rord);
    for (int k = 0; k < 64; k++) sum[k] = ro[k] + lo[k];
    rank(sum, 64, sord);
    return (1 << 15) | (1 << 13) | (1 << 12) | (rord[0] << 6) | sord[0];
  endfunction

  initial begin
    int x [64], v, lorder [64], lo [64], sum [64], sord [64];
    int exp_q [$];
    int t_first, t_last, sent, got;
    iosel_n = 1; rw_n = 1; a = 0; d_i = 0; bs_n = 2'b11;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- part 1: steel-defect tree
    root = new(23, 20, 4);
    for (int k = 0; k < 4; k++) leaf[k] = new(23, 25, 9);
    load_net(root, 0, 0, 0, 0);
    for (int k = 0; k < 4; k++) load_net(leaf[k], 1, k + 1, 1000 * k, 1000 * k);
    for (int k = 0; k < 64; k++) leaf_of[k] = (k < 4) ? k : -1;
    for (int k = 0; k < 4; k++) begin
      window(6, k);
      ip_wr(3, 16'h0040 | (k + 1));
    end

    // one by one, with the whole leaf list
    for (int p = 0; p < 12; p++) begin
      int e;
      random_input(23, x);
      e = expect_word(root, leaf, x, lorder);
      t_obo = $time / 10;
      send_pattern(x, 23);
      do ip_rd(4, v); while (!v[15]);
      t_obo = $time / 10 - t_obo;
      if (t_obo > t_obo_max) t_obo_max = t_obo;
      check(v == e, $sformatf("pattern %0d: result %h expected %h", p, v, e));
      if (v[12]) begin
        int o [64];
        n_leaf++;
        leaf[leaf_of[(v >> 6) & 63]].outputs(x, o);
        window(8, 0);
        for (int r = 0; r < 9; r++) begin
          ip_rd(3, v);
          check((v & 63) == lorder[r] && (v >> 8) == o[lorder[r]],
                $sformatf("pattern %0d rank %0d: %h expected class %0d", p, r, v, lorder[r]));
        end
      end
    end

    // one by one, from the first feature write to the result read, a
    // pattern must take well under 1/2611 s (12256 clocks at 32 MHz)
    $display("steel tree one by one: at most %0d clocks per pattern including host traffic", t_obo_max);
    check(t_obo_max < 12256, $sformatf("one-by-one time %0d clocks", t_obo_max));

    // streaming: the host keeps two patterns in flight and reads results as they come
    sent = 0; got = 0;
    t_first = $time / 10;
    while (got < 40) begin
      if (sent < 40 && sent - got < 3) begin
        int e;
        random_input(23, x);
        e = expect_word(root, leaf, x, lo);
        exp_q.push_back(e);
        send_pattern(x, 23);
        sent++;
      end
      ip_rd(0, v);
      if (((v >> 3) & 7) != 0 || sent == 40) begin
        ip_rd(4, v);
        if (v[15]) begin
          check(v == exp_q[0], $sformatf("streamed %0d: %h expected %h", got, v, exp_q[0]));
          void'(exp_q.pop_front());
          got++;
        end
      end
    end
    t_last = $time / 10;
    $display("steel tree: %0d clocks per pattern including host traffic", (t_last - t_first) / 40);
    check((t_last - t_first) / 40 < 640, "streaming rate below one pattern per 20 us at 32 MHz");

    // ---- part 2: largest tree; leaf for even root classes only
    big_root = new(64, 128, 64, 12);
    big_leaf = new(64, 128, 64, 12);
    load_net(big_root, 0, 0, 20000, 20000);
    load_net(big_leaf, 1, 5, 20000, 20000);
    for (int k = 0; k < 64; k++) begin
      leaf_of[k] = (k % 2 == 0) ? 0 : -1;
      window(6, k);
      ip_wr(3, (k % 2 == 0) ? 16'h0045 : 16'h0000);
    end
    leaf[0] = big_leaf;
    sent = 0; got = 0;
    exp_q.delete();
    while (got < 16) begin
      if (sent < 16 && sent - got < 3) begin
        int e;
        random_input(64, x);
        e = expect_word(big_root, leaf, x, lo);
        exp_q.push_back(e);
        send_pattern(x, 64);
        sent++;
      end
      ip_rd(4, v);
      if (v[15]) begin
        check(v == exp_q[0], $sformatf("large %0d: %h expected %h", got, v, exp_q[0]));
        if (v[12]) n_leaf++; else n_noleaf++;
        void'(exp_q.pop_front());
        got++;
      end
    end

    // ---- part 3: coupled MLP, root + leaf outputs summed
    for (int k = 0; k < 64; k++) begin
      window(6, k);
      ip_wr(3, 16'h00c5);
    end
    sent = 0; got = 0;
    exp_q.delete();
    while (got < 12) begin
      if (sent < 12 && sent - got < 3) begin
        random_input(64, x);
        exp_q.push_back(expect_coupled(x, sum, sord));
        send_pattern(x, 64);
        sent++;
      end
      ip_rd(4, v);
      if (v[15]) begin
        check(v == exp_q[0], $sformatf("coupled %0d: %h expected %h", got, v, exp_q[0]));
        if (v[13]) n_coupled++;
        void'(exp_q.pop_front());
        got++;
      end
    end
    for (int p = 0; p < 2; p++) begin
      int e;
      random_input(64, x);
      e = expect_coupled(x, sum, sord);
      send_pattern(x, 64);
      do ip_rd(4, v); while (!v[15]);
      check(v == e, $sformatf("coupled one by one %0d: %h expected %h", p, v, e));
      window(9, 0);
      for (int r = 0; r < 64; r++) begin
        ip_rd(3, v);
        check((v & 63) == sord[r] && (v >> 7) == sum[sord[r]],
              $sformatf("summed rank %0d: %h expected class %0d sum %0d", r, v, sord[r], sum[sord[r]]));
      end
    end

    check(n_layer_overlap > 0, "layers of a chip never overlapped");
    check(n_coupled == 12, $sformatf("coupled results %0d of 12", n_coupled));
    check(n_chips_overlap > 0, "root and leaf chips never ran together");
    check(n_stretched > 0, "no bus cycle was ever held");
    check(n_leaf > 0 && n_noleaf > 0, "results with and without a leaf");
    check(n_irq > 0, "interrupt never raised");
    check(n_irq1_on > 0 && n_irq1_off > 0,
          $sformatf("go-ready interrupt on %0d / off %0d clocks", n_irq1_on, n_irq1_off));
    $display("layer overlap %0d, chip overlap %0d, held cycles %0d, leaf %0d, no leaf %0d, coupled %0d, irq clocks %0d",
             n_layer_overlap, n_chips_overlap, n_stretched, n_leaf, n_noleaf, n_coupled, n_irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
