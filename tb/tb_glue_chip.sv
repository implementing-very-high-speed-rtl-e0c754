// tb_glue_chip: the glue chip driven over the IP bus, with four weight RAM
// stand-ins and two simple chip stand-ins. Checks the register read-back
// with byte strobes. Checks weight RAM writes and reads through the indirect
// window with auto-increment, in all four RAMs. Checks the configuration
// writes passed to the chips (topology and input features in the host's
// bank), and the ranked-list read window. Checks leaf-map use through whole
// GO cycles, the result word, and the result interrupt. It checks that a
// weight access made while a pattern is in flight is held (ack stretched)
// until the board is idle. It also checks the sum-unit list window, a
// coupled leaf-map entry (result carries the sum unit's winner), and the
// go-ready interrupt, which must drop while both input banks are in use.
module tb_glue_chip;
  import mlp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        iosel_n, rw_n, ack_n, intreq_n, intreq1_n;
  logic [5:0]  a;
  logic [1:0]  bs_n;
  logic [15:0] d_i, d_o;
  logic        cfg_we, cfg_sel;
  logic [8:0]  cfg_addr;
  logic [15:0] cfg_wdata;
  logic [5:0]  res_pos;
  logic        c_start [2], c_bank [2], c_ready [2], c_done [2];
  logic [5:0]  c_net [2], c_top [2];
  tag_t        c_tag [2], c_done_tag [2];
  logic [19:0] chip_waddr [4], wram_addr [4];
  logic        wram_we [4], wram_rd [4], chip_wrd [4];
  logic [15:0] wram_wdata [4], wram_rdata [4];
  int checks = 0, failures = 0;
  int root_top = 0, leaf_top = 0, last_leaf_net = -1, stub_delay = 20;
  int cfg_log_addr [$], cfg_log_data [$], cfg_log_sel [$];

  glue_chip dut (.clk, .rst_n, .ip_iosel_n(iosel_n), .ip_rw_n(rw_n), .ip_a(a), .ip_bs_n(bs_n),
    .ip_d_i(d_i), .ip_d_o(d_o), .ip_ack_n(ack_n), .ip_intreq0_n(intreq_n), .ip_intreq1_n(intreq1_n),
    .cfg_we_o(cfg_we), .cfg_sel_o(cfg_sel), .cfg_addr_o(cfg_addr), .cfg_wdata_o(cfg_wdata),
    .res_pos_o(res_pos), .c0_res_idx_i(6'(63 - res_pos)), .c0_res_val_i(8'(res_pos)),
    .c1_res_idx_i(6'(res_pos ^ 6'h15)), .c1_res_val_i(8'(100 - res_pos)),
    .comb_res_idx_i(6'(res_pos ^ 6'h0f)), .comb_res_val_i(9'(200 - res_pos)), .comb_top_i(6'd44),
    .c0_start_o(c_start[0]), .c0_net_o(c_net[0]), .c0_bank_o(c_bank[0]), .c0_tag_o(c_tag[0]),
    .c0_ready_i(c_ready[0]), .c0_done_i(c_done[0]), .c0_done_tag_i(c_done_tag[0]), .c0_top_i(c_top[0]),
    .c1_start_o(c_start[1]), .c1_net_o(c_net[1]), .c1_bank_o(c_bank[1]), .c1_tag_o(c_tag[1]),
    .c1_ready_i(c_ready[1]), .c1_done_i(c_done[1]), .c1_done_tag_i(c_done_tag[1]), .c1_top_i(c_top[1]),
    .chip_waddr_i(chip_waddr), .chip_wrd_i(chip_wrd), .wram_addr_o(wram_addr), .wram_rd_o(wram_rd), .wram_we_o(wram_we),
    .wram_wdata_o(wram_wdata), .wram_rdata_i(wram_rdata));

  for (genvar r = 0; r < 4; r++) begin : g_ram
    weight_sram_model #(.ABITS(12)) u_ram (.clk, .addr(wram_addr[r]), .we(wram_we[r]),
      .wdata(wram_wdata[r]), .rdata(wram_rdata[r]));
    assign chip_waddr[r] = 20'(r * 16 + 5);
    assign chip_wrd[r]   = 1'b0;
  end

  // chip stand-ins: one job at a time, done after stub_delay clocks
  for (genvar c = 0; c < 2; c++) begin : g_stub
    int left = 0;
    assign c_ready[c] = (left == 0);
    always @(posedge clk) begin
      c_done[c] <= 1'b0;
      if (left == 1) begin
        c_done[c] <= 1'b1;
        c_top[c]  <= 6'((c == 0) ? root_top : leaf_top);
      end
      if (left > 0) left <= left - 1;
      if (c_start[c]) begin
        left <= stub_delay;
        c_done_tag[c] <= c_tag[c];
        if (c == 1) last_leaf_net <= int'(c_net[c]);
      end
    end
  end

  always @(posedge clk) if (cfg_we) begin
    cfg_log_addr.push_back(int'(cfg_addr));
    cfg_log_data.push_back(int'(cfg_wdata));
    cfg_log_sel.push_back(int'(cfg_sel));
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // one IP bus I/O cycle; returns read data and the clocks until ack
  task automatic ip_cycle(bit rd, int addr, int wdata, output int rdata, output int wait_clk,
                          input logic [1:0] bsn = 2'b00);
    @(negedge clk);
    iosel_n = 0; rw_n = rd; a = 6'(addr); d_i = 16'(wdata); bs_n = bsn;
    wait_clk = 0;
    do begin
      @(posedge clk); #1;
      wait_clk++;
    end while (ack_n);
    rdata = int'(d_o);
    @(negedge clk);
    iosel_n = 1;
  endtask

  task automatic ip_wr(int addr, int data, logic [1:0] bsn = 2'b00);
    int r, w;
    ip_cycle(0, addr, data, r, w, bsn);
  endtask

  task automatic ip_rd(int addr, output int data);
    int w;
    ip_cycle(1, addr, 0, data, w);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, w, words [4][16];
    iosel_n = 1; rw_n = 1; a = 0; d_i = 0; bs_n = 2'b11;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // address registers and byte strobes
    ip_wr(1, 16'h1234);
    ip_wr(1, 16'hab00, 2'b01);     // upper byte only
    ip_rd(1, v);
    check(v == 16'hab34, $sformatf("addr lo byte write: %h", v));
    ip_wr(2, 16'h0305);
    ip_rd(2, v);
    check(v == 16'h0305, $sformatf("addr hi: %h", v));
    // weight RAMs: write 16 words in each through the window, read back
    for (int r = 0; r < 4; r++) begin
      ip_wr(1, 16'h0100); ip_wr(2, r << 8);
      for (int k = 0; k < 16; k++) begin
        words[r][k] = int'($urandom) & 16'hffff;
        ip_wr(3, words[r][k]);
      end
    end
    check(g_ram[0].u_ram.mem[12'h100] == 16'(words[0][0]) &&
          g_ram[3].u_ram.mem[12'h10f] == 16'(words[3][15]), "words landed at the window addresses");
    for (int r = 0; r < 4; r++) begin
      ip_wr(1, 16'h0100); ip_wr(2, r << 8);
      for (int k = 0; k < 16; k++) begin
        ip_rd(3, v);
        check(v == words[r][k], $sformatf("ram %0d word %0d: %h expected %h", r, k, v, words[r][k]));
      end
    end
    // chip configuration: topology field, then input features of bank 0
    cfg_log_addr.delete(); cfg_log_data.delete(); cfg_log_sel.delete();
    ip_wr(1, 9'h0a3); ip_wr(2, 4 << 8); ip_wr(3, 16'hbeef);
    ip_wr(1, 5); ip_wr(2, 5 << 8); ip_wr(3, 16'h0081); ip_wr(3, 16'h007f);
    check(cfg_log_addr.size() == 3, "three configuration writes");
    if (cfg_log_addr.size() == 3) begin
      check(cfg_log_sel[0] == 0 && cfg_log_addr[0] == 9'h0a3 && cfg_log_data[0] == 16'hbeef, "topology write");
      check(cfg_log_sel[1] == 1 && cfg_log_addr[1] == 5 && cfg_log_data[1][7:0] == 8'h81, "feature 5, bank 0");
      check(cfg_log_sel[2] == 1 && cfg_log_addr[2] == 6, "feature 6 after auto-increment");
    end
    // ranked list windows
    ip_wr(1, 7); ip_wr(2, 7 << 8); ip_rd(3, v);
    check(v == {8'd7, 8'd56}, $sformatf("chip0 list entry: %h", v));
    ip_wr(1, 2); ip_wr(2, 8 << 8); ip_rd(3, v);
    check(v == {8'd98, 8'(2 ^ 6'h15)}, $sformatf("chip1 list entry: %h", v));
    // leaf map: class 3 -> leaf net 9; class 4 has no leaf
    ip_wr(1, 3); ip_wr(2, 6 << 8); ip_wr(3, 16'h0049);
    ip_wr(1, 4); ip_wr(2, 6 << 8); ip_wr(3, 16'h0000);
    ip_wr(0, 2);                     // interrupt enable
    check(intreq_n == 1, "no interrupt while empty");
    check(intreq1_n == 1, "interrupt 1 stays off while disabled");
    root_top = 3; leaf_top = 33;
    ip_wr(0, 3);                     // GO, bank 0
    repeat (3 * stub_delay) @(negedge clk);
    check(intreq_n == 0, "interrupt with a result waiting");
    check(last_leaf_net == 9, $sformatf("leaf network %0d", last_leaf_net));
    ip_rd(4, v);
    check(v == {1'b1, 2'b0, 1'b1, 6'd3, 6'd33}, $sformatf("result word %h", v));
    check(intreq_n == 1, "interrupt cleared");
    ip_rd(4, v);
    check(v[15] == 0, "empty FIFO reads invalid");
    // a GO whose root class has no leaf; a weight read issued meanwhile waits
    root_top = 4;
    ip_rd(0, v);
    check(v[1] == 1, "host bank moved to 1");
    ip_wr(0, 3);
    ip_wr(1, 16'h0100); ip_wr(2, 0);
    ip_cycle(1, 3, 0, v, w);
    check(w > 5 && v == words[0][0], $sformatf("weight read held %0d clocks, got %h", w, v));
    ip_rd(4, v);
    check(v == {1'b1, 2'b0, 1'b0, 6'd4, 6'd0}, $sformatf("no-leaf result word %h", v));
    ip_rd(0, v);
    check(v[2] == 1 && v[0] == 1, $sformatf("idle and go-ready status %h", v));
    // sum-unit list window, and a coupled leaf-map entry: the result
    // carries the sum unit's winner and the coupled flag
    ip_wr(1, 5); ip_wr(2, 9 << 8); ip_rd(3, v);
    check(v == {9'd195, 1'b0, 6'(5 ^ 6'h0f)}, $sformatf("sum list entry: %h", v));
    ip_wr(1, 5); ip_wr(2, 6 << 8); ip_wr(3, 16'h00c9);
    root_top = 5;
    ip_wr(0, 3);
    repeat (3 * stub_delay) @(negedge clk);
    check(last_leaf_net == 9, $sformatf("coupled leaf network %0d", last_leaf_net));
    ip_rd(4, v);
    check(v == {1'b1, 1'b0, 1'b1, 1'b1, 6'd5, 6'd44}, $sformatf("coupled result word %h", v));
    // interrupt 1 follows go-ready: on while a pattern can be taken, off
    // while both input banks are in use
    ip_wr(0, 16'h0004);
    @(negedge clk);
    check(intreq1_n == 0 && intreq_n == 1, "interrupt 1 while a pattern can be taken");
    root_top = 4; stub_delay = 200;
    ip_wr(0, 16'h0005);
    ip_wr(0, 16'h0005);
    @(negedge clk);
    check(intreq1_n == 1, "no interrupt 1 with both banks in use");
    ip_rd(0, v);
    check(v[0] == 0, $sformatf("status shows not go-ready: %h", v));
    repeat (1000) @(negedge clk);
    check(intreq1_n == 0, "interrupt 1 back once a bank is free");
    ip_rd(4, v);
    check(v == {1'b1, 2'b0, 1'b0, 6'd4, 6'd0}, $sformatf("first of two results %h", v));
    ip_rd(4, v);
    check(v == {1'b1, 2'b0, 1'b0, 6'd4, 6'd0}, $sformatf("second of two results %h", v));
    ip_wr(0, 16'h0000);
    @(negedge clk);
    check(intreq1_n == 1, "interrupt 1 off again once disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
