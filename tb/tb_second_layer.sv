// tb_second_layer: runs the second layer on hidden vectors of several
// networks, up to 128 hidden x 64 outputs. Checks that the outputs come out
// once each, in index order, with the reference values, after a sorter
// clear. Checks the timing: the hidden bank is released (rows_done) exactly
// (n_hid+1)*ceil(n_out/2) + 2 clocks after start, i.e. two connections per
// clock, and done comes n_out clocks later.
module tb_second_layer;
  import mlp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  start, busy, rows_done, done;
  l2_job_t               job;
  tag_t                  done_tag;
  logic                  hb_rbank;
  logic [6:0]            hb_raddr;
  logic signed [7:0]     hb_rdata;
  logic                  w_rd;
  logic [19:0]           w_addr;
  logic [15:0]           w_data;
  logic                  out_clear, out_valid;
  logic [5:0]            out_idx;
  logic signed [7:0]     out_val;

  logic                  wr_we;
  logic [19:0]           wr_addr;
  logic [15:0]           wr_data;
  int                    hmem [2][128];
  int                    ocap [64];
  int                    nout_seen, order_err, cleared;
  int checks = 0, failures = 0;

  second_layer dut (.clk, .rst_n, .start_i(start), .job_i(job), .busy_o(busy),
    .rows_done_o(rows_done), .done_o(done), .done_tag_o(done_tag),
    .hb_rbank_o(hb_rbank), .hb_raddr_o(hb_raddr), .hb_rdata_i(hb_rdata),
    .w_rd_o(w_rd), .w_addr_o(w_addr), .w_data_i(w_data),
    .out_clear_o(out_clear), .out_valid_o(out_valid), .out_idx_o(out_idx), .out_val_o(out_val));

  weight_sram_model #(.ABITS(16)) u_w (.clk, .addr(wr_we ? wr_addr : w_addr), .we(wr_we),
    .wdata(wr_data), .rdata(w_data));

  always_ff @(posedge clk) hb_rdata <= 8'(hmem[hb_rbank][hb_raddr]);

  always_ff @(posedge clk) begin
    if (out_clear) cleared <= 1;
    if (out_valid) begin
      if (int'(out_idx) != nout_seen || cleared == 0) order_err <= order_err + 1;
      ocap[out_idx] <= int'(out_val);
      nout_seen <= nout_seen + 1;
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int nh, int no, int base, bit hb);
    mlp_net net;
    int h [128];
    int o [64];
    int t0, t_rows, t_done, exp_rows;
    net = new(1, nh, no);
    for (int j = 0; j < 128; j++) h[j] = (j < nh) ? rnd(0, 127) : 0;
    for (int j = 0; j < 128; j++) hmem[hb][j] = (j < nh) ? h[j] : rnd(0, 127);
    for (int w = 0; w < net.l2_size(); w++) begin
      @(negedge clk);
      wr_we = 1; wr_addr = 20'(base + w); wr_data = net.w2_word(w);
    end
    @(negedge clk); wr_we = 0;
    net.outputs_from_hidden(h, o);
    nout_seen = 0; order_err = 0; cleared = 0;
    @(negedge clk);
    start = 1;
    job = '{topo: '{n_in: 7'd1, n_hid: 8'(nh), n_out: 7'(no), w1_base: 20'd0, w2_base: 20'(base)},
            tag: 8'(no), hbank: hb};
    t0 = $time; t_rows = 0;
    @(negedge clk); start = 0;
    while (!done) begin
      if (rows_done) t_rows = $time;
      @(negedge clk);
    end
    t_done = $time;
    exp_rows = (nh + 1) * ((no + 1) / 2) + 2;
    check((t_rows - t0) / 10 == exp_rows,
          $sformatf("%0d-%0d rows_done after %0d, expected %0d", nh, no, (t_rows - t0) / 10, exp_rows));
    check((t_done - t_rows) / 10 == no,
          $sformatf("%0d-%0d done %0d after rows_done", nh, no, (t_done - t_rows) / 10));
    check(done_tag == 8'(no), "tag returned");
    @(negedge clk);
    check(nout_seen == no && order_err == 0,
          $sformatf("%0d outputs seen, %0d out of order", nout_seen, order_err));
    for (int k = 0; k < no; k++)
      check(ocap[k] == o[k], $sformatf("%0d-%0d output %0d = %0d, expected %0d", nh, no, k, ocap[k], o[k]));
    check(!busy, "busy after done");
  endtask

  initial begin
    start = 0; job = '0; wr_we = 0; wr_addr = 0; wr_data = 0;
    nout_seen = 0; order_err = 0; cleared = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(20, 4, 300, 0);     // root of the steel application
    run(25, 9, 9000, 1);    // leaf of the steel application
    run(128, 64, 20000, 0); // largest network
    run(1, 1, 0, 1);
    run(7, 2, 55, 0);
    for (int n = 0; n < 6; n++) run(rnd(1, 128), rnd(1, 64), rnd(0, 40000), 1'(n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
