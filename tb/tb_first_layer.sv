// tb_first_layer: runs the first layer on networks of several shapes, from
// 1-1 up to the full 64 inputs x 128 hidden. Checks every hidden value
// written against the reference, the hidden bank used, and the latency:
// done must come exactly n_hid*ceil((n_in+1)/2) + 2 clocks after start,
// i.e. two connections per clock with no idle clock between neurons.
module tb_first_layer;
  import mlp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  start, ibank, hbank, busy, done;
  topo_t                 topo;
  tag_t                  tag;
  l2_job_t               job;
  logic                  ib_rbank;
  logic [4:0]            ib_rpair;
  logic signed [7:0]     ib_rdata [2];
  logic                  w_rd;
  logic [19:0]           w_addr;
  logic [15:0]           w_data;
  logic                  hb_we, hb_wbank;
  logic [6:0]            hb_waddr;
  logic signed [7:0]     hb_wdata;

  logic                  wr_we;
  logic [19:0]           wr_addr;
  logic [15:0]           wr_data;
  int                    xin [2][64];
  int                    hcap [2][128];
  int                    hwrites;
  int checks = 0, failures = 0;

  first_layer dut (.clk, .rst_n, .start_i(start), .topo_i(topo), .tag_i(tag), .ibank_i(ibank),
    .hbank_i(hbank), .busy_o(busy), .done_o(done), .job_o(job),
    .ib_rbank_o(ib_rbank), .ib_rpair_o(ib_rpair), .ib_rdata_i(ib_rdata),
    .w_rd_o(w_rd), .w_addr_o(w_addr), .w_data_i(w_data),
    .hb_we_o(hb_we), .hb_wbank_o(hb_wbank), .hb_waddr_o(hb_waddr), .hb_wdata_o(hb_wdata));

  weight_sram_model #(.ABITS(16)) u_w (.clk, .addr(wr_we ? wr_addr : w_addr), .we(wr_we),
    .wdata(wr_data), .rdata(w_data));

  // input buffer stand-in with the same one-clock read
  always_ff @(posedge clk) begin
    ib_rdata[0] <= 8'(xin[ib_rbank][2*ib_rpair]);
    ib_rdata[1] <= 8'(xin[ib_rbank][2*ib_rpair+1]);
  end

  always_ff @(posedge clk) if (hb_we) begin
    hcap[hb_wbank][hb_waddr] <= int'(hb_wdata);
    hwrites <= hwrites + 1;
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

  task automatic run(int ni, int nh, int base, bit ib, bit hb);
    mlp_net net;
    int h [128];
    int x [64];
    int t0, lat;
    net = new(ni, nh, 1);
    random_input(ni, x);
    for (int i = 0; i < 64; i++) xin[ib][i] = (i < ni) ? x[i] : rnd(-128, 127);
    for (int w = 0; w < net.l1_size(); w++) begin
      @(negedge clk);
      wr_we = 1; wr_addr = 20'(base + w); wr_data = net.w1_word(w);
    end
    @(negedge clk); wr_we = 0;
    net.hidden(x, h);
    hwrites = 0;
    @(negedge clk);
    check(!busy, "busy before start");
    start = 1; ibank = ib; hbank = hb; tag = 8'(ni);
    topo = '{n_in: 7'(ni), n_hid: 8'(nh), n_out: 7'd1, w1_base: 20'(base), w2_base: 20'd0};
    t0 = $time;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    lat = ($time - t0) / 10;
    check(lat == nh * ((ni + 2) / 2) + 2,
          $sformatf("%0d-%0d latency %0d, expected %0d", ni, nh, lat, nh * ((ni + 2) / 2) + 2));
    check(job.tag == 8'(ni) && job.hbank == hb && job.topo.n_hid == 8'(nh), "job handed over");
    @(negedge clk);
    check(hwrites == nh, $sformatf("%0d hidden writes, expected %0d", hwrites, nh));
    for (int j = 0; j < nh; j++)
      check(hcap[hb][j] == h[j], $sformatf("%0d-%0d hidden %0d = %0d, expected %0d",
                                           ni, nh, j, hcap[hb][j], h[j]));
    @(negedge clk);
    check(!busy, "busy after done");
  endtask

  initial begin
    start = 0; ibank = 0; hbank = 0; topo = '0; tag = '0; wr_we = 0; wr_addr = 0; wr_data = 0;
    hwrites = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(23, 20, 100, 0, 0);     // root network of the steel application
    run(23, 25, 5000, 1, 1);    // leaf network of the steel application
    run(64, 128, 12000, 0, 1);  // largest network
    run(1, 1, 0, 1, 0);
    run(2, 3, 777, 0, 0);
    for (int n = 0; n < 6; n++) run(rnd(1, 64), rnd(1, 128), rnd(0, 40000), 1'(n), 1'(n >> 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
