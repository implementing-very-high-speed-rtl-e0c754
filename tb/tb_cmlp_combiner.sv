// tb_cmlp_combiner: the coupled-MLP sum unit on its own.
//
// Drives both output streams the way two chips do: chip 0's outputs of a
// pattern in bank b (tag bit 0), then, later, chip 1's outputs of the same
// bank starting with a clear pulse. The stream of the other bank's chip 0
// runs at the same time as chip 1's stream, so the two banks must stay
// apart. After each chip 1 stream the summed list must equal a stable
// descending sort of the class sums (ties: lower class first). top_o must
// already be right in the clock after the last insert, which is when a chip
// raises done.
module tb_cmlp_combiner;
  import mlp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  a_valid, b_clear, b_valid;
  logic [5:0]            a_idx, b_idx, rd_pos, rd_idx, top;
  logic signed [7:0]     a_val, b_val;
  logic signed [8:0]     rd_val;
  tag_t                  a_tag, b_tag;
  int checks = 0, failures = 0;

  cmlp_combiner dut (.clk, .rst_n,
    .a_valid_i(a_valid), .a_idx_i(a_idx), .a_val_i(a_val), .a_tag_i(a_tag),
    .b_clear_i(b_clear), .b_valid_i(b_valid), .b_idx_i(b_idx), .b_val_i(b_val), .b_tag_i(b_tag),
    .rd_pos_i(rd_pos), .rd_idx_o(rd_idx), .rd_val_o(rd_val), .top_o(top));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int av [2][64], bv [64], sum [64], order [64];

  initial begin
    int n_out, bank;
    a_valid = 0; b_clear = 0; b_valid = 0; a_idx = 0; b_idx = 0; a_val = 0; b_val = 0;
    a_tag = 0; b_tag = 0; rd_pos = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fill bank 0 first
    n_out = 64;
    for (int k = 0; k < 64; k++) av[0][k] = rnd(0, 127);
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      a_valid = 1; a_idx = 6'(k); a_val = 8'(av[0][k]); a_tag = 8'h10;
    end
    @(negedge clk); a_valid = 0;
    for (int t = 0; t < 60; t++) begin
      bank = t % 2;
      case (t % 5)
        0: n_out = 64;
        1: n_out = 1;
        2: n_out = 2;
        default: n_out = rnd(3, 63);
      endcase
      // chip 1 values of this bank; a few ties on purpose
      for (int k = 0; k < 64; k++) bv[k] = (t % 3 == 0) ? 64 - av[bank][k] / 2 : rnd(0, 127);
      for (int k = 0; k < 64; k++) av[1 - bank][k] = rnd(0, 127);
      @(negedge clk);
      b_clear = 1; b_tag = 8'(bank);
      @(negedge clk);
      b_clear = 0;
      // chip 1 stream of bank `bank` alongside chip 0 stream of the other bank
      for (int k = 0; k < 64; k++) begin
        b_valid = (k < n_out); b_idx = 6'(k); b_val = 8'(bv[k]);
        a_valid = 1; a_idx = 6'(k); a_val = 8'(av[1 - bank][k]); a_tag = 8'(2 + (1 - bank));
        @(negedge clk);
      end
      b_valid = 0; a_valid = 0;
      for (int k = 0; k < n_out; k++) sum[k] = av[bank][k] + bv[k];
      rank(sum, n_out, order);
      check(int'(top) == order[0], $sformatf("pattern %0d: top %0d expected %0d", t, top, order[0]));
      for (int r = 0; r < n_out; r++) begin
        rd_pos = 6'(r);
        #1;
        check(int'(rd_idx) == order[r] && int'(rd_val) == sum[order[r]],
              $sformatf("pattern %0d rank %0d: class %0d sum %0d, expected %0d sum %0d",
                        t, r, rd_idx, rd_val, order[r], sum[order[r]]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
