// tb_class_sorter: inserts random output sets (with many equal values) of
// random sizes and compares the ranked list with a reference ranking. A
// clear between sets must empty the list.
module tb_class_sorter;
  import mlp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  clear, ins_valid;
  logic [OUT_IDX_W-1:0]  ins_idx, rd_pos, rd_idx, top;
  logic signed [V_W-1:0] ins_val, rd_val;
  logic [OUT_IDX_W:0]    count;
  int checks = 0, failures = 0;

  class_sorter dut (.clk, .rst_n, .clear_i(clear), .ins_valid_i(ins_valid), .ins_idx_i(ins_idx),
    .ins_val_i(ins_val), .rd_pos_i(rd_pos), .rd_idx_o(rd_idx), .rd_val_o(rd_val),
    .top_o(top), .count_o(count));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int o [64], order [64], n;
    clear = 0; ins_valid = 0; ins_idx = 0; ins_val = 0; rd_pos = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      n = (t == 0) ? 64 : (t == 1) ? 1 : rnd(1, 64);
      for (int k = 0; k < 64; k++) o[k] = (t % 3 == 0) ? rnd(0, 7) : rnd(0, 127);
      rank(o, n, order);
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      check(count == 0, "count after clear");
      for (int k = 0; k < n; k++) begin
        ins_valid = 1; ins_idx = 6'(k); ins_val = 8'(o[k]);
        @(negedge clk);
      end
      ins_valid = 0;
      check(int'(count) == n, $sformatf("count %0d != %0d", count, n));
      check(int'(top) == order[0], $sformatf("top %0d != %0d", top, order[0]));
      for (int r = 0; r < n; r++) begin
        rd_pos = 6'(r);
        #1;
        check(int'(rd_idx) == order[r] && int'(rd_val) == o[order[r]],
              $sformatf("set %0d pos %0d: class %0d (%0d), expected %0d (%0d)",
                        t, r, rd_idx, rd_val, order[r], o[order[r]]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
