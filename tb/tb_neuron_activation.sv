// tb_neuron_activation: sweeps the neuron sum over the whole useful range,
// plus random large values, and compares the activation with the real-valued
// PLAN reference. Also checks monotonicity and the 0.5 value at zero.
module tb_neuron_activation;
  import mlp_pkg::*;
  import tb_ref_pkg::*;

  logic signed [ACC_W-1:0] acc;
  logic signed [V_W-1:0]   y;
  int checks = 0, failures = 0;
  int prev;

  neuron_activation dut (.acc_i(acc), .y_o(y));

  task automatic check_one(longint a);
    int exp_y;
    acc = ACC_W'(a);
    #1;
    exp_y = act_ref(a);
    checks++;
    if (int'(y) != exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL acc=%0d y=%0d expected %0d", a, y, exp_y);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev = -1;
    // every step of z in [-6, 6) plus an offset inside each step
    for (longint a = -6*32*128; a < 6*32*128; a += 37) begin
      check_one(a);
      checks++;
      if (int'(y) < prev) begin
        failures++;
        $display("FAIL not monotonic at acc=%0d", a);
      end
      prev = int'(y);
    end
    for (int n = 0; n < 2000; n++) check_one(longint'($signed(ACC_W'($urandom))));
    check_one(-(longint'(1) << (ACC_W-1)));
    check_one((longint'(1) << (ACC_W-1)) - 1);
    check_one(0);
    checks++;
    if (y != 8'sd64) begin failures++; $display("FAIL f(0) = %0d", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
