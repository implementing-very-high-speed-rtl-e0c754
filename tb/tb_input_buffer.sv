// tb_input_buffer: fills both banks with random features one byte at a
// time, then reads every pair back (one clock read latency) and checks that
// a write to one bank leaves the other untouched.
module tb_input_buffer;
  import mlp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic                  we, wbank, rbank;
  logic [5:0]            widx;
  logic [4:0]            rpair;
  logic signed [7:0]     wdata;
  logic signed [7:0]     rdata [2];
  int                    ref_mem [2][64];
  int checks = 0, failures = 0;

  input_buffer dut (.clk, .we_i(we), .wbank_i(wbank), .widx_i(widx), .wdata_i(wdata),
    .rbank_i(rbank), .rpair_i(rpair), .rdata_o(rdata));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wbank = 0; widx = 0; wdata = 0; rbank = 0; rpair = 0;
    for (int round = 0; round < 3; round++) begin
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < 64; i++) begin
          if (round > 0 && b == round % 2) continue;   // later rounds rewrite one bank only
          @(negedge clk);
          we = 1; wbank = 1'(b); widx = 6'(i); wdata = 8'(rnd(-128, 127));
          ref_mem[b][i] = int'(wdata);
        end
      @(negedge clk); we = 0;
      for (int b = 0; b < 2; b++)
        for (int p = 0; p < 32; p++) begin
          rbank = 1'(b); rpair = 5'(p);
          @(negedge clk);
          checks++;
          if (int'(rdata[0]) != ref_mem[b][2*p] || int'(rdata[1]) != ref_mem[b][2*p+1]) begin
            failures++;
            $display("FAIL bank %0d pair %0d: %0d %0d", b, p, rdata[0], rdata[1]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
