// tb_hidden_buffer: writes random activations into both banks, reads them
// back with the one clock read latency, and checks that simultaneous writes
// to one bank and reads from the other do not disturb each other.
module tb_hidden_buffer;
  import mlp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic              we, wbank, rbank;
  logic [6:0]        waddr, raddr;
  logic signed [7:0] wdata, rdata;
  int                ref_mem [2][128];
  int checks = 0, failures = 0;

  hidden_buffer dut (.clk, .we_i(we), .wbank_i(wbank), .waddr_i(waddr), .wdata_i(wdata),
    .rbank_i(rbank), .raddr_i(raddr), .rdata_o(rdata));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wbank = 0; waddr = 0; wdata = 0; rbank = 0; raddr = 0;
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < 128; i++) begin
        @(negedge clk);
        we = 1; wbank = 1'(b); waddr = 7'(i); wdata = 8'(rnd(0, 127));
        ref_mem[b][i] = int'(wdata);
      end
    // read bank r while bank !r is rewritten
    for (int r = 0; r < 2; r++)
      for (int i = 0; i < 128; i++) begin
        @(negedge clk);
        if (i > 0) begin
          checks++;
          if (int'(rdata) != ref_mem[r][i-1]) begin
            failures++;
            $display("FAIL bank %0d addr %0d: %0d", r, i - 1, rdata);
          end
        end
        we = 1; wbank = 1'(!r); waddr = 7'(i); wdata = 8'(rnd(0, 127));
        ref_mem[!r][i] = int'(wdata);
        rbank = 1'(r); raddr = 7'(i);
      end
    @(negedge clk); we = 0;
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < 128; i++) begin
        rbank = 1'(b); raddr = 7'(i);
        @(negedge clk);
        checks++;
        if (int'(rdata) != ref_mem[b][i]) begin
          failures++;
          $display("FAIL bank %0d addr %0d: %0d", b, i, rdata);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
