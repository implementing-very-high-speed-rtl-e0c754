// tb_topology_ram: writes every field of every network entry with random
// values through the half-word port, then reads each entry back as a whole
// and compares it with what was written.
module tb_topology_ram;
  import mlp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic        we;
  logic [8:0]  waddr;
  logic [15:0] wdata;
  logic [5:0]  raddr;
  topo_t       rdata;
  topo_t       exp_t [64];
  int checks = 0, failures = 0;

  topology_ram dut (.clk, .we_i(we), .waddr_i(waddr), .wdata_i(wdata), .raddr_i(raddr), .rdata_o(rdata));

  task automatic wr(int net, int field, int val);
    @(negedge clk);
    we = 1; waddr = 9'({6'(net), 3'(field)}); wdata = 16'(val);
    @(negedge clk);
    we = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int n = 0; n < 64; n++) begin
      exp_t[n].n_in    = 7'(rnd(1, 64));
      exp_t[n].n_hid   = 8'(rnd(1, 128));
      exp_t[n].n_out   = 7'(rnd(1, 64));
      exp_t[n].w1_base = 20'($urandom);
      exp_t[n].w2_base = 20'($urandom);
    end
    for (int pass = 0; pass < 2; pass++)
      for (int n = 0; n < 64; n++) begin
        int order;
        order = (pass == 0) ? n : 63 - n;
        wr(order, 0, int'(exp_t[order].n_in));
        wr(order, 1, int'(exp_t[order].n_hid));
        wr(order, 2, int'(exp_t[order].n_out));
        wr(order, 3, int'(exp_t[order].w1_base[15:0]));
        wr(order, 4, int'(exp_t[order].w1_base[19:16]));
        wr(order, 5, int'(exp_t[order].w2_base[15:0]));
        wr(order, 6, int'(exp_t[order].w2_base[19:16]));
        wr(order, 7, 16'hffff);   // unused field must change nothing
      end
    for (int n = 0; n < 64; n++) begin
      raddr = 6'(n);
      #1;
      checks++;
      if (rdata != exp_t[n]) begin
        failures++;
        $display("FAIL net %0d: %h expected %h", n, rdata, exp_t[n]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
