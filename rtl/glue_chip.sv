// glue_chip: the custom control logic of the mezzanine board. It sits between
// the Industry Pack (IP) bus and the two MLP chips with their weight RAMs.
//
// The board has two MLP chips, their weight RAMs and one glue logic chip,
// and talks to the host over an IP bus (16-bit data, 6-bit address). That
// much follows the board description. The register map and the handshake
// details are this design's own. The IP bus handshake used is the usual
// I/O-space cycle: the host drives ip_iosel_n low with ip_rw_n, ip_a and,
// for a write, ip_d_i. The board answers with ip_ack_n low for one clock,
// read data valid in that clock, and it waits for ip_iosel_n to rise before
// it takes the next cycle. The board stretches a cycle (delays ack) while the
// access must wait. Register writes honour the byte strobes ip_bs_n.
// The IP bus gives a module two interrupt lines, and both are used:
// ip_intreq0_n is low while results are waiting and interrupt 0 is enabled;
// ip_intreq1_n is low while the board can take a new pattern (go ready) and
// interrupt 1 is enabled. What each line means is this design's choice.
//
// Register map (16-bit word addresses):
//   0 W: bit0 GO (start the pattern just written; waits until it can be
//        taken), bit1 interrupt 0 enable (results), bit2 interrupt 1
//        enable (go ready)
//     R: bit0 go ready, bit1 input bank being written, bit2 idle,
//        bits5:3 results waiting, bit6 chip 0 ready, bit7 chip 1 ready
//   1 R/W: indirect address [15:0]
//   2 R/W: bits3:0 indirect address [19:16], bits11:8 target
//   3 R/W: indirect data. Each access moves the indirect address on by one.
//   4 R: pop one result: bit15 valid, bit13 coupled, bit12 leaf ran,
//        bits11:6 root class, bits5:0 leaf class (coupled: class with the
//        highest root + leaf output sum)
// Indirect targets:
//   0..3 weight RAM of chip0 layer1, chip0 layer2, chip1 layer1, chip1
//        layer2 (read/write, one 16-bit word = two weights). Accesses wait
//        until no pattern is in flight.
//   4    topology RAM of both chips, address {net, field} (write)
//   5    input feature [5:0] of the bank being written, both chips (write,
//        low byte). Waits until that bank is free.
//   6    leaf map entry [5:0]: bit7 coupled, bit6 valid, bits5:0 leaf
//        network (write)
//   7, 8 ranked list of chip 0 / chip 1, position [5:0] (read):
//        bits15:8 value, bits5:0 class
//   9    ranked list of root + leaf output sums from the sum unit,
//        position [5:0] (read): bits15:7 sum, bits5:0 class
// Weight RAM ports: the chips' addresses and read strobes pass through to the
// RAMs unless the host is accessing them.
module glue_chip
  import mlp_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // IP bus, I/O space
  input  logic                  ip_iosel_n,
  input  logic                  ip_rw_n,      // 1 = read
  input  logic [5:0]            ip_a,
  input  logic [1:0]            ip_bs_n,
  input  logic [15:0]           ip_d_i,
  output logic [15:0]           ip_d_o,
  output logic                  ip_ack_n,
  output logic                  ip_intreq0_n,
  output logic                  ip_intreq1_n,
  // MLP chip configuration (both chips)
  output logic                  cfg_we_o,
  output logic                  cfg_sel_o,
  output logic [NET_W+2:0]      cfg_addr_o,
  output logic [15:0]           cfg_wdata_o,
  // ranked lists of both chips
  output logic [OUT_IDX_W-1:0]  res_pos_o,
  input  logic [OUT_IDX_W-1:0]  c0_res_idx_i,
  input  logic signed [V_W-1:0] c0_res_val_i,
  input  logic [OUT_IDX_W-1:0]  c1_res_idx_i,
  input  logic signed [V_W-1:0] c1_res_val_i,
  // job control of both chips
  output logic                  c0_start_o,
  output logic [NET_W-1:0]      c0_net_o,
  output logic                  c0_bank_o,
  output tag_t                  c0_tag_o,
  input  logic                  c0_ready_i,
  input  logic                  c0_done_i,
  input  tag_t                  c0_done_tag_i,
  input  logic [OUT_IDX_W-1:0]  c0_top_i,
  output logic                  c1_start_o,
  output logic [NET_W-1:0]      c1_net_o,
  output logic                  c1_bank_o,
  output tag_t                  c1_tag_o,
  input  logic                  c1_ready_i,
  input  logic                  c1_done_i,
  input  tag_t                  c1_done_tag_i,
  input  logic [OUT_IDX_W-1:0]  c1_top_i,
  // coupled-MLP sum unit: ranked list of sums, read at res_pos_o
  input  logic [OUT_IDX_W-1:0]  comb_res_idx_i,
  input  logic signed [V_W:0]   comb_res_val_i,
  input  logic [OUT_IDX_W-1:0]  comb_top_i,
  // weight RAMs: [0] chip0 L1, [1] chip0 L2, [2] chip1 L1, [3] chip1 L2
  input  logic [WADDR_W-1:0]    chip_waddr_i [4],
  input  logic                  chip_wrd_i   [4],
  output logic [WADDR_W-1:0]    wram_addr_o  [4],
  output logic                  wram_rd_o    [4],
  output logic                  wram_we_o    [4],
  output logic [WWORD_W-1:0]    wram_wdata_o [4],
  input  logic [WWORD_W-1:0]    wram_rdata_i [4]
);

  typedef enum logic [1:0] {B_IDLE, B_WAIT, B_ACK, B_RELEASE} bstate_t;
  bstate_t     bst;
  logic [5:0]  a_q;
  logic        rw_q;
  logic [1:0]  bs_q;
  logic [15:0] d_q;
  logic [19:0] iaddr;
  logic [3:0]  target;
  logic        int_en, int1_en;
  logic        ram_rd_phase;   // weight RAM read: data arrives next clock

  // sequencer
  logic        seq_go, go_ready, hbank, seq_idle, res_valid, res_pop;
  logic [15:0] res_word;
  logic [2:0]  res_count;
  logic        lm_we;

  // an access may complete in this clock
  logic        can_do;
  logic [15:0] byte_mask;

  assign byte_mask = {{8{!bs_q[1]}}, {8{!bs_q[0]}}};

  always_comb begin
    can_do = 1'b1;
    if (a_q == 6'd0 && !rw_q && d_q[0]) can_do = go_ready;
    if (a_q == 6'd3) begin
      if (target <= 4'd3) can_do = seq_idle && (rw_q ? ram_rd_phase : 1'b1);
      if (target == 4'd5) can_do = go_ready;
    end
  end

  tmlp_sequencer u_seq (
    .clk, .rst_n,
    .go_i(seq_go), .go_ready_o(go_ready), .hbank_o(hbank), .idle_o(seq_idle),
    .lm_we_i(lm_we), .lm_addr_i(iaddr[OUT_IDX_W-1:0]), .lm_valid_i(d_q[6]),
    .lm_net_i(d_q[NET_W-1:0]), .lm_coupled_i(d_q[7]),
    .res_valid_o(res_valid), .res_o(res_word), .res_pop_i(res_pop), .res_count_o(res_count),
    .c0_start_o, .c0_net_o, .c0_bank_o, .c0_tag_o, .c0_ready_i, .c0_done_i, .c0_done_tag_i, .c0_top_i,
    .c1_start_o, .c1_net_o, .c1_bank_o, .c1_tag_o, .c1_ready_i, .c1_done_i, .c1_done_tag_i, .c1_top_i,
    .comb_top_i
  );

  wire doing = (bst == B_WAIT) && can_do;

  assign seq_go  = doing && !rw_q && a_q == 6'd0 && d_q[0];
  assign lm_we   = doing && !rw_q && a_q == 6'd3 && target == 4'd6;
  assign res_pop = doing && rw_q && a_q == 6'd4;

  assign cfg_we_o    = doing && !rw_q && a_q == 6'd3 && (target == 4'd4 || target == 4'd5);
  assign cfg_sel_o   = (target == 4'd5);
  assign cfg_addr_o  = (target == 4'd5) ? (NET_W+3)'({hbank, iaddr[IN_IDX_W-1:0]})
                                        : iaddr[NET_W+2:0];
  assign cfg_wdata_o = d_q;
  assign res_pos_o   = iaddr[OUT_IDX_W-1:0];

  // weight RAM ports
  always_comb begin
    for (int r = 0; r < 4; r++) begin
      logic host;
      host = (bst == B_WAIT) && a_q == 6'd3 && target == 4'(r) && seq_idle;
      wram_addr_o[r]  = host ? iaddr : chip_waddr_i[r];
      wram_rd_o[r]    = chip_wrd_i[r] || (host && rw_q);
      wram_we_o[r]    = doing && !rw_q && a_q == 6'd3 && target == 4'(r);
      wram_wdata_o[r] = d_q;
    end
  end

  // IP bus cycle
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bst          <= B_IDLE;
      a_q          <= '0;
      rw_q         <= 1'b1;
      bs_q         <= '0;
      d_q          <= '0;
      iaddr        <= '0;
      target       <= '0;
      int_en       <= 1'b0;
      int1_en      <= 1'b0;
      ram_rd_phase <= 1'b0;
      ip_ack_n     <= 1'b1;
      ip_d_o       <= '0;
    end else begin
      ip_ack_n <= 1'b1;
      unique case (bst)
        B_IDLE: if (!ip_iosel_n) begin
          a_q          <= ip_a;
          rw_q         <= ip_rw_n;
          bs_q         <= ip_bs_n;
          d_q          <= ip_d_i;
          ram_rd_phase <= 1'b0;
          bst          <= B_WAIT;
        end
        B_WAIT: begin
          if (a_q == 6'd3 && target <= 4'd3 && rw_q && seq_idle) ram_rd_phase <= 1'b1;
          if (can_do) begin
            bst      <= B_ACK;
            ip_ack_n <= 1'b0;
            ip_d_o   <= '0;
            if (rw_q) begin
              unique case (a_q)
                6'd0: ip_d_o <= {8'd0, c1_ready_i, c0_ready_i, res_count, seq_idle, hbank, go_ready};
                6'd1: ip_d_o <= iaddr[15:0];
                6'd2: ip_d_o <= {4'd0, target, 4'd0, iaddr[19:16]};
                6'd3: begin
                  unique case (target)
                    4'd0, 4'd1, 4'd2, 4'd3: ip_d_o <= wram_rdata_i[target[1:0]];
                    4'd7: ip_d_o <= {c0_res_val_i, 2'b0, c0_res_idx_i};
                    4'd8: ip_d_o <= {c1_res_val_i, 2'b0, c1_res_idx_i};
                    4'd9: ip_d_o <= {comb_res_val_i, 1'b0, comb_res_idx_i};
                    default: ip_d_o <= '0;
                  endcase
                  iaddr <= iaddr + 20'd1;
                end
                6'd4: ip_d_o <= {res_valid, 1'b0, res_word[13:0]};
                default: ip_d_o <= '0;
              endcase
            end else begin
              unique case (a_q)
                6'd0: if (!bs_q[0]) begin
                  int_en  <= d_q[1];
                  int1_en <= d_q[2];
                end
                6'd1: iaddr[15:0] <= (iaddr[15:0] & ~byte_mask) | (d_q & byte_mask);
                6'd2: begin
                  if (!bs_q[0]) iaddr[19:16] <= d_q[3:0];
                  if (!bs_q[1]) target       <= d_q[11:8];
                end
                6'd3: iaddr <= iaddr + 20'd1;
                default: ;
              endcase
            end
          end
        end
        B_ACK:     bst <= ip_iosel_n ? B_IDLE : B_RELEASE;
        B_RELEASE: if (ip_iosel_n) bst <= B_IDLE;
        default:   bst <= B_IDLE;
      endcase
    end
  end

  assign ip_intreq0_n = !(int_en && res_valid);
  assign ip_intreq1_n = !(int1_en && go_ready);

endmodule
