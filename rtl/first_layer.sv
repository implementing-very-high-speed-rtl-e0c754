// first_layer: the FIRST LAYER matrix-vector multiplier of the MLP chip.
//
// It computes every hidden neuron of one pattern:
//     h[j] = f( sum_i W1[j][i] * x[i] + W1[j][n_in] * 1.0 ),
// with f the activation function (neuron_activation). The chip description
// gives the task, the two layers and the external, chip-addressed weight
// memory. The computational scheme is this design's choice. The layer works
// neuron by neuron. Its two multipliers take two inputs of the same neuron
// per clock, so a neuron with n_in inputs plus bias takes ceil((n_in+1)/2)
// clocks, one weight word each. Neurons follow back to back with no idle
// clock. The latency is n_hid*ceil((n_in+1)/2) + 2 clocks from start to done.
//
// Weight layout: neuron j of a network whose first-layer weights start at
// w1_base uses the words w1_base + j*ceil((n_in+1)/2) + k, k = 0.. .
// Word k holds the weights of inputs 2k (low byte) and 2k+1 (high byte).
// Input n_in is the bias. Weights past it are ignored.
//
// Interface: a start pulse, with the topology, a tag and the banks to use, is
// accepted while busy_o is low. The weight memory and the input buffer both
// answer one clock after the address (synchronous read). Each hidden value
// is written to the hidden buffer as its neuron ends. done_o pulses with the
// job for the second layer in the same clock as the last hidden write.
module first_layer
  import mlp_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  // job
  input  logic                    start_i,
  input  topo_t                   topo_i,
  input  tag_t                    tag_i,
  input  logic                    ibank_i,
  input  logic                    hbank_i,
  output logic                    busy_o,
  output logic                    done_o,
  output l2_job_t                 job_o,
  // input buffer read port
  output logic                    ib_rbank_o,
  output logic [IN_IDX_W-2:0]     ib_rpair_o,
  input  logic signed [V_W-1:0]   ib_rdata_i [NMUL],
  // weight memory read port
  output logic                    w_rd_o,
  output logic [WADDR_W-1:0]      w_addr_o,
  input  logic [WWORD_W-1:0]      w_data_i,
  // hidden buffer write port
  output logic                    hb_we_o,
  output logic                    hb_wbank_o,
  output logic [HID_IDX_W-1:0]    hb_waddr_o,
  output logic signed [V_W-1:0]   hb_wdata_o
);

  // job registers
  topo_t               topo_q;
  tag_t                tag_q;
  logic                ibank_q, hbank_q;
  logic [5:0]          nw_q;         // words per neuron

  // issue stage
  logic                issuing;
  logic [7:0]          j_q;          // neuron being issued
  logic [5:0]          p_q;          // word within neuron
  logic [WADDR_W-1:0]  addr_q;

  // execute stage (data returns)
  logic                v1, first1, last1;
  logic [5:0]          p1;
  logic [HID_IDX_W-1:0] j1;
  logic signed [ACC_W-1:0] acc_q, acc_next, psum;
  logic signed [V_W:0] xop [NMUL];
  logic signed [V_W-1:0] act;

  wire last_word   = (p_q == nw_q - 6'd1);
  wire last_neuron = (j_q == topo_q.n_hid - 8'd1);

  assign ib_rbank_o = ibank_q;
  assign ib_rpair_o = p_q[IN_IDX_W-2:0];
  assign w_rd_o     = issuing;
  assign w_addr_o   = addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0;
      busy_o  <= 1'b0;
      j_q     <= '0;
      p_q     <= '0;
      addr_q  <= '0;
      topo_q  <= '0;
      tag_q   <= '0;
      ibank_q <= 1'b0;
      hbank_q <= 1'b0;
      nw_q    <= '0;
      v1      <= 1'b0;
      first1  <= 1'b0;
      last1   <= 1'b0;
      p1      <= '0;
      j1      <= '0;
    end else begin
      if (start_i && !busy_o) begin
        topo_q  <= topo_i;
        tag_q   <= tag_i;
        ibank_q <= ibank_i;
        hbank_q <= hbank_i;
        nw_q    <= l1_words(topo_i.n_in);
        addr_q  <= topo_i.w1_base;
        j_q     <= '0;
        p_q     <= '0;
        issuing <= 1'b1;
        busy_o  <= 1'b1;
      end else if (issuing) begin
        addr_q <= addr_q + 1'b1;
        if (last_word) begin
          p_q <= '0;
          j_q <= j_q + 8'd1;
          if (last_neuron) issuing <= 1'b0;
        end else begin
          p_q <= p_q + 6'd1;
        end
      end
      if (done_o) busy_o <= 1'b0;
      v1     <= issuing;
      first1 <= (p_q == 6'd0);
      last1  <= last_word;
      p1     <= p_q;
      j1     <= j_q[HID_IDX_W-1:0];
    end
  end

  // operand selection: inputs, then the bias, then zeros
  always_comb begin
    for (int m = 0; m < NMUL; m++) begin
      logic [7:0] idx;
      idx = 8'({p1, 1'b0}) + 8'(m);
      if (idx < 8'(topo_q.n_in))       xop[m] = (V_W+1)'(ib_rdata_i[m]);
      else if (idx == 8'(topo_q.n_in)) xop[m] = BIAS_VALUE;
      else                             xop[m] = '0;
    end
    psum = ACC_W'($signed(w_data_i[7:0])  * xop[0])
         + ACC_W'($signed(w_data_i[15:8]) * xop[1]);
    acc_next = first1 ? psum : acc_q + psum;
  end

  neuron_activation u_act (.acc_i(acc_next), .y_o(act));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q      <= '0;
      hb_we_o    <= 1'b0;
      hb_wbank_o <= 1'b0;
      hb_waddr_o <= '0;
      hb_wdata_o <= '0;
      done_o     <= 1'b0;
    end else begin
      if (v1) acc_q <= acc_next;
      hb_we_o    <= v1 && last1;
      hb_wbank_o <= hbank_q;
      hb_waddr_o <= j1;
      hb_wdata_o <= act;
      done_o     <= v1 && last1 && (8'(j1) == topo_q.n_hid - 8'd1);
    end
  end

  assign job_o = '{topo: topo_q, tag: tag_q, hbank: hbank_q};

endmodule
