// second_layer: the SECOND LAYER matrix-vector multiplier of the MLP chip.
//
// It computes every output neuron of one pattern from the hidden values:
//     o[k] = f( sum_j W2[k][j] * h[j] + W2[k][n_hid] * 1.0 ).
// The chip description says the two layers follow different computational
// schemes and run in parallel. The schemes are not given; this layer's is
// this design's choice. The first layer goes neuron by neuron, but this layer
// goes hidden value by hidden value. It reads one hidden value h[j] per
// clock. Its two multipliers apply it to two outputs at once, adding into an
// on-chip accumulator RAM (one entry per output). Row j thus takes
// ceil(n_out/2) clocks, and row n_hid is the bias row with h = 1.0. The
// hidden bank is free once the last row has been read. rows_done_o pulses
// then, and the first layer may refill it.
//
// After the rows comes a readout phase. It passes the outputs one per clock,
// in index order, through the activation function to out_*_o, which feed the
// class sorter. out_clear_o pulses as the readout begins, so the sorter keeps
// the previous pattern's list during the rows of the next one. done_o pulses
// together with the last output.
//
// Weight layout: row j uses the words w2_base + j*ceil(n_out/2) + q. Word q
// holds the weights of outputs 2q (low byte) and 2q+1 (high byte).
// Timing: rows_done_o comes (n_hid+1)*ceil(n_out/2) + 2 clocks after start,
// and done_o n_out clocks after that.
// The weight memory and the hidden buffer both answer one clock after the
// address.
module second_layer
  import mlp_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start_i,
  input  l2_job_t                 job_i,
  output logic                    busy_o,
  output logic                    rows_done_o,
  output logic                    done_o,
  output tag_t                    done_tag_o,
  // hidden buffer read port
  output logic                    hb_rbank_o,
  output logic [HID_IDX_W-1:0]    hb_raddr_o,
  input  logic signed [V_W-1:0]   hb_rdata_i,
  // weight memory read port
  output logic                    w_rd_o,
  output logic [WADDR_W-1:0]      w_addr_o,
  input  logic [WWORD_W-1:0]      w_data_i,
  // outputs in index order, to the class sorter
  output logic                    out_clear_o,
  output logic                    out_valid_o,
  output logic [OUT_IDX_W-1:0]    out_idx_o,
  output logic signed [V_W-1:0]   out_val_o
);

  typedef enum logic [1:0] {S_IDLE, S_ROWS, S_DRAIN, S_READ} state_t;
  state_t state;

  l2_job_t             job_q;
  logic [5:0]          nq_q;
  logic [7:0]          j_q;        // row being issued (n_hid = bias row)
  logic [5:0]          q_q;
  logic [WADDR_W-1:0]  addr_q;
  logic [6:0]          k_q;        // readout index

  logic                v1, first_row1, last1;
  logic [5:0]          q1;
  logic [7:0]          j1;

  logic signed [ACC_W-1:0] acc_mem [MAX_OUT/2][NMUL];
  logic signed [V_W:0]     hop;
  logic signed [ACC_W-1:0] rd_acc;
  logic signed [V_W-1:0]   act;

  wire last_word = (q_q == nq_q - 6'd1);
  wire last_row  = (j_q == job_q.topo.n_hid);

  assign busy_o     = (state != S_IDLE);
  assign done_tag_o = job_q.tag;
  assign hb_rbank_o = job_q.hbank;
  assign hb_raddr_o = j_q[HID_IDX_W-1:0];
  assign w_rd_o     = (state == S_ROWS);
  assign w_addr_o   = addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      job_q       <= '0;
      nq_q        <= '0;
      j_q         <= '0;
      q_q         <= '0;
      addr_q      <= '0;
      k_q         <= '0;
      v1          <= 1'b0;
      first_row1  <= 1'b0;
      last1       <= 1'b0;
      q1          <= '0;
      j1          <= '0;
      rows_done_o <= 1'b0;
      done_o      <= 1'b0;
      out_clear_o <= 1'b0;
      out_valid_o <= 1'b0;
      out_idx_o   <= '0;
      out_val_o   <= '0;
    end else begin
      rows_done_o <= 1'b0;
      done_o      <= 1'b0;
      out_clear_o <= 1'b0;
      out_valid_o <= 1'b0;
      v1          <= (state == S_ROWS);
      first_row1  <= (j_q == 8'd0);
      last1       <= last_word && last_row;
      q1          <= q_q;
      j1          <= j_q;
      unique case (state)
        S_IDLE: if (start_i) begin
          job_q       <= job_i;
          nq_q        <= l2_words(job_i.topo.n_out);
          addr_q      <= job_i.topo.w2_base;
          j_q         <= '0;
          q_q         <= '0;
          state       <= S_ROWS;
        end
        S_ROWS: begin
          addr_q <= addr_q + 1'b1;
          if (last_word) begin
            q_q <= '0;
            j_q <= j_q + 8'd1;
            if (last_row) state <= S_DRAIN;
          end else begin
            q_q <= q_q + 6'd1;
          end
        end
        S_DRAIN: if (v1 && last1) begin
          rows_done_o <= 1'b1;
          out_clear_o <= 1'b1;
          k_q         <= '0;
          state       <= S_READ;
        end
        S_READ: begin
          out_valid_o <= 1'b1;
          out_idx_o   <= k_q[OUT_IDX_W-1:0];
          out_val_o   <= act;
          k_q         <= k_q + 7'd1;
          if (k_q == job_q.topo.n_out - 7'd1) begin
            done_o <= 1'b1;
            state  <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // accumulate: one hidden value against two outputs per clock
  always_comb hop = (j1 == job_q.topo.n_hid) ? BIAS_VALUE : (V_W+1)'(hb_rdata_i);

  always_ff @(posedge clk) begin
    if (v1) begin
      for (int m = 0; m < NMUL; m++) begin
        acc_mem[q1[4:0]][m] <= (first_row1 ? '0 : acc_mem[q1[4:0]][m])
                             + ACC_W'($signed(w_data_i[m*W_W +: W_W]) * hop);
      end
    end
  end

  // readout through the activation function
  assign rd_acc = acc_mem[k_q[5:1]][k_q[0]];
  neuron_activation u_act (.acc_i(rd_acc), .y_o(act));

endmodule
