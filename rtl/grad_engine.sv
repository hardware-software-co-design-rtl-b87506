// grad_engine: gradient computation engine for one network and one sample.
//
// The host supplies the error at the network's outputs, delta = dL/dy (for
// the actor the error at its logits, for the critic at its value); the
// engine back-propagates it through the network whose activations the
// feed-forward engine has just produced for the same sample, and streams
// out every weight and bias gradient:
//   phase BP : acc_h = W2^T * delta, on LANES multipliers, one chunk of one
//              W2 row per cycle (W2 is read from weight_mem port B)
//   phase DH : delta_h[j] = acc_h[j] (in Q8.8) if h[j] > 0, else 0  (ReLU')
//   phase G2 : dW2[k][j] = delta[k] * h[j]   for k < n_out, j <= n_hid
//   phase G1 : dW1[j][i] = delta_h[j] * x[i] for j < n_hid, i <= n_in
// (index n_hid resp. n_in is the bias, whose input is the constant 1.0).
// Because the forward pass for a sample is re-run right before its
// backward pass, only one sample's activations are ever held, whatever the
// length of the trajectory being trained on.
//
// Output: one gradient per beat on a valid/ready stream (g_valid, g_ready,
// g_data, g_last), in the order G2 row by row, then G1 row by row; the
// stream stalls while g_ready is low. grad_l1, the sum of |g| over all
// emitted gradients (saturating), is valid when `done` pulses after the last
// beat; it is the gradient-magnitude signal for the meta-optimizer.
//
// Timing: with a ready sink, the first beat is offered
// n_out*ceil((n_hid+1)/LANES)+3 cycles after `start`, and one beat follows
// per cycle. What the engine computes follows the architecture's split
// (network gradients in logic, loss and weight update on the host); the
// phase order, the stream format and the ReLU' rule (h > 0) are this
// design's choices.
module grad_engine
  import a2c_pkg::*;
#(
  parameter int LANES_P   = LANES,
  parameter int MAX_IN_P  = MAX_IN,
  parameter int MAX_HID_P = MAX_HID,
  parameter int MAX_OUT_P = MAX_OUT,
  localparam int C1       = (MAX_IN_P + 1 + LANES_P - 1) / LANES_P,
  localparam int C2       = (MAX_HID_P + 1 + LANES_P - 1) / LANES_P,
  localparam int IN_ROW   = C1 * LANES_P,
  localparam int HID_ROW  = C2 * LANES_P
) (
  input  logic clk,
  input  logic rst_n,
  // command
  input  logic  start,
  input  net_t  net,
  input  dim_t  n_in,
  input  dim_t  n_hid,
  input  dim_t  n_out,
  input  fx_t   delta [MAX_OUT_P],
  input  fx_t   x_act [IN_ROW],
  input  fx_t   h_act [HID_ROW],
  output logic  busy,
  output logic  done,
  output logic [31:0] grad_l1,
  // gradient stream
  output logic  g_valid,
  input  logic  g_ready,
  output fx_t   g_data,
  output logic  g_last,
  // weight memory read port (layer 2 rows)
  output logic  rd_en,
  output net_t  rd_net,
  output logic  rd_layer,
  output dim_t  rd_row,
  output dim_t  rd_chunk,
  input  fx_t   rd_data [LANES_P]
);

  typedef enum logic [2:0] {S_IDLE, S_BP, S_BPFLUSH, S_DH, S_G2, S_G1} state_t;

  state_t state;
  net_t   net_q;
  dim_t   n_in_q, n_hid_q, n_out_q, nch2_q;
  dim_t   row, col;                 // BP: row=k, col=chunk; G2/G1: row, column
  fx_t    delta_q [MAX_OUT_P];
  acc_t   acc_h   [HID_ROW];
  fx_t    delta_h [HID_ROW];
  logic   p_valid;
  dim_t   p_row, p_chunk;

  assign busy     = (state != S_IDLE);
  assign rd_en    = (state == S_BP);
  assign rd_net   = net_q;
  assign rd_layer = 1'b1;
  assign rd_row   = row;
  assign rd_chunk = col;

  // Current gradient beat.
  logic row_end, last_beat;
  always_comb begin
    g_valid = (state == S_G2) || (state == S_G1);
    if (state == S_G2)
      g_data = fx_mul(delta_q[int'(row) % MAX_OUT_P], h_act[int'(col) % HID_ROW]);
    else
      g_data = fx_mul(delta_h[int'(row) % HID_ROW], x_act[int'(col) % IN_ROW]);
    row_end   = (state == S_G2) ? (col == n_hid_q) : (col == n_in_q);
    last_beat = (state == S_G1) && row_end && (row == n_hid_q - 1);
    g_last    = last_beat;
  end

  logic [31:0] g_abs;
  logic [32:0] l1_sum;
  always_comb begin
    g_abs  = (g_data < 0) ? 32'(-int'(g_data)) : 32'(int'(g_data));
    l1_sum = {1'b0, grad_l1} + {1'b0, g_abs};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      net_q   <= NET_ACTOR;
      n_in_q  <= '0;
      n_hid_q <= '0;
      n_out_q <= '0;
      nch2_q  <= '0;
      row     <= '0;
      col     <= '0;
      p_valid <= 1'b0;
      p_row   <= '0;
      p_chunk <= '0;
      done    <= 1'b0;
      grad_l1 <= '0;
      for (int k = 0; k < MAX_OUT_P; k++) delta_q[k] <= '0;
      for (int j = 0; j < HID_ROW; j++) begin
        acc_h[j]   <= '0;
        delta_h[j] <= '0;
      end
    end else begin
      done    <= 1'b0;
      p_valid <= rd_en;
      p_row   <= row;
      p_chunk <= col;

      // BP multiply-accumulate: one W2 chunk times delta[k] per cycle.
      if (p_valid)
        for (int l = 0; l < LANES_P; l++)
          acc_h[(int'(p_chunk) * LANES_P + l) % HID_ROW] <=
            acc_h[(int'(p_chunk) * LANES_P + l) % HID_ROW] +
            acc_t'(rd_data[l]) * acc_t'(delta_q[int'(p_row) % MAX_OUT_P]);

      unique case (state)
        S_IDLE: begin
          if (start) begin
            net_q   <= net;
            n_in_q  <= n_in;
            n_hid_q <= n_hid;
            n_out_q <= n_out;
            nch2_q  <= dim_t'((int'(n_hid) + LANES_P) / LANES_P);
            for (int k = 0; k < MAX_OUT_P; k++)
              delta_q[k] <= (k < int'(n_out)) ? delta[k] : fx_t'(0);
            for (int j = 0; j < HID_ROW; j++) acc_h[j] <= '0;
            grad_l1 <= '0;
            row     <= '0;
            col     <= '0;
            state   <= S_BP;
          end
        end
        S_BP: begin
          if (col == nch2_q - 1) begin
            col <= '0;
            if (row == n_out_q - 1) begin
              row   <= '0;
              state <= S_BPFLUSH;
            end else begin
              row <= row + 1;
            end
          end else begin
            col <= col + 1;
          end
        end
        S_BPFLUSH: state <= S_DH;
        S_DH: begin
          for (int j = 0; j < HID_ROW; j++)
            delta_h[j] <= (j < int'(n_hid_q) && h_act[j] > 0) ? fx_from_acc(acc_h[j]) : fx_t'(0);
          state <= S_G2;
        end
        S_G2, S_G1: begin
          if (g_ready) begin
            grad_l1 <= l1_sum[32] ? 32'hffff_ffff : l1_sum[31:0];
            if (row_end) begin
              col <= '0;
              if (last_beat) begin
                row   <= '0;
                state <= S_IDLE;
                done  <= 1'b1;
              end else if (state == S_G2 && row == n_out_q - 1) begin
                row   <= '0;
                state <= S_G1;
              end else begin
                row <= row + 1;
              end
            end else begin
              col <= col + 1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
