// ff_engine: the shared feed-forward engine. One instance evaluates both the
// actor and the critic network (they differ only in the weights it reads) for
// every agent, one pass at a time.
//
// A pass computes h = ReLU(W1 * [x;1]) and y = W2 * [h;1] for the network
// selected by `net`, with run-time sizes n_in, n_hid and n_out (at most
// MAX_IN, MAX_HID, MAX_OUT), so tasks of different sizes run without a new
// bitstream. The matrix-vector products run on LANES multipliers: each cycle
// one LANES-wide chunk of one weight row is read from weight_mem and its dot
// product with the matching chunk of the input is added to an accumulator.
// When a row's last chunk is in, the sum is shifted back to Q8.8, saturated,
// and (for the hidden layer) clipped at zero.
//
// Pipeline: issue (row/chunk counters drive the weight read address and pick
// the input chunk) -> multiply-accumulate (weights arrive from the memory).
// One idle cycle separates the layers so that the last hidden value is
// written before the output layer reads it.
//
// Interface: pulse `start` with net, sizes and x_in valid; x_in is copied at
// the start. `done` pulses for one cycle when y is valid. x_act and h_act
// hold the padded input [x;1;0..] and hidden [h;1;0..] vectors of the last
// pass until the next start; the gradient engine reads them.
//
// Timing: with N1 = n_hid*ceil((n_in+1)/LANES) and
// N2 = n_out*ceil((n_hid+1)/LANES), `done` rises N1+N2+3 cycles after the
// cycle in which `start` was high. `start` is ignored while busy.
//
// One hidden layer, ReLU, a linear output layer, the bias-as-extra-input
// scheme and the fixed-point format are this design's choices; sharing one
// engine between actor, critic and all agents follows the architecture.
module ff_engine
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
  input  fx_t   x_in [MAX_IN_P],
  output logic  busy,
  output logic  done,
  // results
  output fx_t   y     [MAX_OUT_P],
  output fx_t   x_act [IN_ROW],
  output fx_t   h_act [HID_ROW],
  // weight memory read port
  output logic  rd_en,
  output net_t  rd_net,
  output logic  rd_layer,
  output dim_t  rd_row,
  output dim_t  rd_chunk,
  input  fx_t   rd_data [LANES_P]
);

  typedef enum logic [2:0] {S_IDLE, S_L1, S_GAP, S_L2, S_FLUSH} state_t;

  state_t state;
  net_t   net_q;
  dim_t   n_hid_q, n_out_q, nch1_q, nch2_q;
  dim_t   row, chunk;

  // issue -> MAC pipeline register
  logic   p_valid, p_first, p_last, p_layer;
  dim_t   p_row;
  fx_t    p_x [LANES_P];
  acc_t   acc;

  assign busy     = (state != S_IDLE);
  assign rd_en    = (state == S_L1) || (state == S_L2);
  assign rd_net   = net_q;
  assign rd_layer = (state == S_L2);
  assign rd_row   = row;
  assign rd_chunk = chunk;

  // Dot product of the weight chunk arriving from memory with the input chunk.
  acc_t dot, acc_next;
  always_comb begin
    dot = '0;
    for (int l = 0; l < LANES_P; l++)
      dot = dot + acc_t'(rd_data[l]) * acc_t'(p_x[l]);
    acc_next = (p_first ? acc_t'(0) : acc) + dot;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      net_q   <= NET_ACTOR;
      n_hid_q <= '0;
      n_out_q <= '0;
      nch1_q  <= '0;
      nch2_q  <= '0;
      row     <= '0;
      chunk   <= '0;
      done    <= 1'b0;
      p_valid <= 1'b0;
      p_first <= 1'b0;
      p_last  <= 1'b0;
      p_layer <= 1'b0;
      p_row   <= '0;
      acc     <= '0;
      for (int l = 0; l < LANES_P; l++) p_x[l] <= '0;
      for (int i = 0; i < IN_ROW; i++)    x_act[i] <= '0;
      for (int i = 0; i < HID_ROW; i++)   h_act[i] <= '0;
      for (int k = 0; k < MAX_OUT_P; k++) y[k] <= '0;
    end else begin
      done <= 1'b0;

      // ---- issue stage ----
      p_valid <= rd_en;
      p_first <= (chunk == 0);
      p_layer <= (state == S_L2);
      p_row   <= row;
      for (int l = 0; l < LANES_P; l++)
        p_x[l] <= (state == S_L2) ? h_act[int'(chunk) * LANES_P + l]
                                  : x_act[(int'(chunk) * LANES_P + l) % IN_ROW];

      unique case (state)
        S_IDLE: begin
          p_last <= 1'b0;
          if (start) begin
            net_q   <= net;
            n_hid_q <= n_hid;
            n_out_q <= n_out;
            nch1_q  <= dim_t'((int'(n_in) + LANES_P) / LANES_P);
            nch2_q  <= dim_t'((int'(n_hid) + LANES_P) / LANES_P);
            row     <= '0;
            chunk   <= '0;
            for (int i = 0; i < IN_ROW; i++)
              x_act[i] <= (i < int'(n_in) && i < MAX_IN_P) ? x_in[i % MAX_IN_P] :
                          (i == int'(n_in)) ? FX_ONE : fx_t'(0);
            for (int i = 0; i < HID_ROW; i++)
              h_act[i] <= (i == int'(n_hid)) ? FX_ONE : fx_t'(0);
            state <= S_L1;
          end
        end
        S_L1, S_L2: begin
          if (chunk == ((state == S_L1) ? nch1_q : nch2_q) - 1) begin
            p_last <= 1'b1;
            chunk  <= '0;
            if (row == ((state == S_L1) ? n_hid_q : n_out_q) - 1) begin
              row   <= '0;
              state <= (state == S_L1) ? S_GAP : S_FLUSH;
            end else begin
              row <= row + 1;
            end
          end else begin
            p_last <= 1'b0;
            chunk  <= chunk + 1;
          end
        end
        S_GAP: begin
          p_last <= 1'b0;
          state  <= S_L2;
        end
        S_FLUSH: begin
          p_last <= 1'b0;
          state  <= S_IDLE;
          done   <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase

      // ---- multiply-accumulate stage ----
      if (p_valid) begin
        acc <= acc_next;
        if (p_last) begin
          if (!p_layer) begin
            if (acc_next > 0) h_act[int'(p_row) % HID_ROW] <= fx_from_acc(acc_next);
            else              h_act[int'(p_row) % HID_ROW] <= '0;
          end else begin
            y[int'(p_row) % MAX_OUT_P] <= fx_from_acc(acc_next);
          end
        end
      end
    end
  end

endmodule
