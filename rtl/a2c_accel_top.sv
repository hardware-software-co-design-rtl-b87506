// a2c_accel_top: programmable-logic side of an actor-critic (A2C) training
// platform shared by several agents.
//
// The host (processor system) runs the environments, samples actions,
// computes the losses and applies the weight updates. This block does the
// neural-network arithmetic for it: forward passes of the actor and the
// critic, and the back-propagated gradients of either network. A single
// feed-forward engine and a single gradient engine serve every agent and
// both networks by time multiplexing:
//
//   s_axis --> obs_stream_rx --(one slot per agent)--> rr_scheduler
//                                                          |
//        weight_mem (host-written) --> ff_engine --> grad_engine
//                                          |             |
//                                 result packet   gradient packet --> m_axis
//                                                        |
//                                         meta_optimizer (lr, schedule)
//
// An inference job runs the actor and then the critic on the agent's
// observation and returns  header, n_out logits, value. A gradient job re-runs
// the forward pass of the chosen network on the observation and then streams
// header, dW2/db2 (n_out x (n_hid+1)), dW1/db1 (n_hid x (n_in+1)); its
// gradient magnitude goes to the meta-optimizer. Each finished inference job
// counts as one environment step for the update schedule.
//
// Output header beat: [7:0] agent, [8] 0 result / 1 gradients, [9] network
// of a gradient packet, [10] a weight update has fallen due since the last
// header (update_period steps elapsed), [12:11] meta-optimizer mode. Data
// beats carry one Q8.8 value, sign-extended to 32 bits; tlast marks the last.
//
// Run-time sizes cfg_n_in/cfg_n_hid/cfg_n_out (actor outputs; the critic
// always has one) must stay constant while jobs are in flight. Weights are
// written through the wr_* port while no job runs.
//
// Timing: an inference job holds the feed-forward engine for two passes
// (see ff_engine) plus n_out+2 output beats; a gradient job for one pass,
// one header beat and the gradient stream (see grad_engine). Jobs run one at
// a time; the next grant is taken in the cycle after a job's last beat.
//
// The host/logic split, the shared engines, round-robin agent service,
// streamed observations and the in-logic meta-optimizer follow the
// architecture this design implements; the packet formats, the job
// sequencing and the plain host ports (weight writes, sizes, returns) are
// this design's own.
module a2c_accel_top
  import a2c_pkg::*;
#(
  parameter int N_P       = N_AGENTS,
  parameter int LANES_P   = LANES,
  parameter int MAX_IN_P  = MAX_IN,
  parameter int MAX_HID_P = MAX_HID,
  parameter int MAX_OUT_P = MAX_OUT,
  localparam int IW       = (N_P > 1) ? $clog2(N_P) : 1
) (
  input  logic clk,
  input  logic rst_n,
  // run-time configuration
  input  dim_t cfg_n_in,
  input  dim_t cfg_n_hid,
  input  dim_t cfg_n_out,
  // weight load (host)
  input  logic wr_en,
  input  net_t wr_net,
  input  logic wr_layer,
  input  dim_t wr_row,
  input  dim_t wr_col,
  input  fx_t  wr_data,
  // job stream in
  input  logic [AXIS_W-1:0] s_axis_tdata,
  input  logic              s_axis_tvalid,
  output logic              s_axis_tready,
  input  logic              s_axis_tlast,
  // result / gradient stream out
  output logic [AXIS_W-1:0] m_axis_tdata,
  output logic              m_axis_tvalid,
  input  logic              m_axis_tready,
  output logic              m_axis_tlast,
  // episode returns (host) and meta-optimizer outputs
  input  logic              reward_valid,
  input  logic signed [15:0] reward,
  output opt_state_t        opt_state,
  output logic [15:0]       opt_lr,
  output logic [7:0]        opt_update_period,
  output logic              opt_update_due,
  output logic              rx_err,
  output logic              busy
);

  localparam int C1      = (MAX_IN_P + 1 + LANES_P - 1) / LANES_P;
  localparam int C2      = (MAX_HID_P + 1 + LANES_P - 1) / LANES_P;
  localparam int IN_ROW  = C1 * LANES_P;
  localparam int HID_ROW = C2 * LANES_P;

  // ---------------- input slots ----------------
  logic [N_P-1:0] pending;
  job_t           slot_job   [N_P];
  net_t           slot_net   [N_P];
  fx_t            slot_obs   [N_P][MAX_IN_P];
  fx_t            slot_delta [N_P][MAX_OUT_P];
  logic           slot_clear;
  logic [IW-1:0]  cur;

  obs_stream_rx #(.N_P(N_P), .MAX_IN_P(MAX_IN_P), .MAX_OUT_P(MAX_OUT_P)) u_rx (
    .clk, .rst_n, .n_in(cfg_n_in),
    .s_tdata(s_axis_tdata), .s_tvalid(s_axis_tvalid), .s_tready(s_axis_tready),
    .s_tlast(s_axis_tlast),
    .pending, .slot_job, .slot_net, .slot_obs, .slot_delta,
    .clear(slot_clear), .clear_id(cur), .err(rx_err)
  );

  // ---------------- scheduler ----------------
  typedef enum logic [2:0] {T_IDLE, T_ACT, T_CRIT, T_RHDR, T_RES, T_GFF, T_GHDR, T_GRAD} tstate_t;
  tstate_t        st;
  logic           grant_valid, grant_take;
  logic [IW-1:0]  grant_id;

  assign grant_take = (st == T_IDLE) && grant_valid;

  rr_scheduler #(.N_P(N_P)) u_sched (
    .clk, .rst_n, .req(pending), .accept(grant_take),
    .grant_valid, .grant_id, .grant_oh()
  );

  // ---------------- weight memory ----------------
  logic a_rd_en, a_rd_layer, b_rd_en, b_rd_layer;
  net_t a_rd_net, b_rd_net;
  dim_t a_rd_row, a_rd_chunk, b_rd_row, b_rd_chunk;
  fx_t  a_rd_data [LANES_P];
  fx_t  b_rd_data [LANES_P];

  weight_mem #(.LANES_P(LANES_P), .MAX_IN_P(MAX_IN_P), .MAX_HID_P(MAX_HID_P),
               .MAX_OUT_P(MAX_OUT_P)) u_wmem (
    .clk,
    .wr_en, .wr_net, .wr_layer, .wr_row, .wr_col, .wr_data,
    .a_rd_en, .a_rd_net, .a_rd_layer, .a_rd_row, .a_rd_chunk, .a_rd_data,
    .b_rd_en, .b_rd_net, .b_rd_layer, .b_rd_row, .b_rd_chunk, .b_rd_data
  );

  // ---------------- feed-forward engine ----------------
  logic    ff_start, ff_busy, ff_done;
  net_t    ff_net;
  dim_t    ff_n_out;
  fx_t     ff_x  [MAX_IN_P];
  fx_t     ff_y  [MAX_OUT_P];
  fx_t     x_act [IN_ROW];
  fx_t     h_act [HID_ROW];
  logic [IW-1:0] sel;
  net_t    net_q;

  always_comb begin
    sel      = (st == T_IDLE) ? grant_id : cur;
    ff_start = grant_take || (st == T_ACT && ff_done);
    if (st == T_IDLE)
      ff_net = (slot_job[sel] == JOB_GRAD) ? slot_net[sel] : NET_ACTOR;
    else
      ff_net = NET_CRITIC;
    ff_n_out = (ff_net == NET_CRITIC) ? dim_t'(1) : cfg_n_out;
    for (int i = 0; i < MAX_IN_P; i++) ff_x[i] = slot_obs[sel][i];
  end

  ff_engine #(.LANES_P(LANES_P), .MAX_IN_P(MAX_IN_P), .MAX_HID_P(MAX_HID_P),
              .MAX_OUT_P(MAX_OUT_P)) u_ff (
    .clk, .rst_n,
    .start(ff_start), .net(ff_net), .n_in(cfg_n_in), .n_hid(cfg_n_hid),
    .n_out(ff_n_out), .x_in(ff_x), .busy(ff_busy), .done(ff_done),
    .y(ff_y), .x_act, .h_act,
    .rd_en(a_rd_en), .rd_net(a_rd_net), .rd_layer(a_rd_layer),
    .rd_row(a_rd_row), .rd_chunk(a_rd_chunk), .rd_data(a_rd_data)
  );

  // ---------------- gradient engine ----------------
  logic        g_start, g_busy, g_done, g_valid, g_ready, g_last;
  fx_t         g_data;
  logic [31:0] grad_l1;
  fx_t         g_delta [MAX_OUT_P];

  always_comb
    for (int k = 0; k < MAX_OUT_P; k++) g_delta[k] = slot_delta[cur][k];

  grad_engine #(.LANES_P(LANES_P), .MAX_IN_P(MAX_IN_P), .MAX_HID_P(MAX_HID_P),
                .MAX_OUT_P(MAX_OUT_P)) u_grad (
    .clk, .rst_n,
    .start(g_start), .net(net_q), .n_in(cfg_n_in), .n_hid(cfg_n_hid),
    .n_out((net_q == NET_CRITIC) ? dim_t'(1) : cfg_n_out),
    .delta(g_delta), .x_act, .h_act,
    .busy(g_busy), .done(g_done), .grad_l1,
    .g_valid, .g_ready, .g_data, .g_last,
    .rd_en(b_rd_en), .rd_net(b_rd_net), .rd_layer(b_rd_layer),
    .rd_row(b_rd_row), .rd_chunk(b_rd_chunk), .rd_data(b_rd_data)
  );

  // ---------------- meta-optimizer ----------------
  logic step_pulse;

  meta_optimizer u_meta (
    .clk, .rst_n,
    .grad_valid(g_done), .grad_l1,
    .reward_valid, .reward,
    .step(step_pulse),
    .state(opt_state), .lr(opt_lr), .update_period(opt_update_period),
    .update_due(opt_update_due)
  );

  // ---------------- job sequencing and output stream ----------------
  fx_t  logits [MAX_OUT_P];
  fx_t  value;
  dim_t beat;
  logic upd_flag;
  logic hdr_fire, res_last;

  always_comb begin
    m_axis_tvalid = 1'b0;
    m_axis_tdata  = '0;
    m_axis_tlast  = 1'b0;
    g_ready       = 1'b0;
    res_last      = (beat == cfg_n_out);
    unique case (st)
      T_RHDR, T_GHDR: begin
        m_axis_tvalid = 1'b1;
        m_axis_tdata  = AXIS_W'({opt_state, upd_flag, net_q, (st == T_GHDR), 8'(cur)});
      end
      T_RES: begin
        m_axis_tvalid = 1'b1;
        m_axis_tdata  = AXIS_W'($signed(res_last ? value : logits[int'(beat) % MAX_OUT_P]));
        m_axis_tlast  = res_last;
      end
      T_GRAD: begin
        m_axis_tvalid = g_valid;
        m_axis_tdata  = AXIS_W'($signed(g_data));
        m_axis_tlast  = g_last;
        g_ready       = m_axis_tready;
      end
      default: ;
    endcase
    hdr_fire   = (st == T_RHDR || st == T_GHDR) && m_axis_tready;
    g_start    = (st == T_GHDR) && m_axis_tready;
    step_pulse = (st == T_RES) && m_axis_tready && res_last;
    slot_clear = step_pulse || (st == T_GRAD && g_done);
    busy       = (st != T_IDLE) || ff_busy || g_busy;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= T_IDLE;
      cur      <= '0;
      net_q    <= NET_ACTOR;
      beat     <= '0;
      value    <= '0;
      upd_flag <= 1'b0;
      for (int k = 0; k < MAX_OUT_P; k++) logits[k] <= '0;
    end else begin
      if (opt_update_due)  upd_flag <= 1'b1;
      else if (hdr_fire)   upd_flag <= 1'b0;

      unique case (st)
        T_IDLE: if (grant_take) begin
          cur   <= grant_id;
          net_q <= ff_net;
          st    <= (slot_job[grant_id] == JOB_GRAD) ? T_GFF : T_ACT;
        end
        T_ACT: if (ff_done) begin
          for (int k = 0; k < MAX_OUT_P; k++) logits[k] <= ff_y[k];
          st <= T_CRIT;
        end
        T_CRIT: if (ff_done) begin
          value <= ff_y[0];
          beat  <= '0;
          st    <= T_RHDR;
        end
        T_RHDR: if (m_axis_tready) st <= T_RES;
        T_RES: if (m_axis_tready) begin
          beat <= beat + 1;
          if (res_last) st <= T_IDLE;
        end
        T_GFF:  if (ff_done) st <= T_GHDR;
        T_GHDR: if (m_axis_tready) st <= T_GRAD;
        T_GRAD: if (g_done) st <= T_IDLE;
        default: st <= T_IDLE;
      endcase
    end
  end

  // The output stream must hold a beat until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata));

endmodule
