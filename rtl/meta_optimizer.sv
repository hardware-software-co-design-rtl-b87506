// meta_optimizer: finite-state meta-optimizer that picks the learning mode of
// on-device actor-critic training and, from it, the learning rate and the
// update schedule, without any help from the host.
//
// Inputs are events: grad_valid with grad_l1 (the L1 magnitude of one
// gradient set, from the gradient engine), reward_valid with the return of a
// finished episode (from the host), and step (one environment step served).
// From them it keeps:
//   * grad_ema   - moving average of the gradient magnitude (weight 1/8);
//                  a gradient above SPIKE_MUL x grad_ema is a spike
//   * reward_ema - moving average of the episode return (weight 1/4);
//                  progress = reward - reward_ema
//   * osc_cnt    - oscillation score: +1 when progress changes sign with
//                  |progress| > PLAT_TH, -1 (down to 0) otherwise
// Modes and transitions:
//   any mode   -> STABILIZE  on a spike, progress < -DROP_TH, or
//                            osc_cnt reaching OSC_TH
//   STABILIZE  -> REFINE     after CALM_N calm episodes in a row
//   REFINE     -> AGGRESSIVE after PROG_N episodes with progress > PROG_TH
//   AGGRESSIVE -> REFINE     after PLAT_N episodes with |progress| <= PLAT_TH
// Each mode sets lr (unsigned Q0.16) and update_period (environment steps
// between weight updates); update_due pulses every update_period steps.
//
// Timing: the new mode, lr and update_period are visible one cycle after the
// event that caused them. Reset enters AGGRESSIVE with empty averages; the
// first gradient and first reward only initialise the averages.
// The three modes, the monitored signals and the adjusted hyperparameters
// follow the architecture; the averages, thresholds and per-mode values are
// this design's choices and are parameters.
module meta_optimizer
  import a2c_pkg::*;
#(
  parameter logic [15:0] LR_AGGR      = 16'd262,  // ~0.004
  parameter logic [15:0] LR_REFINE    = 16'd66,   // ~0.001
  parameter logic [15:0] LR_STAB      = 16'd16,   // ~0.00025
  parameter logic [7:0]  PERIOD_AGGR  = 8'd5,
  parameter logic [7:0]  PERIOD_REFINE = 8'd10,
  parameter logic [7:0]  PERIOD_STAB  = 8'd20,
  parameter int          SPIKE_MUL    = 2,
  parameter int          DROP_TH      = 20,
  parameter int          PROG_TH      = 5,
  parameter int          PLAT_TH      = 2,
  parameter int          OSC_TH       = 3,
  parameter int          CALM_N       = 4,
  parameter int          PROG_N       = 3,
  parameter int          PLAT_N       = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              grad_valid,
  input  logic [31:0]       grad_l1,
  input  logic              reward_valid,
  input  logic signed [15:0] reward,
  input  logic              step,
  output opt_state_t        state,
  output logic [15:0]       lr,
  output logic [7:0]        update_period,
  output logic              update_due
);

  logic        g_init, r_init;
  logic [31:0] grad_ema;
  logic signed [17:0] reward_ema;
  logic signed [17:0] last_prog;
  logic [3:0]  osc_cnt, calm_cnt, prog_cnt, plat_cnt;
  logic [7:0]  step_cnt;

  // ---- event evaluation ----
  logic              spike, drop, gain, flat, flip, unstable, r_ev;
  logic signed [17:0] progress;
  logic [3:0]        osc_next;
  logic signed [33:0] g_diff;

  always_comb begin
    g_diff   = $signed({2'b00, grad_l1}) - $signed({2'b00, grad_ema});
    spike    = grad_valid && g_init &&
               ({2'b00, grad_l1} > 34'(grad_ema) * 34'(SPIKE_MUL));
    r_ev     = reward_valid && r_init;
    progress = 18'(reward) - reward_ema;
    drop     = r_ev && (progress < -18'(DROP_TH));
    gain     = r_ev && (progress > 18'(PROG_TH));
    flat     = r_ev && (progress <= 18'(PLAT_TH)) && (progress >= -18'(PLAT_TH));
    flip     = r_ev && !flat &&
               (((progress > 0) && (last_prog < -18'(PLAT_TH))) ||
                ((progress < 0) && (last_prog >  18'(PLAT_TH))));
    osc_next = osc_cnt;
    if (r_ev) begin
      if (flip)              osc_next = (osc_cnt == 4'hf) ? osc_cnt : osc_cnt + 1;
      else if (osc_cnt != 0) osc_next = osc_cnt - 1;
    end
    unstable = spike || drop || (r_ev && int'(osc_next) >= OSC_TH);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= OPT_AGGRESSIVE;
      g_init     <= 1'b0;
      r_init     <= 1'b0;
      grad_ema   <= '0;
      reward_ema <= '0;
      last_prog  <= '0;
      osc_cnt    <= '0;
      calm_cnt   <= '0;
      prog_cnt   <= '0;
      plat_cnt   <= '0;
    end else begin
      // averages
      if (grad_valid) begin
        g_init   <= 1'b1;
        grad_ema <= g_init ? 32'($signed({2'b00, grad_ema}) + (g_diff >>> 3)) : grad_l1;
      end
      if (reward_valid) begin
        r_init     <= 1'b1;
        reward_ema <= r_init ? reward_ema + (progress >>> 2) : 18'(reward);
        last_prog  <= r_init ? progress : '0;
        osc_cnt    <= osc_next;
      end

      // mode transitions
      if (unstable) begin
        state    <= OPT_STABILIZE;
        calm_cnt <= '0;
        prog_cnt <= '0;
        plat_cnt <= '0;
      end else if (r_ev) begin
        unique case (state)
          OPT_STABILIZE: begin
            if (int'(calm_cnt) + 1 >= CALM_N) begin
              state    <= OPT_REFINE;
              calm_cnt <= '0;
            end else calm_cnt <= calm_cnt + 1;
          end
          OPT_REFINE: begin
            if (gain) begin
              if (int'(prog_cnt) + 1 >= PROG_N) begin
                state    <= OPT_AGGRESSIVE;
                prog_cnt <= '0;
              end else prog_cnt <= prog_cnt + 1;
            end else prog_cnt <= '0;
          end
          OPT_AGGRESSIVE: begin
            if (flat) begin
              if (int'(plat_cnt) + 1 >= PLAT_N) begin
                state    <= OPT_REFINE;
                plat_cnt <= '0;
              end else plat_cnt <= plat_cnt + 1;
            end else plat_cnt <= '0;
          end
          default: state <= OPT_AGGRESSIVE;
        endcase
      end
    end
  end

  // hyperparameters of the current mode
  always_comb begin
    unique case (state)
      OPT_STABILIZE: begin lr = LR_STAB;   update_period = PERIOD_STAB;   end
      OPT_REFINE:    begin lr = LR_REFINE; update_period = PERIOD_REFINE; end
      default:       begin lr = LR_AGGR;   update_period = PERIOD_AGGR;   end
    endcase
  end

  // update scheduling
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_cnt   <= '0;
      update_due <= 1'b0;
    end else begin
      update_due <= 1'b0;
      if (step) begin
        if (step_cnt + 8'd1 >= update_period) begin
          step_cnt   <= '0;
          update_due <= 1'b1;
        end else step_cnt <= step_cnt + 8'd1;
      end
    end
  end

endmodule
