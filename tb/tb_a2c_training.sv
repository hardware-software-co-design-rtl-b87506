// tb_a2c_training: runs multi-agent A2C training through the accelerator,
// with this testbench playing the host: environments, action sampling, the
// A2C loss and the SGD weight update.
//
// Four agents each have their own environment. Each round, every agent's
// observation goes out as an inference job. The returned logits are turned
// into a softmax policy, an action is sampled and the environment steps.
// When an output header carries the update flag (the meta-optimizer's
// update schedule), the stored transitions of all agents become one batch.
// For each transition, n-step returns bootstrapped from the current value
// estimates give the advantage A, and two gradient jobs are sent:
//   actor : dL/dlogit_k = (p_k - [k == a]) * A
//   critic: dL/dV       = V - R
// The returned gradients are averaged, scaled by the meta-optimizer's
// learning rate and applied to full-precision master weights. The weights
// are re-quantised to Q8.8 and rewritten into the accelerator. Episode
// lengths are fed back as returns, so the meta-optimizer runs on real
// training signals.
//
// Three task sizes are run, one after the other, without changing the
// hardware:
//   * 4 observations / 2 actions, with the cart-pole equations of motion
//     (force 10 N, 20 ms step, episode ends past 2.4 m or 12 degrees, or
//     after 500 steps);
//   * 6 / 3 and 8 / 4, with a simple stand-in environment of the same
//     observation and action counts (a damped, noisy linear system that the
//     first action component pushes).
//
// Every value the accelerator returns (logits, values, each gradient,
// headers) is checked against the integer reference model for the weights
// currently loaded. Learning progress is printed, not checked.
module tb_a2c_training;
  import a2c_pkg::*;
  import a2c_ref_pkg::*;

  localparam int N      = N_AGENTS;
  localparam int MAXT   = 64;      // stored transitions per agent
  localparam real GAMMA = 0.9;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  dim_t cfg_n_in = 4, cfg_n_hid = 64, cfg_n_out = 2;
  logic wr_en = 0, wr_layer = 0;
  net_t wr_net = NET_ACTOR;
  dim_t wr_row = 0, wr_col = 0;
  fx_t  wr_data = 0;
  logic [31:0] s_tdata = 0, m_tdata;
  logic s_tvalid = 0, s_tready, s_tlast = 0;
  logic m_tvalid, m_tready = 1, m_tlast;
  logic reward_valid = 0;
  logic signed [15:0] reward = 0;
  opt_state_t opt_state;
  logic [15:0] opt_lr;
  logic [7:0]  opt_update_period;
  logic opt_update_due, rx_err, busy;

  a2c_accel_top dut (
    .clk, .rst_n, .cfg_n_in, .cfg_n_hid, .cfg_n_out,
    .wr_en, .wr_net, .wr_layer, .wr_row, .wr_col, .wr_data,
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready),
    .s_axis_tlast(s_tlast),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready),
    .m_axis_tlast(m_tlast),
    .reward_valid, .reward, .opt_state, .opt_lr, .opt_update_period, .opt_update_due,
    .rx_err, .busy
  );

  // master weights (real) and their quantised copies in the accelerator
  real mw1 [2][MAX_HID][IN_ROW];
  real mw2 [2][MAX_OUT][HID_ROW];
  w1_t w1 [2];
  w2_t w2 [2];

  // environments
  real st   [N][MAX_IN];
  int  ep_len [N];
  // transitions since the last update
  int  t_cnt [N];
  int  t_obs [N][MAXT][MAX_IN];
  int  t_act [N][MAXT];
  real t_rew [N][MAXT];
  bit  t_done [N][MAXT];
  real t_val [N][MAXT];
  real t_p   [N][MAXT][MAX_OUT];

  int checks = 0, failures = 0;
  int n_updates = 0, n_episodes = 0, n_modes_seen = 0;
  bit update_pending = 0;
  int ep_sum_first, ep_cnt_first, ep_sum_last, ep_cnt_last;

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int q(real v);
    int r;
    r = $rtoi(v * 256.0 + ((v >= 0) ? 0.5 : -0.5));
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  function automatic real urand(real lo, real hi);
    return lo + (hi - lo) * ($urandom_range(1000000) / 1000000.0);
  endfunction

  // ---------------- weights ----------------
  task automatic upload_weights();
    int ni = int'(cfg_n_in), nh = int'(cfg_n_hid);
    for (int n = 0; n < 2; n++) begin
      for (int j = 0; j < MAX_HID; j++)
        for (int i = 0; i < IN_ROW; i++) begin
          w1[n][j][i] = (j < nh && i <= ni) ? q(mw1[n][j][i]) : 0;
          wr_en <= 1; wr_net <= net_t'(n); wr_layer <= 0; wr_row <= dim_t'(j);
          wr_col <= dim_t'(i); wr_data <= fx_t'(w1[n][j][i]);
          @(posedge clk);
        end
      for (int k = 0; k < MAX_OUT; k++)
        for (int j = 0; j < HID_ROW; j++) begin
          w2[n][k][j] = (j <= nh) ? q(mw2[n][k][j]) : 0;
          wr_en <= 1; wr_net <= net_t'(n); wr_layer <= 1; wr_row <= dim_t'(k);
          wr_col <= dim_t'(j); wr_data <= fx_t'(w2[n][k][j]);
          @(posedge clk);
        end
    end
    wr_en <= 0;
    @(negedge clk);
  endtask

  task automatic init_weights();
    for (int n = 0; n < 2; n++) begin
      for (int j = 0; j < MAX_HID; j++)
        for (int i = 0; i < IN_ROW; i++) mw1[n][j][i] = urand(-0.4, 0.4);
      for (int k = 0; k < MAX_OUT; k++)
        for (int j = 0; j < HID_ROW; j++) mw2[n][k][j] = urand(-0.1, 0.1);
    end
  endtask

  // ---------------- streams ----------------
  task automatic beat(logic [31:0] d, logic last);
    s_tvalid = 1; s_tdata = d; s_tlast = last;
    @(posedge clk);
    while (!s_tready) @(posedge clk);
    @(negedge clk);
    s_tvalid = 0; s_tlast = 0;
  endtask

  task automatic send_job(int agent, bit grad, bit net, obs_t x, yv_t d);
    int ni = int'(cfg_n_in);
    int nb = (ni + 1) / 2 + (grad ? (MAX_OUT + 1) / 2 : 0);
    int b = 0;
    beat({22'd0, net, grad, 8'(agent)}, 0);
    for (int m = 0; m < (ni + 1) / 2; m++) begin
      beat({16'(x[2*m+1]), 16'(x[2*m])}, (b == nb - 1)); b++;
    end
    if (grad)
      for (int m = 0; m < (MAX_OUT + 1) / 2; m++) begin
        beat({16'(d[2*m+1]), 16'(d[2*m])}, (b == nb - 1)); b++;
      end
  endtask

  // Receive one packet: header and data beats.
  task automatic recv(output logic [31:0] hdr, ref int data[$]);
    bit got_hdr = 0;
    data.delete();
    forever begin
      @(negedge clk);
      if (m_tvalid && m_tready) begin
        if (!got_hdr) begin hdr = m_tdata; got_hdr = 1; end
        else begin
          data.push_back(int'($signed(m_tdata)));
          if (m_tlast) break;
        end
      end
    end
  endtask

  task automatic check_vals(string what, int got[$], int exp[$]);
    checks++;
    if (got.size() != exp.size()) begin
      failures++;
      $display("%s: %0d values, expected %0d", what, got.size(), exp.size());
      return;
    end
    foreach (exp[i]) begin
      checks++;
      if (got[i] != exp[i]) begin
        failures++;
        if (failures < 20) $display("%s[%0d] = %0d, expected %0d", what, i, got[i], exp[i]);
      end
    end
  endtask

  task automatic send_reward(int r);
    reward_valid = 1; reward = 16'(r);
    @(negedge clk);
    reward_valid = 0;
  endtask

  // ---------------- environments ----------------
  function automatic obs_t observe(int a, int ni);
    obs_t x;
    for (int i = 0; i < MAX_IN; i++) x[i] = (i < ni) ? q(st[a][i]) : 0;
    return x;
  endfunction

  task automatic env_reset(int a, int task_id, int ni);
    for (int i = 0; i < MAX_IN; i++) st[a][i] = (i < ni) ? urand(-0.05, 0.05) : 0.0;
    ep_len[a] = 0;
  endtask

  // Returns 1 when the episode ends.
  function automatic bit env_step(int a, int task_id, int act, int ni, int no);
    if (task_id == 0) begin
      real x, xd, th, thd, f, ct, sn, tmp, tha, xa;
      x = st[a][0]; xd = st[a][1]; th = st[a][2]; thd = st[a][3];
      f  = (act == 1) ? 10.0 : -10.0;
      ct = $cos(th); sn = $sin(th);
      tmp = (f + 0.05 * thd * thd * sn) / 1.1;
      tha = (9.8 * sn - ct * tmp) / (0.5 * (4.0 / 3.0 - 0.1 * ct * ct / 1.1));
      xa  = tmp - 0.05 * tha * ct / 1.1;
      st[a][0] = x + 0.02 * xd;   st[a][1] = xd + 0.02 * xa;
      st[a][2] = th + 0.02 * thd; st[a][3] = thd + 0.02 * tha;
      ep_len[a]++;
      return (st[a][0] > 2.4 || st[a][0] < -2.4 || st[a][2] > 0.2095 || st[a][2] < -0.2095 ||
              ep_len[a] >= 500);
    end else begin
      real push;
      push = 2.0 * act / (no - 1) - 1.0;
      for (int i = 0; i < ni; i++)
        st[a][i] = 0.95 * st[a][i] + ((i == 0) ? 0.05 * push : 0.0) + urand(-0.05, 0.05)
                   + ((i > 0) ? 0.02 * st[a][i-1] : 0.0);
      ep_len[a]++;
      return (st[a][0] > 1.0 || st[a][0] < -1.0 || ep_len[a] >= 100);
    end
  endfunction

  // ---------------- one A2C update ----------------
  task automatic a2c_update(real boot [N]);
    int ni = int'(cfg_n_in), nh = int'(cfg_n_hid), no = int'(cfg_n_out);
    real g1 [2][MAX_HID][IN_ROW];
    real g2 [2][MAX_OUT][HID_ROW];
    real lr;
    int  batch = 0;
    for (int n = 0; n < 2; n++) begin
      for (int j = 0; j < MAX_HID; j++) for (int i = 0; i < IN_ROW; i++) g1[n][j][i] = 0.0;
      for (int k = 0; k < MAX_OUT; k++) for (int j = 0; j < HID_ROW; j++) g2[n][k][j] = 0.0;
    end
    lr = real'(opt_lr) / 65536.0;
    for (int a = 0; a < N; a++) begin
      real ret;
      ret = boot[a];
      for (int t = t_cnt[a] - 1; t >= 0; t--) begin
        obs_t x;
        xv_t  xa;
        yv_t  d;
        int   g[$], got[$];
        logic [31:0] hdr;
        real  adv;
        ret = t_rew[a][t] + (t_done[a][t] ? 0.0 : GAMMA * ret);
        adv = ret - t_val[a][t];
        for (int i = 0; i < MAX_IN; i++) x[i] = t_obs[a][t][i];
        xa = pad_x(x, ni);
        for (int n = 0; n < 2; n++) begin
          int nout = (n == 1) ? 1 : no;
          hv_t h;
          for (int k = 0; k < MAX_OUT; k++) begin
            real dv;
            if (n == 0) dv = (t_p[a][t][k] - ((k == t_act[a][t]) ? 1.0 : 0.0)) * adv;
            else        dv = (k == 0) ? (t_val[a][t] - ret) : 0.0;
            if (dv > 8.0) dv = 8.0;
            if (dv < -8.0) dv = -8.0;
            d[k] = (k < nout) ? q(dv) : 0;
          end
          send_job(a, 1, n[0], x, d);
          recv(hdr, got);
          checks++;
          if (int'(hdr[7:0]) != a || !hdr[8] || hdr[9] != n[0]) begin
            failures++;
            $display("gradient header %h for agent %0d net %0d", hdr, a, n);
          end
          h = hidden(w1[n], xa, ni, nh);
          grads(w2[n], xa, h, d, ni, nh, nout, g);
          check_vals("gradient", got, g);
          // accumulate in stream order
          begin
            int idx = 0;
            for (int k = 0; k < nout; k++)
              for (int j = 0; j <= nh; j++) g2[n][k][j] += got[idx++] / 256.0;
            for (int j = 0; j < nh; j++)
              for (int i = 0; i <= ni; i++) g1[n][j][i] += got[idx++] / 256.0;
          end
        end
        batch++;
      end
      t_cnt[a] = 0;
    end
    if (batch > 0) begin
      for (int n = 0; n < 2; n++) begin
        for (int j = 0; j < MAX_HID; j++)
          for (int i = 0; i < IN_ROW; i++) mw1[n][j][i] -= lr * g1[n][j][i] / batch;
        for (int k = 0; k < MAX_OUT; k++)
          for (int j = 0; j < HID_ROW; j++) mw2[n][k][j] -= lr * g2[n][k][j] / batch;
      end
      upload_weights();
      n_updates++;
    end
  endtask

  // ---------------- training run for one task ----------------
  task automatic train(int task_id, int ni, int no, int rounds);
    int done_eps = 0;
    cfg_n_in = dim_t'(ni); cfg_n_out = dim_t'(no);
    init_weights();
    upload_weights();
    for (int a = 0; a < N; a++) begin env_reset(a, task_id, ni); t_cnt[a] = 0; end
    ep_sum_first = 0; ep_cnt_first = 0; ep_sum_last = 0; ep_cnt_last = 0;
    for (int r = 0; r < rounds; r++) begin
      int  res [N][$];
      real vals [N];
      obs_t xs [N];
      yv_t  zero;
      bit   seen [N];
      for (int k = 0; k < MAX_OUT; k++) zero[k] = 0;
      for (int a = 0; a < N; a++) begin
        xs[a] = observe(a, ni);
        send_job(a, 0, 0, xs[a], zero);
        seen[a] = 0;
      end
      for (int p = 0; p < N; p++) begin
        logic [31:0] hdr;
        int got[$], exp[$];
        int a;
        yv_t ya, yc;
        xv_t xa;
        recv(hdr, got);
        a = int'(hdr[7:0]) % N;
        checks++;
        if (hdr[8] || seen[a] || int'(hdr[7:0]) >= N) begin failures++; $display("bad result header %h", hdr); end
        // agents are served in rotation, starting at agent 0 each round
        checks++;
        if (a != p) begin failures++; $display("round %0d: agent %0d served in place %0d", r, a, p); end
        seen[a] = 1;
        if (hdr[10]) update_pending = 1;
        xa = pad_x(xs[a], ni);
        ya = outputs(w2[0], hidden(w1[0], xa, ni, int'(cfg_n_hid)), int'(cfg_n_hid), no);
        yc = outputs(w2[1], hidden(w1[1], xa, ni, int'(cfg_n_hid)), int'(cfg_n_hid), 1);
        for (int k = 0; k < no; k++) exp.push_back(ya[k]);
        exp.push_back(yc[0]);
        check_vals("inference", got, exp);
        res[a] = got;
        vals[a] = got[no] / 256.0;
      end
      // pending update: bootstrap from the values just computed
      if (update_pending) begin
        a2c_update(vals);
        update_pending = 0;
      end
      // act
      for (int a = 0; a < N; a++) begin
        real mx, sum, u, acc;
        real p [MAX_OUT];
        int  act, t;
        bit  dn;
        mx = -1.0e9;
        for (int k = 0; k < no; k++) if (res[a][k] / 256.0 > mx) mx = res[a][k] / 256.0;
        sum = 0.0;
        for (int k = 0; k < MAX_OUT; k++) begin
          p[k] = (k < no) ? $exp(res[a][k] / 256.0 - mx) : 0.0;
          sum += p[k];
        end
        u = urand(0.0, 1.0) * sum;
        act = no - 1;
        acc = 0.0;
        for (int k = 0; k < no; k++) begin
          acc += p[k];
          if (u <= acc) begin act = k; break; end
        end
        dn = env_step(a, task_id, act, ni, no);
        t = t_cnt[a];
        if (t < MAXT) begin
          for (int i = 0; i < MAX_IN; i++) t_obs[a][t][i] = xs[a][i];
          t_act[a][t] = act;
          t_rew[a][t] = 1.0;
          t_done[a][t] = dn;
          t_val[a][t] = res[a][no] / 256.0;
          for (int k = 0; k < MAX_OUT; k++) t_p[a][t][k] = p[k] / sum;
          t_cnt[a] = t + 1;
        end
        if (dn) begin
          send_reward(ep_len[a]);
          if (done_eps < 20) begin ep_sum_first += ep_len[a]; ep_cnt_first++; end
          else begin ep_sum_last += ep_len[a]; ep_cnt_last++; end
          done_eps++;
          n_episodes++;
          env_reset(a, task_id, ni);
        end
      end
    end
    $display("task %0d/%0d: %0d rounds, %0d episodes, mean length first 20 %0d, later %0d, updates so far %0d, mode %0d, lr %0d",
             ni, no, rounds, done_eps, ep_cnt_first ? ep_sum_first / ep_cnt_first : 0,
             ep_cnt_last ? ep_sum_last / ep_cnt_last : 0, n_updates, opt_state, opt_lr);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    train(0, 4, 2, 1500);   // cart-pole
    train(1, 6, 3, 150);   // 6 observations, 3 actions
    train(1, 8, 4, 150);   // 8 observations, 4 actions
    checks += 3;
    if (n_updates == 0)  failures++;
    if (n_episodes == 0) failures++;
    if (rx_err)          failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
