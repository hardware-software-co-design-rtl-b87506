// tb_a2c_accel_top: end-to-end test of the accelerator at its default sizes
// (4 agents, 8 lanes, up to 8 observations, 64 hidden units, 4 actions).
//
// It loads random actor and critic weights, then streams inference and
// gradient jobs for all agents in three run-time configurations (8/64/4,
// 4/64/2 and 6/64/3 observations/hidden/actions) while the output sink
// applies random back-pressure, and feeds episode returns that walk the
// meta-optimizer through its modes. Every output packet is checked against
// the integer reference model: header (agent, kind, network), logits and
// value of an inference, every gradient of a gradient job, and tlast.
// It also counts, and requires at least once, each mechanism: round-robin
// service in rotation, input back-pressure on a pending slot, output
// stalls, actor and critic passes sharing the engine, gradient jobs of both
// networks, a change of run-time sizes, each meta-optimizer mode, an
// update-due flag in a header, and a dropped malformed packet.
module tb_a2c_accel_top;
  import a2c_pkg::*;
  import a2c_ref_pkg::*;

  localparam int N = N_AGENTS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  dim_t cfg_n_in = 8, cfg_n_hid = 64, cfg_n_out = 4;
  logic wr_en = 0, wr_layer = 0;
  net_t wr_net = NET_ACTOR;
  dim_t wr_row = 0, wr_col = 0;
  fx_t  wr_data = 0;
  logic [31:0] s_tdata = 0, m_tdata;
  logic s_tvalid = 0, s_tready, s_tlast = 0;
  logic m_tvalid, m_tready = 0, m_tlast;
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

  w1_t w1 [2];
  w2_t w2 [2];
  int  exp_q [N][$];        // per agent: kind, net, length, data...
  int  sent = 0, received = 0;
  int  checks = 0, failures = 0;
  int  order [$];           // agents in order of service
  bit  stall_phase = 0;
  // mechanism counters
  int  n_rx_held = 0, n_out_stall = 0, n_infer = 0, n_grad_actor = 0, n_grad_critic = 0;
  int  n_upd_flag = 0, n_cfg_switch = 0, n_rr_rotation = 0, n_err_drop = 0;
  int  n_mode [3];
  int  ema = 0;
  bit  ema_init = 0;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d packets received", received, sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) n_mode[int'(opt_state) % 3]++;

  // ---------------- host side ----------------
  task automatic load_weights();
    for (int n = 0; n < 2; n++) begin
      for (int j = 0; j < MAX_HID; j++)
        for (int i = 0; i < IN_ROW; i++) begin
          w1[n][j][i] = $signed($urandom_range(192)) - 96;
          wr_en <= 1; wr_net <= net_t'(n); wr_layer <= 0; wr_row <= dim_t'(j);
          wr_col <= dim_t'(i); wr_data <= fx_t'(w1[n][j][i]);
          @(posedge clk);
        end
      for (int k = 0; k < MAX_OUT; k++)
        for (int j = 0; j < HID_ROW; j++) begin
          w2[n][k][j] = $signed($urandom_range(192)) - 96;
          wr_en <= 1; wr_net <= net_t'(n); wr_layer <= 1; wr_row <= dim_t'(k);
          wr_col <= dim_t'(j); wr_data <= fx_t'(w2[n][k][j]);
          @(posedge clk);
        end
    end
    wr_en <= 0;
  endtask

  task automatic beat(logic [31:0] d, logic last);
    s_tvalid = 1; s_tdata = d; s_tlast = last;
    @(posedge clk);
    while (!s_tready) begin n_rx_held++; @(posedge clk); end
    @(negedge clk);
    s_tvalid = 0; s_tlast = 0;
  endtask

  task automatic send_job(int agent, bit grad, bit net);
    int   ni = int'(cfg_n_in), nh = int'(cfg_n_hid), no = int'(cfg_n_out);
    int   nb, b;
    obs_t x;
    yv_t  d;
    xv_t  xa;
    hv_t  h;
    yv_t  ya, yc;
    int   g[$];
    for (int i = 0; i < MAX_IN; i++) x[i] = (i < ni) ? $signed($urandom_range(1200)) - 600 : 0;
    for (int k = 0; k < MAX_OUT; k++) d[k] = $signed($urandom_range(600)) - 300;
    xa = pad_x(x, ni);
    // expected packet
    if (!grad) begin
      ya = outputs(w2[0], hidden(w1[0], xa, ni, nh), nh, no);
      yc = outputs(w2[1], hidden(w1[1], xa, ni, nh), nh, 1);
      exp_q[agent].push_back(0); exp_q[agent].push_back(0); exp_q[agent].push_back(no + 1);
      for (int k = 0; k < no; k++) exp_q[agent].push_back(ya[k]);
      exp_q[agent].push_back(yc[0]);
    end else begin
      int nout = net ? 1 : no;
      yv_t dd;
      for (int k = 0; k < MAX_OUT; k++) dd[k] = (k < nout) ? d[k] : 0;
      h = hidden(w1[net], xa, ni, nh);
      grads(w2[net], xa, h, dd, ni, nh, nout, g);
      exp_q[agent].push_back(1); exp_q[agent].push_back(int'(net)); exp_q[agent].push_back(g.size());
      foreach (g[i]) exp_q[agent].push_back(g[i]);
    end
    sent++;
    // packet
    nb = (ni + 1) / 2 + (grad ? (MAX_OUT + 1) / 2 : 0);
    b  = 0;
    beat({22'd0, net, grad, 8'(agent)}, 0);
    for (int m = 0; m < (ni + 1) / 2; m++) begin
      beat({16'(x[2*m+1]), 16'(x[2*m])}, (b == nb - 1)); b++;
    end
    if (grad)
      for (int m = 0; m < (MAX_OUT + 1) / 2; m++) begin
        beat({16'(d[2*m+1]), 16'(d[2*m])}, (b == nb - 1)); b++;
      end
  endtask

  task automatic wait_idle();
    while (received != sent || busy) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  task automatic send_reward(int r);
    @(negedge clk);
    reward_valid = 1; reward = 16'(r);
    @(negedge clk);
    reward_valid = 0;
    if (!ema_init) begin ema = r; ema_init = 1; end
    else ema = ema + ((r - ema) >>> 2);
  endtask

  task automatic set_cfg(int ni, int nh, int no);
    wait_idle();
    cfg_n_in = dim_t'(ni); cfg_n_hid = dim_t'(nh); cfg_n_out = dim_t'(no);
    n_cfg_switch++;
  endtask

  // ---------------- output sink and checker ----------------
  initial begin
    int agent, kind, net, len, idx;
    bit in_pkt;
    in_pkt = 0;
    idx = 0; len = 0; agent = 0;
    forever begin
      @(negedge clk);
      m_tready = stall_phase ? ($urandom_range(2) != 0) : 1'b1;
      if (m_tvalid && !m_tready) n_out_stall++;
      if (m_tvalid && m_tready) begin
        if (!in_pkt) begin
          agent = int'(m_tdata[7:0]);
          order.push_back(agent);
          if (m_tdata[10]) n_upd_flag++;
          checks++;
          if (agent >= N || exp_q[agent].size() < 3) begin
            failures++;
            $display("unexpected header %h", m_tdata);
          end else begin
            kind = exp_q[agent].pop_front();
            net  = exp_q[agent].pop_front();
            len  = exp_q[agent].pop_front();
            checks++;
            if (int'(m_tdata[8]) != kind || (kind == 1 && int'(m_tdata[9]) != net)) begin
              failures++;
              $display("header %h: expected kind %0d net %0d", m_tdata, kind, net);
            end
            if (kind == 0) n_infer++;
            else if (net == 0) n_grad_actor++;
            else n_grad_critic++;
            idx = 0;
            in_pkt = 1;
          end
        end else begin
          int e;
          e = exp_q[agent].pop_front();
          checks += 2;
          if ($signed(m_tdata) != e) begin
            failures++;
            if (failures < 20) $display("agent %0d beat %0d: %0d, expected %0d", agent, idx, $signed(m_tdata), e);
          end
          if (m_tlast != (idx == len - 1)) failures++;
          idx++;
          if (idx == len) begin
            in_pkt = 0;
            received++;
          end
        end
      end
    end
  end

  // ---------------- scenario ----------------
  task automatic check_rotation(int first);
    // the last N services must be a rotation starting at `first`
    checks++;
    for (int i = 0; i < N; i++)
      if (order[order.size() - N + i] != (first + i) % N) begin
        failures++;
        $display("service order broken at position %0d", i);
        return;
      end
    n_rr_rotation++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_weights();
    @(negedge clk);

    // 8 observations, 4 actions: every agent, twice over, output throttled
    stall_phase = 1;
    for (int a = 0; a < N; a++) send_job(a, 0, 0);
    for (int a = 0; a < N; a++) send_job(a, 0, 0);
    wait_idle();
    check_rotation(0);
    stall_phase = 0;
    send_reward(100);
    for (int i = 0; i < 4; i++) send_reward(ema + (i % 2));        // plateau -> refine

    // gradient jobs of both networks
    for (int a = 0; a < N; a++) send_job(a, 1, a[0]);
    wait_idle();
    check_rotation(0);
    for (int i = 0; i < 3; i++) send_reward(ema + 20);             // gains -> aggressive

    // 4 observations, 2 actions
    set_cfg(4, 64, 2);
    stall_phase = 1;
    for (int a = N - 1; a >= 0; a--) send_job(a, 0, 0);
    send_job(1, 1, 0);
    send_job(2, 1, 1);
    wait_idle();
    send_reward(ema - 60);                                          // drop -> stabilize

    // 6 observations, 3 actions
    set_cfg(6, 64, 3);
    stall_phase = 0;
    for (int a = 0; a < N; a++) send_job(a, a[1], a[0]);
    wait_idle();

    // malformed packet for a non-existent agent
    beat(32'd200, 0); beat(32'd0, 1);
    repeat (2) @(negedge clk);
    if (rx_err) n_err_drop++;
    wait_idle();

    checks++;
    if (received != sent) begin failures++; $display("%0d of %0d packets", received, sent); end
    for (int a = 0; a < N; a++) begin
      checks++;
      if (exp_q[a].size() != 0) failures++;
    end
    $display("mechanisms: rotations %0d, rx held %0d, out stalls %0d, inferences %0d, actor grads %0d, critic grads %0d",
             n_rr_rotation, n_rx_held, n_out_stall, n_infer, n_grad_actor, n_grad_critic);
    $display("            cfg switches %0d, update flags %0d, err drops %0d, mode cycles %0d/%0d/%0d",
             n_cfg_switch, n_upd_flag, n_err_drop, n_mode[0], n_mode[1], n_mode[2]);
    checks += 12;
    if (n_rr_rotation == 0) failures++;
    if (n_rx_held == 0)     failures++;
    if (n_out_stall == 0)   failures++;
    if (n_infer == 0)       failures++;
    if (n_grad_actor == 0)  failures++;
    if (n_grad_critic == 0) failures++;
    if (n_cfg_switch == 0)  failures++;
    if (n_upd_flag == 0)    failures++;
    if (n_err_drop == 0)    failures++;
    if (n_mode[0] == 0)     failures++;
    if (n_mode[1] == 0)     failures++;
    if (n_mode[2] == 0)     failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
