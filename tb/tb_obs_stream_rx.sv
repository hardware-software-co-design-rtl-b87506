// tb_obs_stream_rx: streams inference and gradient packets for random agents
// with random gaps in tvalid, then checks each slot's job kind, network,
// observations and output errors and the pending bits. Also checks that a
// header for a still-pending agent is held off (tready low) until the slot
// is cleared, and that a packet for an unknown agent or with a misplaced
// tlast sets err and leaves no job behind.
module tb_obs_stream_rx;
  import a2c_pkg::*;

  localparam int N  = N_AGENTS;
  localparam int IW = $clog2(N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  dim_t n_in = 8;
  logic [31:0] s_tdata = 0;
  logic s_tvalid = 0, s_tready, s_tlast = 0;
  logic [N-1:0] pending;
  job_t slot_job [N];
  net_t slot_net [N];
  fx_t  slot_obs [N][MAX_IN];
  fx_t  slot_delta [N][MAX_OUT];
  logic clear = 0, err;
  logic [IW-1:0] clear_id = 0;

  obs_stream_rx dut (.clk, .rst_n, .n_in, .s_tdata, .s_tvalid, .s_tready, .s_tlast,
                     .pending, .slot_job, .slot_net, .slot_obs, .slot_delta,
                     .clear, .clear_id, .err);

  int checks = 0, failures = 0, held_off = 0;
  int exp_obs [N][MAX_IN];
  int exp_del [N][MAX_OUT];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic beat(logic [31:0] d, logic last);
    while ($urandom_range(3) == 0) @(negedge clk);   // random gap
    s_tvalid = 1; s_tdata = d; s_tlast = last;
    @(posedge clk);
    while (!s_tready) begin held_off++; @(posedge clk); end
    @(negedge clk);
    s_tvalid = 0; s_tlast = 0;
  endtask

  task automatic send(int agent, bit grad, bit net, int ni);
    int nb = (ni + 1) / 2 + (grad ? (MAX_OUT + 1) / 2 : 0);
    int v [16];
    int b = 0;
    for (int i = 0; i < 16; i++) v[i] = $signed(16'($urandom));
    beat({22'd0, net, grad, 8'(agent)}, 0);
    for (int m = 0; m < (ni + 1) / 2; m++) begin
      beat({16'(v[2*m+1]), 16'(v[2*m])}, (b == nb - 1));
      b++;
    end
    if (grad)
      for (int m = 0; m < (MAX_OUT + 1) / 2; m++) begin
        beat({16'(v[8+2*m+1]), 16'(v[8+2*m])}, (b == nb - 1));
        b++;
      end
    if (agent < N) begin
      for (int i = 0; i < ni; i++) exp_obs[agent][i] = v[i];
      if (grad) for (int k = 0; k < MAX_OUT; k++) exp_del[agent][k] = v[8+k];
    end
  endtask

  task automatic check_slot(int a, bit grad, bit net, int ni);
    checks += 3;
    if (!pending[a]) begin failures++; $display("agent %0d not pending", a); end
    if (slot_job[a] != job_t'(grad)) failures++;
    if (grad && slot_net[a] != net_t'(net)) failures++;
    for (int i = 0; i < ni; i++) begin
      checks++;
      if (int'(slot_obs[a][i]) != exp_obs[a][i]) begin
        failures++;
        $display("agent %0d obs[%0d] = %0d, expected %0d", a, i, slot_obs[a][i], exp_obs[a][i]);
      end
    end
    if (grad)
      for (int k = 0; k < MAX_OUT; k++) begin
        checks++;
        if (int'(slot_delta[a][k]) != exp_del[a][k]) failures++;
      end
  endtask

  task automatic do_clear(int a);
    clear = 1; clear_id = IW'(a);
    @(negedge clk);
    clear = 0;
    checks++;
    if (pending[a]) failures++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int round = 0; round < 6; round++) begin
      int ni;
      ni = (round % 3 == 0) ? 4 : ((round % 3 == 1) ? 6 : 8);
      n_in = dim_t'(ni);
      for (int a = 0; a < N; a++) send(a, a[0] ^ round[0], a[1], ni);
      @(negedge clk);
      for (int a = 0; a < N; a++) check_slot(a, a[0] ^ round[0], a[1], ni);
      for (int a = 0; a < N; a++) do_clear(a);
    end
    checks++;
    if (err) begin failures++; $display("err set by good packets"); end

    // a header for a pending agent waits until the slot is cleared
    n_in = 8;
    send(2, 0, 0, 8);
    fork
      send(2, 1, 1, 8);
      begin
        repeat (10) @(negedge clk);
        checks++;
        if (held_off < 5) begin failures++; $display("header was not held off"); end
        do_clear(2);
      end
    join
    @(negedge clk);
    check_slot(2, 1, 1, 8);
    do_clear(2);

    // unknown agent
    send(N + 3, 0, 0, 8);
    @(negedge clk);
    checks += 2;
    if (!err) failures++;
    if (pending != '0) failures++;

    // tlast one beat early: dropped
    rst_n = 0; @(negedge clk); rst_n = 1; @(negedge clk);
    beat(32'd1, 0);
    beat(32'h0001_0002, 0); beat(32'h0003_0004, 0); beat(32'h0005_0006, 1);
    @(negedge clk);
    checks += 2;
    if (!err) failures++;
    if (pending[1]) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
