// tb_meta_optimizer: plays scripted training histories into the
// meta-optimizer and checks the mode, learning rate and update period after
// each event: a reward plateau (aggressive -> refine), steady gains
// (refine -> aggressive), a gradient spike, a reward drop and an oscillating
// reward (each -> stabilize), calm episodes (stabilize -> refine), the
// one-cycle response, and the spacing of update_due pulses in two modes.
// Rewards are chosen relative to a moving average the testbench tracks.
module tb_meta_optimizer;
  import a2c_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic grad_valid = 0, reward_valid = 0, step = 0;
  logic [31:0] grad_l1 = 0;
  logic signed [15:0] reward = 0;
  opt_state_t state;
  logic [15:0] lr;
  logic [7:0]  update_period;
  logic        update_due;

  meta_optimizer dut (.clk, .rst_n, .grad_valid, .grad_l1, .reward_valid, .reward,
                      .step, .state, .lr, .update_period, .update_due);

  int checks = 0, failures = 0;
  int ema = 0;
  bit ema_init = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_mode(opt_state_t s, string what);
    logic [15:0] elr;
    logic [7:0]  ep;
    case (s)
      OPT_STABILIZE: begin elr = 16'd16;  ep = 8'd20; end
      OPT_REFINE:    begin elr = 16'd66;  ep = 8'd10; end
      default:       begin elr = 16'd262; ep = 8'd5;  end
    endcase
    checks++;
    if (state != s || lr != elr || update_period != ep) begin
      failures++;
      $display("%s: mode %0d lr %0d period %0d, expected mode %0d", what, state, lr, update_period, s);
    end
  endtask

  // Event applied at one edge; its effect must be visible right after it.
  task automatic send_reward(int r);
    reward_valid = 1; reward = 16'(r);
    @(negedge clk);
    reward_valid = 0;
    if (!ema_init) begin ema = r; ema_init = 1; end
    else ema = ema + ((r - ema) >>> 2);
  endtask

  task automatic send_grad(int g);
    grad_valid = 1; grad_l1 = g;
    @(negedge clk);
    grad_valid = 0;
  endtask

  task automatic count_dues(int steps, int expected);
    int n = 0;
    for (int s = 0; s < steps; s++) begin
      step = 1;
      @(negedge clk);
      step = 0;
      if (update_due) n++;
    end
    @(negedge clk);
    if (update_due) n++;
    checks++;
    if (n != expected) begin
      failures++;
      $display("update_due %0d times in %0d steps, expected %0d", n, steps, expected);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_mode(OPT_AGGRESSIVE, "reset");
    count_dues(12, 2);                         // period 5

    // plateau: four flat episodes
    send_reward(100);
    send_reward(ema + 1); send_reward(ema); send_reward(ema + 1);
    expect_mode(OPT_AGGRESSIVE, "plateau 3");
    send_reward(ema);
    expect_mode(OPT_REFINE, "plateau 4");

    // steady gains
    send_reward(ema + 20); send_reward(ema + 20);
    expect_mode(OPT_REFINE, "gain 2");
    send_reward(ema + 20);
    expect_mode(OPT_AGGRESSIVE, "gain 3");

    // gradient spike
    send_grad(1000); send_grad(1100); send_grad(1500);
    expect_mode(OPT_AGGRESSIVE, "no spike");
    grad_valid = 1; grad_l1 = 5000;
    @(posedge clk);
    #1;
    grad_valid = 0;
    checks++;
    if (state != OPT_STABILIZE) begin failures++; $display("spike not seen one cycle later"); end
    @(negedge clk);
    expect_mode(OPT_STABILIZE, "spike");

    // calm episodes
    send_reward(ema); send_reward(ema); send_reward(ema);
    expect_mode(OPT_STABILIZE, "calm 3");
    send_reward(ema);
    expect_mode(OPT_REFINE, "calm 4");

    // reward drop
    send_reward(ema - 50);
    expect_mode(OPT_STABILIZE, "drop");
    count_dues(40, 2);                          // period 20
    send_reward(ema); send_reward(ema); send_reward(ema); send_reward(ema);
    expect_mode(OPT_REFINE, "calm after drop");

    // oscillating reward: three sign flips
    send_reward(ema + 10); send_reward(ema - 10); send_reward(ema + 10);
    expect_mode(OPT_REFINE, "oscillation 2");
    send_reward(ema - 10);
    expect_mode(OPT_STABILIZE, "oscillation 3");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
