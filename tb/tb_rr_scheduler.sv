// tb_rr_scheduler: drives random request patterns into the round-robin
// scheduler and takes grants at random times. Each grant must be the first
// requesting agent after the previously taken one; with every agent
// requesting, the grants must cycle 0,1,2,...; and a continuously
// requesting agent must never wait more than N grants.
module tb_rr_scheduler;
  localparam int N  = a2c_pkg::N_AGENTS;
  localparam int IW = $clog2(N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0]  req = '0;
  logic          accept = 0, grant_valid;
  logic [IW-1:0] grant_id;
  logic [N-1:0]  grant_oh;

  rr_scheduler dut (.clk, .rst_n, .req, .accept, .grant_valid, .grant_id, .grant_oh);

  int checks = 0, failures = 0;
  int last = N - 1;
  int waited [N];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_id(logic [N-1:0] r, int from);
    for (int off = 1; off <= N; off++)
      if (r[(from + off) % N]) return (from + off) % N;
    return -1;
  endfunction

  initial begin
    for (int a = 0; a < N; a++) waited[a] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // all agents requesting: strict rotation
    req = '1;
    for (int t = 0; t < 3 * N; t++) begin
      @(negedge clk);
      checks++;
      if (!grant_valid || int'(grant_id) != t % N) begin
        failures++;
        $display("rotation: grant %0d, expected %0d", grant_id, t % N);
      end
      accept = 1;
      @(negedge clk);
      accept = 0;
      last = int'(grant_id);
    end
    last = (3 * N - 1) % N;
    // random traffic
    for (int t = 0; t < 3000; t++) begin
      int e;
      @(negedge clk);
      req = N'($urandom);
      #1;
      e = expect_id(req, last);
      checks += 2;
      if (grant_valid != (e >= 0)) failures++;
      if (e >= 0 && (int'(grant_id) != e || grant_oh != (N'(1) << e))) begin
        failures++;
        if (failures < 10) $display("req %b last %0d: grant %0d, expected %0d", req, last, grant_id, e);
      end
      if (e >= 0 && $urandom_range(1)) begin
        for (int a = 0; a < N; a++)
          if (req[a] && a != e) waited[a]++; else waited[a] = 0;
        accept = 1;
        @(negedge clk);
        accept = 0;
        last = e;
        for (int a = 0; a < N; a++) begin
          checks++;
          if (waited[a] >= N) begin failures++; $display("agent %0d starved", a); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
