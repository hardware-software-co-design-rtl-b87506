// tb_ff_engine: runs forward passes of the actor and the critic through
// ff_engine (with weight_mem holding random weights) for several run-time
// layer sizes, including the observation/action sizes of the three control
// tasks the platform targets (4/2, 6/3, 8/4) and a pass with large weights
// that saturates. Checks the outputs y, the padded input and hidden vectors
// against the integer reference model, and the pass latency
// N1 + N2 + 3 cycles from start to done.
module tb_ff_engine;
  import a2c_pkg::*;
  import a2c_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_en = 0, wr_layer = 0;
  net_t wr_net = NET_ACTOR;
  dim_t wr_row = 0, wr_col = 0;
  fx_t  wr_data = 0;

  logic start = 0, busy, done;
  net_t net = NET_ACTOR;
  dim_t n_in = 0, n_hid = 0, n_out = 0;
  fx_t  x_in [MAX_IN];
  fx_t  y [MAX_OUT];
  fx_t  x_act [IN_ROW];
  fx_t  h_act [HID_ROW];
  logic rd_en, rd_layer, b_unused_en = 0;
  net_t rd_net;
  dim_t rd_row, rd_chunk;
  fx_t  rd_data [LANES];
  fx_t  b_data [LANES];

  weight_mem u_mem (
    .clk, .wr_en, .wr_net, .wr_layer, .wr_row, .wr_col, .wr_data,
    .a_rd_en(rd_en), .a_rd_net(rd_net), .a_rd_layer(rd_layer), .a_rd_row(rd_row),
    .a_rd_chunk(rd_chunk), .a_rd_data(rd_data),
    .b_rd_en(b_unused_en), .b_rd_net(NET_ACTOR), .b_rd_layer(1'b0), .b_rd_row(dim_t'(0)),
    .b_rd_chunk(dim_t'(0)), .b_rd_data(b_data)
  );

  ff_engine dut (
    .clk, .rst_n, .start, .net, .n_in, .n_hid, .n_out, .x_in, .busy, .done,
    .y, .x_act, .h_act, .rd_en, .rd_net, .rd_layer, .rd_row, .rd_chunk, .rd_data
  );

  w1_t w1 [2];
  w2_t w2 [2];
  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_weights(int range);
    for (int n = 0; n < 2; n++) begin
      for (int j = 0; j < MAX_HID; j++)
        for (int i = 0; i < IN_ROW; i++) begin
          w1[n][j][i] = $signed($urandom_range(2*range)) - range;
          wr_en <= 1; wr_net <= net_t'(n); wr_layer <= 0; wr_row <= dim_t'(j);
          wr_col <= dim_t'(i); wr_data <= fx_t'(w1[n][j][i]);
          @(posedge clk);
        end
      for (int k = 0; k < MAX_OUT; k++)
        for (int j = 0; j < HID_ROW; j++) begin
          w2[n][k][j] = $signed($urandom_range(2*range)) - range;
          wr_en <= 1; wr_net <= net_t'(n); wr_layer <= 1; wr_row <= dim_t'(k);
          wr_col <= dim_t'(j); wr_data <= fx_t'(w2[n][k][j]);
          @(posedge clk);
        end
    end
    wr_en <= 0;
  endtask

  task automatic run_pass(int ni, int nh, int no, int nn, int xrange);
    obs_t x;
    xv_t  xa;
    hv_t  h;
    yv_t  ye;
    int   cyc, exp_cyc;
    for (int i = 0; i < MAX_IN; i++) begin
      x[i] = (i < ni) ? $signed($urandom_range(2*xrange)) - xrange : 0;
      x_in[i] = fx_t'(x[i]);
    end
    xa = pad_x(x, ni);
    h  = hidden(w1[nn], xa, ni, nh);
    ye = outputs(w2[nn], h, nh, no);
    @(posedge clk);
    start <= 1; net <= net_t'(nn); n_in <= dim_t'(ni); n_hid <= dim_t'(nh); n_out <= dim_t'(no);
    @(posedge clk);
    start <= 0;
    cyc = 0;
    while (!done) begin @(posedge clk); cyc++; end
    exp_cyc = nh * ((ni + LANES) / LANES) + no * ((nh + LANES) / LANES) + 3;
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("latency %0d, expected %0d (n_in %0d n_hid %0d n_out %0d)", cyc, exp_cyc, ni, nh, no);
    end
    for (int k = 0; k < no; k++) begin
      checks++;
      if (int'(y[k]) != ye[k]) begin
        failures++;
        $display("y[%0d] = %0d, expected %0d (cfg %0d/%0d/%0d net %0d)", k, y[k], ye[k], ni, nh, no, nn);
      end
    end
    for (int j = 0; j < HID_ROW; j++) begin
      checks++;
      if (int'(h_act[j]) != h[j]) begin
        failures++;
        if (failures < 20) $display("h[%0d] = %0d, expected %0d", j, h_act[j], h[j]);
      end
    end
    for (int i = 0; i < IN_ROW; i++) begin
      checks++;
      if (int'(x_act[i]) != xa[i]) failures++;
    end
  endtask

  initial begin
    for (int i = 0; i < MAX_IN; i++) x_in[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    load_weights(96);
    run_pass(4, 64, 2, 0, 600);   // 4 observations, 2 actions
    run_pass(4, 64, 1, 1, 600);   // its critic
    run_pass(6, 64, 3, 0, 600);   // 6 observations, 3 actions
    run_pass(8, 64, 4, 0, 600);   // 8 observations, 4 actions
    run_pass(8, 64, 1, 1, 600);
    for (int t = 0; t < 12; t++)
      run_pass($urandom_range(1, MAX_IN), $urandom_range(1, MAX_HID),
               $urandom_range(1, MAX_OUT), $urandom_range(1), 600);
    load_weights(30000);           // drive the accumulators into saturation
    run_pass(8, 64, 4, 0, 30000);
    run_pass(8, 64, 1, 1, 30000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
