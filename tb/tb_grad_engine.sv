// tb_grad_engine: back-propagates random output errors through random
// layer-2 weights (held in weight_mem) for given input and hidden vectors,
// for several run-time sizes and both networks. Checks every streamed
// gradient, its order and g_last against the integer reference model, the
// L1 magnitude reported at done, the first-beat latency
// n_out*ceil((n_hid+1)/LANES)+3 with a ready sink, and that the stream
// holds its beat while the sink applies random back-pressure.
module tb_grad_engine;
  import a2c_pkg::*;
  import a2c_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_en = 0, wr_layer = 0;
  net_t wr_net = NET_ACTOR;
  dim_t wr_row = 0, wr_col = 0;
  fx_t  wr_data = 0;

  logic start = 0, busy, done, g_valid, g_ready = 0, g_last;
  net_t net = NET_ACTOR;
  dim_t n_in = 0, n_hid = 0, n_out = 0;
  fx_t  delta [MAX_OUT];
  fx_t  x_act [IN_ROW];
  fx_t  h_act [HID_ROW];
  fx_t  g_data;
  logic [31:0] grad_l1;
  logic rd_en, rd_layer;
  net_t rd_net;
  dim_t rd_row, rd_chunk;
  fx_t  rd_data [LANES];
  fx_t  a_data [LANES];

  weight_mem u_mem (
    .clk, .wr_en, .wr_net, .wr_layer, .wr_row, .wr_col, .wr_data,
    .a_rd_en(1'b0), .a_rd_net(NET_ACTOR), .a_rd_layer(1'b0), .a_rd_row(dim_t'(0)),
    .a_rd_chunk(dim_t'(0)), .a_rd_data(a_data),
    .b_rd_en(rd_en), .b_rd_net(rd_net), .b_rd_layer(rd_layer), .b_rd_row(rd_row),
    .b_rd_chunk(rd_chunk), .b_rd_data(rd_data)
  );

  grad_engine dut (
    .clk, .rst_n, .start, .net, .n_in, .n_hid, .n_out, .delta, .x_act, .h_act,
    .busy, .done, .grad_l1, .g_valid, .g_ready, .g_data, .g_last,
    .rd_en, .rd_net, .rd_layer, .rd_row, .rd_chunk, .rd_data
  );

  w2_t w2 [2];
  int checks = 0, failures = 0, stalls = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_w2(int range);
    for (int n = 0; n < 2; n++)
      for (int k = 0; k < MAX_OUT; k++)
        for (int j = 0; j < HID_ROW; j++) begin
          w2[n][k][j] = $signed($urandom_range(2*range)) - range;
          wr_en <= 1; wr_net <= net_t'(n); wr_layer <= 1; wr_row <= dim_t'(k);
          wr_col <= dim_t'(j); wr_data <= fx_t'(w2[n][k][j]);
          @(posedge clk);
        end
    wr_en <= 0;
  endtask

  task automatic run_job(int ni, int nh, int no, int nn, bit backpressure);
    obs_t x;
    xv_t  xa;
    hv_t  h;
    yv_t  d;
    int   g[$];
    int   cyc, idx, exp_first;
    longint l1;
    fx_t  held;
    logic held_last;
    bit   have_held;
    for (int i = 0; i < MAX_IN; i++) x[i] = (i < ni) ? $signed($urandom_range(1200)) - 600 : 0;
    xa = pad_x(x, ni);
    for (int j = 0; j < HID_ROW; j++)
      h[j] = (j < nh) ? (($urandom_range(3) == 0) ? 0 : $urandom_range(800)) : (j == nh ? 256 : 0);
    for (int k = 0; k < MAX_OUT; k++) d[k] = (k < no) ? $signed($urandom_range(1000)) - 500 : 0;
    grads(w2[nn], xa, h, d, ni, nh, no, g);
    for (int i = 0; i < IN_ROW; i++) x_act[i] = fx_t'(xa[i]);
    for (int j = 0; j < HID_ROW; j++) h_act[j] = fx_t'(h[j]);
    for (int k = 0; k < MAX_OUT; k++) delta[k] = fx_t'((k < no) ? d[k] : 12345);
    @(posedge clk);
    start <= 1; net <= net_t'(nn); n_in <= dim_t'(ni); n_hid <= dim_t'(nh); n_out <= dim_t'(no);
    g_ready <= !backpressure;
    @(posedge clk);
    start <= 0;
    // first beat
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!g_valid);
    exp_first = no * ((nh + LANES) / LANES) + 3;
    if (!backpressure) begin
      checks++;
      if (cyc != exp_first) begin
        failures++;
        $display("first beat after %0d cycles, expected %0d", cyc, exp_first);
      end
    end
    idx = 0;
    l1  = 0;
    have_held = 0;
    while (1) begin
      // a beat refused at the last edge must still be offered, unchanged
      if (have_held) begin
        checks++;
        if (!g_valid || g_data != held || g_last != held_last) begin
          failures++;
          $display("stream changed while stalled");
        end
        have_held = 0;
      end
      if (backpressure) g_ready = ($urandom_range(2) != 0);
      if (g_valid && g_ready) begin
        checks++;
        if (idx >= g.size() || int'(g_data) != g[idx]) begin
          failures++;
          if (failures < 20) $display("beat %0d = %0d, expected %0d (cfg %0d/%0d/%0d)",
                                      idx, g_data, (idx < g.size()) ? g[idx] : 0, ni, nh, no);
        end
        checks++;
        if (g_last != (idx == g.size() - 1)) failures++;
        l1 += (g_data < 0) ? -longint'(g_data) : longint'(g_data);
        idx++;
        if (g_last) break;
      end else if (g_valid) begin
        stalls++;
        held = g_data;
        held_last = g_last;
        have_held = 1;
      end
      @(negedge clk);
    end
    g_ready <= 1;
    @(posedge clk);
    @(negedge clk);
    checks += 2;
    if (idx != g.size()) failures++;
    if (!done && !busy) ; // done already seen or pending
    if (longint'(grad_l1) != l1) begin
      failures++;
      $display("grad_l1 %0d expected %0d", grad_l1, l1);
    end
  endtask

  initial begin
    for (int i = 0; i < IN_ROW; i++)  x_act[i] = '0;
    for (int j = 0; j < HID_ROW; j++) h_act[j] = '0;
    for (int k = 0; k < MAX_OUT; k++) delta[k] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    load_w2(200);
    run_job(4, 64, 2, 0, 0);
    run_job(4, 64, 1, 1, 0);
    run_job(8, 64, 4, 0, 1);
    run_job(6, 64, 3, 0, 0);
    for (int t = 0; t < 8; t++)
      run_job($urandom_range(1, MAX_IN), $urandom_range(1, MAX_HID),
              $urandom_range(1, MAX_OUT), $urandom_range(1), t[0]);
    checks++;
    if (stalls == 0) begin failures++; $display("no back-pressure stall happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
