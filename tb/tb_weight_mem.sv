// tb_weight_mem: fills the whole weight buffer of both networks with random
// values through the host port, then reads random chunks on both read ports
// at once and compares each returned lane with the value written to that
// (network, layer, row, column), one cycle after the read.
module tb_weight_mem;
  import a2c_pkg::*;

  localparam int C1 = (MAX_IN + 1 + LANES - 1) / LANES;
  localparam int C2 = (MAX_HID + 1 + LANES - 1) / LANES;

  logic clk = 0;
  always #5 clk = ~clk;

  logic wr_en = 0, wr_layer = 0, a_rd_en = 0, b_rd_en = 0, a_layer = 0, b_layer = 0;
  net_t wr_net = NET_ACTOR, a_net = NET_ACTOR, b_net = NET_ACTOR;
  dim_t wr_row = 0, wr_col = 0, a_row = 0, a_chunk = 0, b_row = 0, b_chunk = 0;
  fx_t  wr_data = 0;
  fx_t  a_data [LANES];
  fx_t  b_data [LANES];

  weight_mem dut (
    .clk, .wr_en, .wr_net, .wr_layer, .wr_row, .wr_col, .wr_data,
    .a_rd_en, .a_rd_net(a_net), .a_rd_layer(a_layer), .a_rd_row(a_row),
    .a_rd_chunk(a_chunk), .a_rd_data(a_data),
    .b_rd_en, .b_rd_net(b_net), .b_rd_layer(b_layer), .b_rd_row(b_row),
    .b_rd_chunk(b_chunk), .b_rd_data(b_data)
  );

  int model [2][2][MAX_HID][C2*LANES];
  int checks = 0, failures = 0;

  function automatic int rows_of(int layer);  return layer ? MAX_OUT : MAX_HID; endfunction
  function automatic int cols_of(int layer);  return layer ? C2*LANES : C1*LANES; endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    for (int n = 0; n < 2; n++)
      for (int ly = 0; ly < 2; ly++)
        for (int r = 0; r < rows_of(ly); r++)
          for (int c = 0; c < cols_of(ly); c++) begin
            model[n][ly][r][c] = $signed(16'($urandom));
            wr_en <= 1; wr_net <= net_t'(n); wr_layer <= ly[0];
            wr_row <= dim_t'(r); wr_col <= dim_t'(c); wr_data <= fx_t'(model[n][ly][r][c]);
            @(posedge clk);
          end
    wr_en <= 0;
    for (int t = 0; t < 2000; t++) begin
      int an, al, ar, ac, bn, bl, br, bc;
      an = $urandom_range(1); al = $urandom_range(1);
      ar = $urandom_range(rows_of(al) - 1); ac = $urandom_range(cols_of(al)/LANES - 1);
      bn = $urandom_range(1); bl = $urandom_range(1);
      br = $urandom_range(rows_of(bl) - 1); bc = $urandom_range(cols_of(bl)/LANES - 1);
      a_rd_en <= 1; a_net <= net_t'(an); a_layer <= al[0]; a_row <= dim_t'(ar); a_chunk <= dim_t'(ac);
      b_rd_en <= 1; b_net <= net_t'(bn); b_layer <= bl[0]; b_row <= dim_t'(br); b_chunk <= dim_t'(bc);
      @(posedge clk);
      a_rd_en <= 0; b_rd_en <= 0;
      @(negedge clk);
      for (int l = 0; l < LANES; l++) begin
        checks += 2;
        if (int'(a_data[l]) != model[an][al][ar][ac*LANES+l]) begin
          failures++;
          if (failures < 10) $display("port A mismatch n%0d l%0d r%0d c%0d lane %0d: %0d != %0d",
                                      an, al, ar, ac, l, a_data[l], model[an][al][ar][ac*LANES+l]);
        end
        if (int'(b_data[l]) != model[bn][bl][br][bc*LANES+l]) begin
          failures++;
          if (failures < 10) $display("port B mismatch lane %0d", l);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
