// weight_mem: on-chip weight buffer for the actor and the critic network.
//
// Both networks have one hidden layer. Each layer is stored as a matrix whose
// row r holds the weights feeding output neuron r, followed by the neuron's
// bias in the column just after the last input (the engines append a
// constant 1.0 to every input vector). Rows are padded to a whole number of
// LANES-wide chunks and split over LANES banks, so one read returns the LANES
// consecutive weights of one chunk of one row.
//
// Layout (per network, actor first): layer 1 occupies MAX_HID rows of C1
// chunks, layer 2 MAX_OUT rows of C2 chunks, with
// C1 = ceil((MAX_IN+1)/LANES) and C2 = ceil((MAX_HID+1)/LANES).
//
// Interface: one write port for the host (one weight per cycle, addressed by
// network, layer, row and column) and two independent read ports, A for the
// feed-forward engine and B for the gradient engine. Reads have one cycle of
// latency: the chunk addressed while rd_en is high appears on rd_data in the
// next cycle and is held until the next read. Sharing one buffer between the
// two networks and the two engines follows the accelerator's shared-core
// organisation; the banking, the two read ports and the bias-as-column layout
// are this design's choices.
module weight_mem
  import a2c_pkg::*;
#(
  parameter int LANES_P   = LANES,
  parameter int MAX_IN_P  = MAX_IN,
  parameter int MAX_HID_P = MAX_HID,
  parameter int MAX_OUT_P = MAX_OUT
) (
  input  logic clk,
  // host write port
  input  logic  wr_en,
  input  net_t  wr_net,
  input  logic  wr_layer,     // 0: input->hidden, 1: hidden->output
  input  dim_t  wr_row,       // output neuron
  input  dim_t  wr_col,       // input index; column n_in holds the bias
  input  fx_t   wr_data,
  // read port A (feed-forward engine)
  input  logic  a_rd_en,
  input  net_t  a_rd_net,
  input  logic  a_rd_layer,
  input  dim_t  a_rd_row,
  input  dim_t  a_rd_chunk,
  output fx_t   a_rd_data [LANES_P],
  // read port B (gradient engine)
  input  logic  b_rd_en,
  input  net_t  b_rd_net,
  input  logic  b_rd_layer,
  input  dim_t  b_rd_row,
  input  dim_t  b_rd_chunk,
  output fx_t   b_rd_data [LANES_P]
);

  localparam int C1       = (MAX_IN_P + 1 + LANES_P - 1) / LANES_P;
  localparam int C2       = (MAX_HID_P + 1 + LANES_P - 1) / LANES_P;
  localparam int L1_ROWS  = MAX_HID_P * C1;
  localparam int NET_ROWS = L1_ROWS + MAX_OUT_P * C2;
  localparam int DEPTH    = 2 * NET_ROWS;
  localparam int AW       = $clog2(DEPTH);
  localparam int LW       = (LANES_P > 1) ? $clog2(LANES_P) : 1;

  typedef logic [AW-1:0] addr_t;

  // Bank row of (network, layer, row, chunk).
  function automatic addr_t row_addr(net_t n, logic layer, dim_t row, dim_t chunk);
    int unsigned a;
    a = (n == NET_CRITIC) ? NET_ROWS : 0;
    if (!layer) a = a + int'(row) * C1 + int'(chunk);
    else        a = a + L1_ROWS + int'(row) * C2 + int'(chunk);
    return addr_t'(a);
  endfunction

  addr_t       wr_addr, a_addr, b_addr;
  logic [LW-1:0] wr_bank;

  always_comb begin
    wr_addr = row_addr(wr_net, wr_layer, wr_row, dim_t'(int'(wr_col) / LANES_P));
    wr_bank = LW'(int'(wr_col) % LANES_P);
    a_addr  = row_addr(a_rd_net, a_rd_layer, a_rd_row, a_rd_chunk);
    b_addr  = row_addr(b_rd_net, b_rd_layer, b_rd_row, b_rd_chunk);
  end

  for (genvar l = 0; l < LANES_P; l++) begin : g_bank
    fx_t bank [DEPTH];

    always_ff @(posedge clk) begin
      if (wr_en && wr_bank == LW'(l)) bank[wr_addr] <= wr_data;
      if (a_rd_en) a_rd_data[l] <= bank[a_addr];
      if (b_rd_en) b_rd_data[l] <= bank[b_addr];
    end
  end

endmodule
