// rr_scheduler: round-robin slot scheduler for the agents that share the
// feed-forward and gradient engines.
//
// Each agent raises req[i] while it has a job waiting. Whenever the engines
// are free, the scheduler grants the first requesting agent after the one it
// granted last (wrapping around), so every waiting agent is served within
// N_P slots and no agent can be starved, independent of request timing.
//
// Interface: grant_valid/grant_id/grant_oh are combinational from req and the
// pointer. `accept` (high for one cycle while grant_valid) takes the grant:
// the pointer then moves to the granted agent. Reset points the search at
// agent 0. Round-robin servicing follows the architecture; the
// pointer-based arbiter is the simplest circuit that gives it.
module rr_scheduler #(
  parameter int N_P = a2c_pkg::N_AGENTS,
  localparam int IW = (N_P > 1) ? $clog2(N_P) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N_P-1:0] req,
  input  logic          accept,
  output logic          grant_valid,
  output logic [IW-1:0] grant_id,
  output logic [N_P-1:0] grant_oh
);

  logic [IW-1:0] last;   // agent granted last

  always_comb begin
    grant_valid = 1'b0;
    grant_id    = '0;
    for (int off = N_P; off >= 1; off--)
      if (req[(int'(last) + off) % N_P]) begin
        grant_valid = 1'b1;
        grant_id    = IW'((int'(last) + off) % N_P);
      end
    grant_oh = grant_valid ? (N_P'(1) << grant_id) : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    last <= IW'(N_P - 1);
    else if (accept && grant_valid) last <= grant_id;
  end

  // A grant may only be taken when there is one.
  assert property (@(posedge clk) disable iff (!rst_n) accept |-> grant_valid);

endmodule
