// obs_stream_rx: AXI4-Stream receiver that unpacks job packets streamed from
// DDR by the host's DMA into one input slot per agent.
//
// Packet (32-bit beats, tlast on the last beat):
//   header : [7:0] agent, [8] job (0 inference, 1 gradient), [9] network
//            for a gradient job (0 actor, 1 critic), other bits ignored
//   obs    : ceil(n_in/2) beats, two Q8.8 observations per beat,
//            element 2m in [15:0] and 2m+1 in [31:16]
//   delta  : gradient jobs only, ceil(MAX_OUT/2) beats of output errors
//            dL/dy packed the same way (unused entries are ignored)
// When the last beat arrives with tlast, the agent's `pending` bit is set
// and the slot holds the job until the consumer pulses `clear` with that
// agent's id. A header for an agent whose slot is still pending is not
// accepted (tready low) until the slot is cleared: that is the stream's
// back-pressure. A packet for an agent id >= N_P, or whose tlast is not on
// its last beat, is dropped up to its tlast and sets the sticky `err`.
//
// Streaming agent observations from DDR over AXI follows the architecture;
// the packet format and the slot-per-agent buffering are this design's.
module obs_stream_rx
  import a2c_pkg::*;
#(
  parameter int N_P       = N_AGENTS,
  parameter int MAX_IN_P  = MAX_IN,
  parameter int MAX_OUT_P = MAX_OUT,
  localparam int IW       = (N_P > 1) ? $clog2(N_P) : 1
) (
  input  logic clk,
  input  logic rst_n,
  input  dim_t n_in,
  // AXI4-Stream slave
  input  logic [AXIS_W-1:0] s_tdata,
  input  logic              s_tvalid,
  output logic              s_tready,
  input  logic              s_tlast,
  // agent slots
  output logic [N_P-1:0]    pending,
  output job_t              slot_job   [N_P],
  output net_t              slot_net   [N_P],
  output fx_t               slot_obs   [N_P][MAX_IN_P],
  output fx_t               slot_delta [N_P][MAX_OUT_P],
  input  logic              clear,
  input  logic [IW-1:0]     clear_id,
  output logic              err
);

  typedef enum logic [1:0] {R_HDR, R_DATA, R_DROP} rstate_t;

  localparam int DEL_BEATS = (MAX_OUT_P + 1) / 2;

  rstate_t       rstate;
  logic [IW-1:0] cur;
  dim_t          beat, obs_beats, total_beats;

  logic [7:0] hdr_agent;
  logic       hdr_ok, hdr_blocked, fire;

  always_comb begin
    hdr_agent   = s_tdata[7:0];
    hdr_ok      = int'(hdr_agent) < N_P;
    hdr_blocked = hdr_ok && pending[int'(hdr_agent) % N_P];
    s_tready    = (rstate != R_HDR) || !hdr_blocked;
    fire        = s_tvalid && s_tready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate      <= R_HDR;
      cur         <= '0;
      beat        <= '0;
      obs_beats   <= '0;
      total_beats <= '0;
      pending     <= '0;
      err         <= 1'b0;
      for (int a = 0; a < N_P; a++) begin
        slot_job[a] <= JOB_INFER;
        slot_net[a] <= NET_ACTOR;
        for (int i = 0; i < MAX_IN_P; i++)  slot_obs[a][i]   <= '0;
        for (int k = 0; k < MAX_OUT_P; k++) slot_delta[a][k] <= '0;
      end
    end else begin
      if (clear) pending[clear_id] <= 1'b0;

      if (fire) begin
        unique case (rstate)
          R_HDR: begin
            beat        <= '0;
            obs_beats   <= dim_t'((int'(n_in) + 1) / 2);
            total_beats <= dim_t'((int'(n_in) + 1) / 2 +
                                  (s_tdata[8] ? DEL_BEATS : 0));
            if (!hdr_ok || s_tlast) begin
              err    <= 1'b1;
              rstate <= s_tlast ? R_HDR : R_DROP;
            end else begin
              cur                         <= IW'(hdr_agent);
              slot_job[int'(hdr_agent) % N_P] <= job_t'(s_tdata[8]);
              slot_net[int'(hdr_agent) % N_P] <= net_t'(s_tdata[9]);
              rstate                      <= R_DATA;
            end
          end
          R_DATA: begin
            for (int h = 0; h < 2; h++) begin
              if (beat < obs_beats) begin
                if (2 * int'(beat) + h < MAX_IN_P)
                  slot_obs[cur][(2 * int'(beat) + h) % MAX_IN_P] <= fx_t'(s_tdata[16*h +: 16]);
              end else begin
                if (2 * (int'(beat) - int'(obs_beats)) + h < MAX_OUT_P)
                  slot_delta[cur][(2 * (int'(beat) - int'(obs_beats)) + h) % MAX_OUT_P] <=
                    fx_t'(s_tdata[16*h +: 16]);
              end
            end
            beat <= beat + 1;
            if (beat == total_beats - 1) begin
              if (s_tlast) begin
                pending[cur] <= 1'b1;
                rstate       <= R_HDR;
              end else begin
                err    <= 1'b1;
                rstate <= R_DROP;
              end
            end else if (s_tlast) begin
              err    <= 1'b1;
              rstate <= R_HDR;
            end
          end
          R_DROP: if (s_tlast) rstate <= R_HDR;
          default: rstate <= R_HDR;
        endcase
      end
    end
  end

  // AXI4-Stream rule: once offered, a beat stays offered until taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   s_tvalid && !s_tready |=> s_tvalid);

endmodule
