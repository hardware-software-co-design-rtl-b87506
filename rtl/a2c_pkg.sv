// a2c_pkg: types, sizes and fixed-point helpers shared by the actor-critic
// accelerator.
//
// All network values (observations, weights, activations, network outputs,
// output-layer errors and gradients) are 16-bit two's-complement fixed point
// with 8 fractional bits (Q8.8). Products are formed at full width and
// accumulated in 48 bits, then shifted back by FRAC (truncation towards minus
// infinity) and saturated to 16 bits. The number format, the network maxima
// and the number of agents are this design's own choices; the maxima are set
// so that the largest control task the accelerator targets (8 observations,
// 4 discrete actions) fits, with one hidden layer of 64 ReLU units.
package a2c_pkg;

  localparam int DATA_W    = 16;   // width of one fixed-point value
  localparam int FRAC      = 8;    // fractional bits of a value
  localparam int ACC_W     = 48;   // accumulator width
  localparam int LANES     = 8;    // parallel multipliers per engine
  localparam int MAX_IN    = 8;    // largest observation vector
  localparam int MAX_HID   = 64;   // largest hidden layer
  localparam int MAX_OUT   = 4;    // largest actor output (discrete actions)
  localparam int N_AGENTS  = 4;    // agents sharing the engines
  localparam int AXIS_W    = 32;   // AXI4-Stream data width

  typedef logic signed [DATA_W-1:0] fx_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic [7:0]               dim_t;   // run-time layer sizes

  localparam fx_t FX_ONE = fx_t'(1 << FRAC);

  // Which network a pass uses. Both live in the same weight memory and run
  // on the same engine.
  typedef enum logic {NET_ACTOR = 1'b0, NET_CRITIC = 1'b1} net_t;

  // Learning modes of the meta-optimizer.
  typedef enum logic [1:0] {
    OPT_AGGRESSIVE = 2'd0,   // aggressive descent
    OPT_STABILIZE  = 2'd1,   // stability correction
    OPT_REFINE     = 2'd2    // cautious refinement
  } opt_state_t;

  // Job kinds carried by an input packet.
  typedef enum logic {JOB_INFER = 1'b0, JOB_GRAD = 1'b1} job_t;

  // Shift a wide sum back to Q8.8 and saturate.
  function automatic fx_t fx_from_acc(acc_t a);
    acc_t s;
    s = a >>> FRAC;
    if (s > acc_t'(32767))       return fx_t'(16'sh7fff);
    else if (s < acc_t'(-32768)) return fx_t'(16'sh8000);
    else                         return fx_t'(s[DATA_W-1:0]);
  endfunction

  // Q8.8 product, truncated and saturated.
  function automatic fx_t fx_mul(fx_t a, fx_t b);
    acc_t p;
    p = acc_t'(a) * acc_t'(b);
    return fx_from_acc(p);
  endfunction

endpackage
