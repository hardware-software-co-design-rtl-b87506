// a2c_ref_pkg: plain integer reference model of the accelerator's network
// arithmetic, used by the testbenches to work out expected values without
// the RTL. Values are Q8.8 held in int; a product or sum is shifted right
// by 8 (floor) and clipped to the 16-bit range, as the RTL specifies.
package a2c_ref_pkg;
  import a2c_pkg::*;

  localparam int IN_ROW  = ((MAX_IN + 1 + LANES - 1) / LANES) * LANES;
  localparam int HID_ROW = ((MAX_HID + 1 + LANES - 1) / LANES) * LANES;

  typedef int w1_t   [MAX_HID][IN_ROW];
  typedef int w2_t   [MAX_OUT][HID_ROW];
  typedef int xv_t   [IN_ROW];
  typedef int hv_t   [HID_ROW];
  typedef int yv_t   [MAX_OUT];
  typedef int obs_t  [MAX_IN];

  function automatic int clip(longint v);
    longint s;
    s = v >>> 8;
    if (s > 32767)  return 32767;
    if (s < -32768) return -32768;
    return int'(s);
  endfunction

  // Input vector with the bias input appended.
  function automatic xv_t pad_x(obs_t x, int n_in);
    xv_t xa;
    for (int i = 0; i < IN_ROW; i++)
      xa[i] = (i < n_in) ? x[i] : ((i == n_in) ? 256 : 0);
    return xa;
  endfunction

  function automatic hv_t hidden(w1_t w1, xv_t xa, int n_in, int n_hid);
    hv_t h;
    for (int j = 0; j < HID_ROW; j++) h[j] = 0;
    for (int j = 0; j < n_hid; j++) begin
      longint s = 0;
      int v;
      for (int i = 0; i <= n_in; i++) s += longint'(w1[j][i]) * longint'(xa[i]);
      v = clip(s);
      h[j] = (s > 0) ? v : 0;
    end
    h[n_hid] = 256;
    return h;
  endfunction

  function automatic yv_t outputs(w2_t w2, hv_t h, int n_hid, int n_out);
    yv_t y;
    for (int k = 0; k < MAX_OUT; k++) y[k] = 0;
    for (int k = 0; k < n_out; k++) begin
      longint s = 0;
      for (int j = 0; j <= n_hid; j++) s += longint'(w2[k][j]) * longint'(h[j]);
      y[k] = clip(s);
    end
    return y;
  endfunction

  // All gradients of one backward pass, in stream order.
  function automatic void grads(w2_t w2, xv_t xa, hv_t h, yv_t delta,
                                int n_in, int n_hid, int n_out, ref int g[$]);
    hv_t dh;
    g.delete();
    for (int j = 0; j < HID_ROW; j++) begin
      longint s = 0;
      for (int k = 0; k < n_out; k++) s += longint'(w2[k][j]) * longint'(delta[k]);
      dh[j] = (j < n_hid && h[j] > 0) ? clip(s) : 0;
    end
    for (int k = 0; k < n_out; k++)
      for (int j = 0; j <= n_hid; j++) g.push_back(clip(longint'(delta[k]) * longint'(h[j])));
    for (int j = 0; j < n_hid; j++)
      for (int i = 0; i <= n_in; i++) g.push_back(clip(longint'(dh[j]) * longint'(xa[i])));
  endfunction

endpackage
