// wavelet_transform: one level of Mallat DB2 wavelet decomposition.
//
// Chain: zero-crossing detection -> data processing (window of N samples
// with a two-sample symmetric extension) -> high-pass filter G and low-pass
// filter H in parallel -> down-sampling by two on each branch. A window of N
// current samples gives N/2 detail coefficients ch (high-pass) and N/2
// approximation coefficients cl (low-pass). Both are 16 times their true
// value, because the filter coefficients are scaled by 16.
//
// Timing: one input sample per clock. If the window starts at cycle t0, the
// first coefficient pair is strobed by coef_valid in cycle t0+7. Later
// pairs follow every two cycles; coef_last marks the N/2-th. ext_sample
// shows the extended stream fed to the filters. busy is high while a
// window is being framed; pulses during that time are ignored.
//
// The block structure, coefficients and window extension follow the
// document. The interface flags and the latencies are this design's own.
module wavelet_transform #(
  parameter int N = 12
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic signed [wnn_pkg::WT_IN_W-1:0]    x,
  output logic signed [wnn_pkg::WT_IN_W-1:0]    ext_sample,
  output logic signed [wnn_pkg::WT_OUT_W-1:0]   ch,
  output logic signed [wnn_pkg::WT_OUT_W-1:0]   cl,
  output logic                                  coef_valid,
  output logic                                  coef_last,
  output logic                                  busy
);
  import wnn_pkg::*;

  logic                       zc;
  logic signed [WT_IN_W-1:0]  s;
  logic                       s_valid, s_first;
  logic signed [WT_OUT_W-1:0] g_y, h_y;
  logic                       g_valid, g_first, h_valid, h_first;
  logic                       ch_valid, ch_last, cl_valid, cl_last;

  wt_zero_cross #(.W(WT_IN_W)) u_zc (
    .clk, .rst_n, .x, .zc_pulse(zc));

  wt_data_proc #(.W(WT_IN_W), .N(N)) u_dp (
    .clk, .rst_n, .x, .zc_pulse(zc),
    .dout(s), .dvalid(s_valid), .dfirst(s_first), .busy);

  wt_fir4 #(.IN_W(WT_IN_W), .OUT_W(WT_OUT_W), .C(WT_G)) u_fltg (
    .clk, .rst_n, .din(s), .din_valid(s_valid), .din_first(s_first),
    .dout(g_y), .dout_valid(g_valid), .dout_first(g_first));

  wt_fir4 #(.IN_W(WT_IN_W), .OUT_W(WT_OUT_W), .C(WT_H)) u_flth (
    .clk, .rst_n, .din(s), .din_valid(s_valid), .din_first(s_first),
    .dout(h_y), .dout_valid(h_valid), .dout_first(h_first));

  wt_downsample #(.W(WT_OUT_W), .N(N)) u_ds_g (
    .clk, .rst_n, .din(g_y), .din_valid(g_valid), .din_first(g_first),
    .dout(ch), .dout_valid(ch_valid), .dout_last(ch_last));

  wt_downsample #(.W(WT_OUT_W), .N(N)) u_ds_h (
    .clk, .rst_n, .din(h_y), .din_valid(h_valid), .din_first(h_first),
    .dout(cl), .dout_valid(cl_valid), .dout_last(cl_last));

  assign ext_sample = s;
  assign coef_valid = ch_valid;
  assign coef_last  = ch_last;

  // Both branches see the same flags, so their strobes coincide.
  a_branches_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    (ch_valid == cl_valid) && (ch_last == cl_last));
endmodule
