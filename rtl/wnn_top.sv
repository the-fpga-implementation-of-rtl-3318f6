// wnn_top: wavelet-neural network building blocks for transformer
// differential protection.
//
// Two parts sit side by side. The wavelet front end takes one 16-bit
// differential-current sample per clock. It frames a window of N samples at
// each upward zero crossing and produces N/2 detail (ch) and N/2
// approximation (cl) DB2 coefficients. The neuron computes
// tanh(sum w[i]*x[i]) over N_IN inputs with weights from its RAM. This
// is the building block of the fault/inrush classifier. How wavelet
// coefficients become network inputs (energy features) and the size of the
// network are not fixed here. Both parts therefore have their own ports, so
// a feature stage and a network of neurons can be added around them.
//
// Timing: see wavelet_transform and neuron. Both use the same clock and
// the asynchronous active-low reset rst_n.
module wnn_top #(
  parameter int N    = 12,
  parameter int N_IN = 8,
  parameter int AW   = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // wavelet transform
  input  logic signed [wnn_pkg::WT_IN_W-1:0]     x,
  output logic signed [wnn_pkg::WT_IN_W-1:0]     ext_sample,
  output logic signed [wnn_pkg::WT_OUT_W-1:0]    ch,
  output logic signed [wnn_pkg::WT_OUT_W-1:0]    cl,
  output logic                                   coef_valid,
  output logic                                   coef_last,
  output logic                                   wt_busy,
  // neuron
  input  logic signed [wnn_pkg::NN_W-1:0]        nn_x [N_IN],
  input  logic                                   nn_start,
  input  logic                                   w_we,
  input  logic [AW-1:0]                          w_addr,
  input  logic signed [wnn_pkg::NN_W-1:0]        w_data,
  output logic                                   nn_busy,
  output logic signed [wnn_pkg::NN_W-1:0]        nn_sum,
  output logic signed [wnn_pkg::TANH_OUT_W-1:0]  nn_y,
  output logic                                   nn_y_valid
);
  wavelet_transform #(.N(N)) u_wt (
    .clk, .rst_n, .x, .ext_sample, .ch, .cl, .coef_valid, .coef_last, .busy(wt_busy));

  neuron #(.N_IN(N_IN), .AW(AW)) u_neuron (
    .clk, .rst_n, .x(nn_x), .start(nn_start), .w_we, .w_addr, .w_data,
    .busy(nn_busy), .sum(nn_sum), .y(nn_y), .y_valid(nn_y_valid));
endmodule
