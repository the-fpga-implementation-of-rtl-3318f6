// wt_fir4: 4-tap FIR filter with constant integer coefficients.
//
//   dout[n] = C[0]*x[n] + C[1]*x[n-1] + C[2]*x[n-2] + C[3]*x[n-3]
//
// Direct form. The tap line shifts on every clock. The sum of the four
// products is registered, so dout is one cycle behind din. The valid and
// first flags are delayed by the same cycle. The wavelet transform uses
// two of these: the high-pass filter G (detail) and the low-pass filter H
// (approximation). Their coefficients are the DB2 decomposition filters,
// scaled by 16 and rounded (see wnn_pkg).
//
// The filter structure and coefficients follow the document. The one-cycle
// latency and the 6-bit coefficient width are this design's choices.
module wt_fir4 #(
  parameter int IN_W  = wnn_pkg::WT_IN_W,
  parameter int OUT_W = wnn_pkg::WT_OUT_W,
  parameter wnn_pkg::wt_coefs_t C = wnn_pkg::WT_H
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  din,
  input  logic                    din_valid,
  input  logic                    din_first,
  output logic signed [OUT_W-1:0] dout,
  output logic                    dout_valid,
  output logic                    dout_first
);
  localparam int TAPS = wnn_pkg::WT_TAPS;

  logic signed [IN_W-1:0]  tap [1:TAPS-1];  // x[n-1] .. x[n-3]
  logic signed [OUT_W-1:0] acc;

  always_comb begin
    acc = OUT_W'(din) * OUT_W'(C[0]);
    for (int k = 1; k < TAPS; k++)
      acc += OUT_W'(tap[k]) * OUT_W'(C[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < TAPS; k++) tap[k] <= '0;
      dout <= '0; dout_valid <= 1'b0; dout_first <= 1'b0;
    end else begin
      tap[1] <= din;
      for (int k = 2; k < TAPS; k++) tap[k] <= tap[k-1];
      dout       <= acc;
      dout_valid <= din_valid;
      dout_first <= din_first;
    end
  end
endmodule
