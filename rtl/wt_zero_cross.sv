// wt_zero_cross: upward zero-crossing detector for the sampled current.
//
// zc_pulse is high in the cycle where the present sample x is positive and
// the previous sample was zero or negative. This marks the first sample of a
// window for the wavelet transform. The previous sample is kept in one
// register, so the pulse is combinational from x and lines up with the sample
// that starts the window.
//
// The document only names this block. The crossing rule (upward, "<= 0 then
// > 0") is this design's choice. Reset clears the previous-sample register
// to 0, so a positive first sample after reset counts as a crossing.
module wt_zero_cross #(
  parameter int W = wnn_pkg::WT_IN_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] x,
  output logic                zc_pulse
);
  logic signed [W-1:0] x_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) x_prev <= '0;
    else        x_prev <= x;
  end

  assign zc_pulse = (x_prev <= 0) && (x > 0);
endmodule
