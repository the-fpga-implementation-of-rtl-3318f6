// wt_downsample: down-sampling by two of one filter output stream.
//
// The filter output of an extended window has N+2 samples at positions
// 0 .. N+1. Position 0 carries din_first. The block keeps positions
// 3, 5, ..., N+1. These are the outputs whose four taps all lie inside the
// extended window, and they give N/2 wavelet coefficients. A kept value
// is registered and held on dout until the next one. dout_valid pulses for
// one cycle with each new value, and dout_last pulses with the last one of
// the window. Latency: one cycle from din to dout.
//
// Decimation by two follows the document. The phase (odd positions from 3)
// is chosen so that the coefficients match the document's printed results
// for its example window.
module wt_downsample #(
  parameter int W = wnn_pkg::WT_OUT_W,
  parameter int N = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] din,
  input  logic                din_valid,
  input  logic                din_first,
  output logic signed [W-1:0] dout,
  output logic                dout_valid,
  output logic                dout_last
);
  localparam int LASTPOS = N + 1;
  localparam int POS_W   = $clog2(LASTPOS + 1);

  logic [POS_W-1:0] pos_q;   // position of the previous valid sample
  logic [POS_W-1:0] pos;     // position of din
  logic             keep;

  always_comb begin
    pos  = din_first ? '0 : pos_q + POS_W'(1);
    keep = din_valid && pos[0] && (pos >= POS_W'(3)) && (pos <= POS_W'(LASTPOS));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_q <= '0; dout <= '0; dout_valid <= 1'b0; dout_last <= 1'b0;
    end else begin
      if (din_valid) pos_q <= pos;
      dout_valid <= keep;
      dout_last  <= keep && (pos == POS_W'(LASTPOS));
      if (keep) dout <= din;
    end
  end
endmodule
