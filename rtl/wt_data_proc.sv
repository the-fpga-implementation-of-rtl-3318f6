// wt_data_proc: window framing with symmetric extension for the wavelet filters.
//
// A zero-crossing pulse starts a window of N samples x0 .. x[N-1], where x0
// is the sample present with the pulse. The block emits the window with a
// two-sample half-point symmetric extension in front:
//     x1, x0, x0, x1, x2, ..., x[N-1]        (N+2 samples, one per clock)
// With this extension, the 4-tap filters and the decimator behind them
// produce N/2 wavelet coefficients per window.
//
// Timing (t0 = pulse cycle): dout is registered. x1 appears in cycle t0+2,
// x0 in t0+3, and x[k] in t0+4+k. dvalid marks the N+2 samples, and dfirst
// marks the first of them (x1). While a window is being emitted (busy),
// further pulses are ignored, except in the cycle that emits the last
// sample. So windows can follow back to back when pulses come every N+2
// cycles or more.
//
// The extended output stream follows the document. The pulse handling
// while busy and the exact latency are this design's choices.
module wt_data_proc #(
  parameter int W   = wnn_pkg::WT_IN_W,
  parameter int N   = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] x,
  input  logic                zc_pulse,
  output logic signed [W-1:0] dout,
  output logic                dvalid,
  output logic                dfirst,
  output logic                busy
);
  localparam int LAST = N + 2;             // phase of the last emitted sample
  localparam int PH_W = $clog2(LAST + 1);

  logic signed [W-1:0] d1, d2, d3;         // input delayed by 1, 2, 3 cycles
  logic [PH_W-1:0]     ph;                 // 0: idle, 1..LAST: position
  logic                start;

  assign busy  = (ph != '0);
  assign start = zc_pulse && (ph == '0 || ph == PH_W'(LAST));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d1 <= '0; d2 <= '0; d3 <= '0;
    end else begin
      d1 <= x; d2 <= d1; d3 <= d2;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 ph <= '0;
    else if (start)             ph <= PH_W'(1);
    else if (ph == PH_W'(LAST)) ph <= '0;
    else if (ph != '0)          ph <= ph + PH_W'(1);
  end

  // Registered output: phase 1 takes x1 straight from the input, phase 2
  // takes x0 from two cycles back, and phases 3..LAST take x[ph-3].
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout <= '0; dvalid <= 1'b0; dfirst <= 1'b0;
    end else begin
      dvalid <= (ph != '0);
      dfirst <= (ph == PH_W'(1));
      if (ph == PH_W'(1))      dout <= x;
      else if (ph == PH_W'(2)) dout <= d2;
      else if (ph != '0)       dout <= d3;
    end
  end
endmodule
