// neuron: one neuron, y = tanh( sum_{i=0}^{N_IN-1} w[i] * x[i] ).
//
// The N_IN inputs arrive in parallel. The weights sit in a single-port RAM
// and can only be read one per cycle. So the control unit counts
// i = 0 .. N_IN-1, reads w[i] and selects x[i] through a multiplexer in the
// same cycle. The multiply-accumulate unit sums the products; it reloads on
// i = 0, which clears the previous sum. When the last term is in, the sum
// (scaled by 2^36) goes to an output buffer. The buffer rescales it to
// 2^18 through a bus conversion (bits [39:18], saturated to 22 bits) and
// feeds the tanh excitation function.
//
// Interface: x[i], w and y are signed and scaled by 2^18. Load the weights
// with w_we/w_addr/w_data while the neuron is idle. A write cycle blocks a
// start in the same cycle. start begins one evaluation. The inputs x
// must stay stable while busy is high (N_IN cycles from the cycle after
// start). sum shows the buffered weighted sum, and y_valid strobes y.
//
// Timing: start in cycle S gives the sum in S+N_IN+3 and y_valid in
// S+N_IN+6 (14 cycles with N_IN = 8). A start is accepted in any cycle
// with busy low, so evaluations can follow each other every N_IN+1 cycles.
//
// The RAM, counter, multiplexer, multiply-accumulate, buffer and
// excitation function follow the document. The start/busy handshake,
// the saturation and the pipeline registers are this design's choices.
module neuron #(
  parameter int N_IN = 8,
  parameter int W    = wnn_pkg::NN_W,
  parameter int FRAC = wnn_pkg::FRAC,
  parameter int ACC_W = 48,
  parameter int AW   = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic signed [W-1:0]                   x [N_IN],
  input  logic                                  start,
  input  logic                                  w_we,
  input  logic [AW-1:0]                         w_addr,
  input  logic signed [W-1:0]                   w_data,
  output logic                                  busy,
  output logic signed [W-1:0]                   sum,
  output logic signed [wnn_pkg::TANH_OUT_W-1:0] y,
  output logic                                  y_valid
);
  logic [AW-1:0]       idx;
  logic                active, first, last;
  logic [W-1:0]        w_q;
  logic signed [W-1:0] x_q;
  logic                act1, first1, last1, last2;
  logic signed [ACC_W-1:0] acc;
  logic                sum_valid;

  neuron_ctrl #(.N_IN(N_IN), .AW(AW)) u_ctrl (
    .clk, .rst_n, .start, .hold(w_we),
    .idx, .active, .first, .last, .busy);

  // Single port: the write address wins while weights are loaded.
  weight_ram #(.DEPTH(N_IN), .WIDTH(W), .AW(AW)) u_ram (
    .clk, .addr(w_we ? w_addr : idx), .we(w_we && !active), .wdata(w_data), .q(w_q));

  // Input multiplexer, registered to line up with the RAM read.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0; act1 <= 1'b0; first1 <= 1'b0; last1 <= 1'b0; last2 <= 1'b0;
    end else begin
      x_q    <= x[idx];
      act1   <= active;
      first1 <= first;
      last1  <= last;
      last2  <= last1;
    end
  end

  mac_unit #(.A_W(W), .ACC_W(ACC_W)) u_mac (
    .clk, .rst_n, .a(x_q), .b(signed'(w_q)), .en(act1), .sload(first1), .acc);

  // Output buffer with bus conversion: acc / 2^FRAC, saturated to W bits.
  localparam int SH_W = ACC_W - FRAC;
  localparam logic signed [SH_W-1:0] MAXV = SH_W'((64'sd1 <<< (W - 1)) - 1);
  localparam logic signed [SH_W-1:0] MINV = -SH_W'(64'sd1 <<< (W - 1));
  logic signed [SH_W-1:0] acc_sh;
  logic signed [W-1:0]    conv;
  always_comb begin
    acc_sh = SH_W'(acc >>> FRAC);
    if (acc_sh > MAXV)      conv = W'(MAXV);
    else if (acc_sh < MINV) conv = W'(MINV);
    else                    conv = W'(acc_sh);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum <= '0; sum_valid <= 1'b0;
    end else begin
      sum_valid <= last2;
      if (last2) sum <= conv;
    end
  end

  tanh_unit #(.IN_W(W), .FRAC(FRAC)) u_f (
    .clk, .rst_n, .x(sum), .x_valid(sum_valid), .y, .y_valid);

  // Weights must not be written while an evaluation reads them.
  a_no_write_busy: assert property (@(posedge clk) disable iff (!rst_n) !(w_we && active));
endmodule
