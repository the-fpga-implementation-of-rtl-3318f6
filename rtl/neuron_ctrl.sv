// neuron_ctrl: control unit of the neuron.
//
// A start strobe, when the unit is idle and hold is low, begins one
// evaluation. For N_IN cycles the unit then counts idx = 0 .. N_IN-1. idx is
// both the weight RAM address and the input multiplexer select. first flags
// idx == 0 (the accumulator reloads) and last flags idx == N_IN-1 (the sum is
// complete; this is the comparator with the constant N_IN-1). active is high
// while idx is a valid term. A start while busy is ignored.
//
// Timing: the term idx = 0 is in the cycle after start. busy is high for
// the N_IN cycles of the count.
//
// The counter, the comparator and the accumulator reset follow the
// document. The start/hold interface is this design's choice.
module neuron_ctrl #(
  parameter int N_IN = 8,
  parameter int AW   = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          hold,
  output logic [AW-1:0] idx,
  output logic          active,
  output logic          first,
  output logic          last,
  output logic          busy
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0; active <= 1'b0;
    end else if (!active) begin
      if (start && !hold) begin
        idx <= '0; active <= 1'b1;
      end
    end else if (idx == AW'(N_IN - 1)) begin
      idx <= '0; active <= 1'b0;
    end else begin
      idx <= idx + AW'(1);
    end
  end

  assign busy  = active;
  assign first = active && (idx == '0);
  assign last  = active && (idx == AW'(N_IN - 1));
endmodule
