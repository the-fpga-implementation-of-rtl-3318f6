// mac_unit: multiply-accumulate unit of the neuron.
//
// When en is high, the product a*b is added to the accumulator. If sload is
// high as well, the accumulator is loaded with the product instead; this
// starts a new sum and clears the previous one. a and b are signed numbers
// scaled by 2^18, so acc is scaled by 2^36. The product is kept at full
// width. Timing: acc is registered and includes the term of the previous
// cycle.
//
// The multiply-accumulate with reset by the control unit follows the
// document. The accumulator width is this design's choice: a full-width
// product plus room for 8 terms.
module mac_unit #(
  parameter int A_W   = wnn_pkg::NN_W,
  parameter int ACC_W = 48
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [A_W-1:0]   a,
  input  logic signed [A_W-1:0]   b,
  input  logic                    en,
  input  logic                    sload,
  output logic signed [ACC_W-1:0] acc
);
  logic signed [2*A_W-1:0] prod;
  assign prod = a * b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     acc <= '0;
    else if (en)    acc <= sload ? ACC_W'(prod) : acc + ACC_W'(prod);
  end
endmodule
