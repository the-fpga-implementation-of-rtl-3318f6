// tanh_unit: hyperbolic tangent excitation function of the neuron.
//
// y = tanh(x), where x is a signed 22-bit number scaled by 2^18 (range [-8, 8))
// and y is scaled by 2^18 (20 signed bits). tanh is odd, so only |x| is
// approximated:
//   1. absolute value: a comparator tests the sign and a bitwise inverter
//      gives |x| for negative x (one's complement, i.e. -x - 2^-18).
//   2. address translation: |x|[20:11] selects one of 1024 segments of width
//      1/128.
//   3. ROM A gives the slope a1 and ROM B the offset a0 of that segment
//      (see tanh_coef_rom).
//   4. multiply-add: a0 + ((a1 * |x|) >> 23). The slope is stored with 23
//      fraction bits and |x| with 18, so the shift returns to 2^18 scaling.
//   5. output: for negative x, the result is bitwise inverted again.
// Because of the two inversions, a negative input gives
// -tanh(|x| - 2^-18) - 2^-18, which is at most about 2 LSB away from the true value.
//
// Timing: fully pipelined, one input per cycle, latency 3 cycles
// (ROM read, product, adder). y_valid follows x_valid by 3 cycles.
//
// The structure (comparator, inverters, two ROMs, product, adder, output
// multiplexer) follows the document. The pipeline depth and the truncation
// of the product are this design's choices.
module tanh_unit #(
  parameter int IN_W   = wnn_pkg::NN_W,
  parameter int OUT_W  = wnn_pkg::TANH_OUT_W,
  parameter int FRAC   = wnn_pkg::FRAC,
  parameter int ADDR_W = wnn_pkg::TANH_ADDR_W,
  parameter int ROM_W  = wnn_pkg::TANH_ROM_W,
  parameter int SLOPE_FRAC = wnn_pkg::TANH_SLOPE_FRAC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  x,
  input  logic                    x_valid,
  output logic signed [OUT_W-1:0] y,
  output logic                    y_valid
);
  localparam int MAG_W  = IN_W - 1;               // |x| bits
  localparam int PROD_W = MAG_W + ROM_W;

  // stage 0: absolute value and address translation
  logic              neg0;
  logic [MAG_W-1:0]  mag0;
  logic [ADDR_W-1:0] addr0;
  always_comb begin
    neg0  = x[IN_W-1];
    mag0  = neg0 ? ~x[MAG_W-1:0] : x[MAG_W-1:0];
    addr0 = mag0[MAG_W-1 -: ADDR_W];
  end

  // stage 1: ROM read, |x| and sign delayed alongside
  logic [ROM_W-1:0] a1_1, a0_1;
  logic [MAG_W-1:0] mag1;
  logic             neg1, v1;

  tanh_coef_rom #(.TABLE(wnn_pkg::TANH_SLOPE), .ADDR_W(ADDR_W), .WIDTH(ROM_W),
                  .SEG_LOG2(FRAC - (MAG_W - ADDR_W)), .FRAC(FRAC),
                  .SLOPE_FRAC(SLOPE_FRAC))
    u_rom_a (.clk, .addr(addr0), .q(a1_1));
  tanh_coef_rom #(.TABLE(wnn_pkg::TANH_OFFSET), .ADDR_W(ADDR_W), .WIDTH(ROM_W),
                  .SEG_LOG2(FRAC - (MAG_W - ADDR_W)), .FRAC(FRAC),
                  .SLOPE_FRAC(SLOPE_FRAC))
    u_rom_b (.clk, .addr(addr0), .q(a0_1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mag1 <= '0; neg1 <= 1'b0; v1 <= 1'b0;
    end else begin
      mag1 <= mag0; neg1 <= neg0; v1 <= x_valid;
    end
  end

  // stage 2: product a1*|x|, scaled back by 2^SLOPE_FRAC
  logic [PROD_W-1:0] prod;
  logic [ROM_W-1:0]  p2, a0_2;
  logic              neg2, v2;
  assign prod = PROD_W'(mag1) * PROD_W'(a1_1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p2 <= '0; a0_2 <= '0; neg2 <= 1'b0; v2 <= 1'b0;
    end else begin
      p2 <= ROM_W'(prod >> SLOPE_FRAC); a0_2 <= a0_1; neg2 <= neg1; v2 <= v1;
    end
  end

  // stage 3: pipelined adder and sign restoration
  logic [OUT_W-1:0] sum;
  assign sum = OUT_W'(p2 + a0_2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y <= '0; y_valid <= 1'b0;
    end else begin
      y       <= neg2 ? ~sum : sum;
      y_valid <= v2;
    end
  end
endmodule
