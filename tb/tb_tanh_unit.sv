// tb_tanh_unit: checks the pipelined tanh against $tanh.
//  - tanh(1.0): input 262144 must give exactly 199648.
//  - A sweep of the whole input range [-8, 8) in steps of 2^-10, then random
//    inputs, one input per cycle. Each result must be within TOL LSB of
//    tanh(x)*2^18; negative inputs are compared with the one's complement
//    form -tanh(|x| - 2^-18)*2^18 - 1.
//  - The latency is exactly 3 cycles, and y_valid follows x_valid.
module tb_tanh_unit;
  logic clk = 0, rst_n = 0;
  logic signed [21:0] x = '0;
  logic xv = 0;
  logic signed [19:0] y;
  logic yv;
  int checks = 0, failures = 0;
  localparam real TOL = 2.0;

  tanh_unit dut (.clk, .rst_n, .x, .x_valid(xv), .y, .y_valid(yv));
  always #5 clk = ~clk;

  // input history for the 3-cycle latency
  logic signed [21:0] xh [4];
  logic               vh [4];
  int neg_seen = 0, pos_seen = 0;

  always @(posedge clk) if (rst_n) begin
    for (int k = 3; k > 0; k--) begin xh[k] <= xh[k-1]; vh[k] <= vh[k-1]; end
    xh[0] <= x; vh[0] <= xv;
  end

  always @(negedge clk) if (rst_n) begin
    // y now belongs to the input applied 3 clock edges ago (xh[2])
    checks++;
    if (yv !== vh[2]) begin failures++; $display("FAIL valid timing"); end
    if (vh[2]) begin
      real e, xr;
      xr = real'(xh[2]) / 262144.0;
      if (xh[2] < 0) begin
        e = -$tanh(-xr - 1.0 / 262144.0) * 262144.0 - 1.0;
        neg_seen++;
      end else begin
        e = $tanh(xr) * 262144.0;
        pos_seen++;
      end
      checks++;
      if (real'(y) - e > TOL || e - real'(y) > TOL) begin
        failures++; $display("FAIL x=%0d y=%0d exp %f", xh[2], y, e);
      end
      if (xh[2] == 22'sd262144) begin
        checks++;
        if (y != 20'sd199648) begin failures++; $display("FAIL tanh(1) = %0d", y); end
      end
    end
  end

  initial begin
    for (int k = 0; k < 4; k++) begin xh[k] = 0; vh[k] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk) begin x = 22'sd262144; xv = 1; end
    @(negedge clk) xv = 0;
    repeat (4) @(negedge clk);
    for (int i = -8192; i < 8192; i++) begin
      @(negedge clk); #1 x = 22'(i * 256); xv = 1;
    end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk); #1 x = 22'($urandom); xv = ($urandom_range(0, 4) != 0);
    end
    @(negedge clk); #1 x = -22'sh200000; xv = 1;
    @(negedge clk); #1 x = 22'sh1fffff; xv = 1;
    @(negedge clk); #1 xv = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (neg_seen == 0 || pos_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
