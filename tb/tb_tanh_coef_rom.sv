// tb_tanh_coef_rom: checks both coefficient tables.
//  - Segment 128 (x in [1, 1+1/128)) holds a1 = 3502086 (x 2^23) and a0 = 90208, so
//    that a0 + a1*1.0 = 199648 = round(tanh(1) * 2^18) + 2.
//  - For every segment the line a0 + a1*x stays within 1.5 LSB of
//    tanh(x)*2^18 at the segment's start, middle and end. This is an
//    independent check against $tanh, not a recomputation of the fit.
//  - The read is registered (one cycle).
module tb_tanh_coef_rom;
  logic clk = 0;
  logic [9:0] addr = '0;
  logic [23:0] qa, qb;
  int checks = 0, failures = 0;

  tanh_coef_rom #(.TABLE(wnn_pkg::TANH_SLOPE))  rom_a (.clk, .addr, .q(qa));
  tanh_coef_rom #(.TABLE(wnn_pkg::TANH_OFFSET)) rom_b (.clk, .addr, .q(qb));
  always #5 clk = ~clk;

  initial begin
    real sc, err, xx;
    sc = 262144.0;
    for (int k = 0; k < 1024; k++) begin
      @(negedge clk) addr = 10'(k);
      @(posedge clk); #1;
      if (k == 128) begin
        checks++;
        if (qa != 24'd3502086 || qb != 24'd90208) begin
          failures++; $display("FAIL seg 128: a1=%0d a0=%0d", qa, qb);
        end
      end
      for (int j = 0; j <= 2; j++) begin
        xx = (real'(k) + 0.5 * real'(j)) / 128.0;
        err = (real'(qb) + real'(qa) / 32.0 * xx) - $tanh(xx) * sc;
        checks++;
        if (err > 1.5 || err < -1.5) begin
          failures++; $display("FAIL seg %0d point %0d: err %f LSB", k, j, err);
        end
      end
    end
    // registered read: the output must not follow addr before the clock edge
    @(negedge clk) addr = 10'd0;
    @(posedge clk); #1;
    @(negedge clk) addr = 10'd512;
    #1 checks++;
    if (qa == rom_a.ROM[512] && rom_a.ROM[512] != rom_a.ROM[0]) begin
      failures++; $display("FAIL read not registered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
