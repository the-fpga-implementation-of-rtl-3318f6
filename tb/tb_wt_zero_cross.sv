// tb_wt_zero_cross: checks the upward zero-crossing pulse against a
// reference computed from the previous and present sample, on a directed
// sequence (0, 2, ..., 7, 0, 2) and on random samples.
module tb_wt_zero_cross;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] x = '0;
  logic zc;
  int checks = 0, failures = 0;
  logic signed [15:0] prev;

  wt_zero_cross dut (.clk, .rst_n, .x, .zc_pulse(zc));
  always #5 clk = ~clk;

  task automatic check(input logic exp, input string what);
    checks++;
    if (zc !== exp) begin
      failures++;
      $display("FAIL %s: x=%0d prev=%0d zc=%0b exp=%0b", what, x, prev, zc, exp);
    end
  endtask

  initial begin
    automatic logic signed [15:0] seq [] = '{0, 2, 13, 36, -5, -1, 0, 0, 7, 0, 2, 3};
    automatic logic               expz [] = '{0, 1, 0, 0, 0, 0, 0, 0, 1, 0, 1, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    prev = 0;
    foreach (seq[i]) begin
      @(negedge clk) x = seq[i];
      #1 check(expz[i], "directed");
      @(posedge clk) prev = x;
    end
    repeat (2000) begin
      @(negedge clk) x = 16'($urandom_range(0, 7) == 0 ? 0 : $urandom_range(0, 65535));
      #1 check((prev <= 0) && (x > 0), "random");
      @(posedge clk) prev = x;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
