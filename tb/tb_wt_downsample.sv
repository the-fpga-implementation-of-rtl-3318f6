// tb_wt_downsample: feeds windows of N+2 numbered samples (with gaps and
// random data between windows) and checks that exactly positions
// 3, 5, ..., N+1 are kept, one cycle later, held in between, with dout_last
// on the last one.
module tb_wt_downsample;
  localparam int N = 12;
  logic clk = 0, rst_n = 0;
  logic signed [31:0] din = '0;
  logic v = 0, f = 0;
  logic signed [31:0] dout;
  logic ov, ol;
  int checks = 0, failures = 0;

  wt_downsample #(.N(N)) dut (.clk, .rst_n, .din, .din_valid(v), .din_first(f),
                              .dout, .dout_valid(ov), .dout_last(ol));
  always #5 clk = ~clk;

  logic signed [31:0] held = 0;
  logic               exp_v = 0, exp_l = 0;
  int                 kept = 0;

  task automatic step(input logic signed [31:0] d, input logic vv, input logic ff,
                      input logic keep, input logic lst);
    @(negedge clk);
    // outputs now reflect the previous step
    checks++;
    if (ov !== exp_v || ol !== exp_l || dout !== held) begin
      failures++;
      $display("FAIL dout=%0d v=%0b l=%0b exp %0d %0b %0b", dout, ov, ol, held, exp_v, exp_l);
    end
    din = d; v = vv; f = ff;
    exp_v = keep; exp_l = keep && lst;
    if (keep) begin held = d; kept++; end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 30; w++) begin
      int gap;
      gap = $urandom_range(0, 4);
      for (int g = 0; g < gap; g++) step(32'($urandom), 1'b0, 1'b0, 1'b0, 1'b0);
      for (int p = 0; p <= N + 1; p++)
        step(32'(w * 100 + p), 1'b1, p == 0, (p % 2 == 1) && p >= 3, p == N + 1);
    end
    step(0, 0, 0, 0, 0);
    step(0, 0, 0, 0, 0);
    checks++;
    if (kept != 30 * (N / 2)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
