// tb_wt_data_proc: checks the framing of a window with its two-sample
// symmetric extension. A window x0..x[N-1] must come out as
// x1, x0, x0, x1, ..., x[N-1] with x1 two cycles after the pulse, dfirst on x1,
// dvalid on exactly N+2 samples. A pulse while busy is ignored, and a pulse
// in the last cycle of a window starts the next window seamlessly.
module tb_wt_data_proc;
  localparam int N = 12;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] x = '0;
  logic zc = 0;
  logic signed [15:0] dout;
  logic dvalid, dfirst, busy;
  int checks = 0, failures = 0;
  int cyc = 0;

  wt_data_proc #(.N(N)) dut (.clk, .rst_n, .x, .zc_pulse(zc), .dout, .dvalid, .dfirst, .busy);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // Expected output log: filled when a window is started.
  logic signed [15:0] exp_q [$];
  int                 exp_t [$];
  logic               exp_f [$];

  task automatic expect_window(input logic signed [15:0] w [], input int t0);
    exp_q.push_back(w[1]); exp_t.push_back(t0 + 2); exp_f.push_back(1);
    exp_q.push_back(w[0]); exp_t.push_back(t0 + 3); exp_f.push_back(0);
    for (int k = 0; k < N; k++) begin
      exp_q.push_back(w[k]); exp_t.push_back(t0 + 4 + k); exp_f.push_back(0);
    end
  endtask

  // Output monitor
  always @(posedge clk) if (rst_n) begin
    #1;
    if (dvalid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected sample %0d at %0d", dout, cyc);
      end else begin
        if (dout !== exp_q[0] || cyc != exp_t[0] || dfirst !== exp_f[0]) begin
          failures++;
          $display("FAIL got %0d first=%0b at %0d, exp %0d first=%0b at %0d",
                   dout, dfirst, cyc, exp_q[0], exp_f[0], exp_t[0]);
        end
        void'(exp_q.pop_front()); void'(exp_t.pop_front()); void'(exp_f.pop_front());
      end
    end
  end

  int ignored = 0;

  task automatic run_window(input logic signed [15:0] w [], input int extra_pulse_at);
    // drive x0 with the pulse, then the remaining samples
    int t0;
    @(negedge clk);
    t0 = cyc;
    x = w[0]; zc = 1;
    expect_window(w, t0);
    for (int k = 1; k < N + 4; k++) begin
      @(negedge clk);
      x = (k < N) ? w[k] : 16'($urandom);
      zc = (k == extra_pulse_at);
      if (zc) begin
        checks++;
        if (!busy) begin failures++; $display("FAIL busy low during window"); end
        ignored++;
      end
    end
    zc = 0;
  endtask

  initial begin
    logic signed [15:0] w [];
    w = new[N];
    repeat (3) @(posedge clk);
    rst_n = 1;
    // document example window
    w = '{2, 13, 36, 1464, 6682, 9294, 8562, 4685, 95, 23, 7, 0};
    run_window(w, 5);           // extra pulse in the middle: ignored
    repeat (6) @(negedge clk);
    for (int r = 0; r < 20; r++) begin
      foreach (w[k]) w[k] = 16'($urandom);
      run_window(w, (r % 2 == 1) ? 7 : -1);
      repeat (r % 3 + 3) @(negedge clk);
    end
    // back-to-back: second pulse in the cycle of the last emitted sample
    foreach (w[k]) w[k] = 16'($urandom);
    begin
      int t0;
      logic signed [15:0] w2 [];
      w2 = new[N];
      foreach (w2[k]) w2[k] = 16'($urandom);
      @(negedge clk); t0 = cyc; x = w[0]; zc = 1; expect_window(w, t0);
      for (int k = 1; k < N + 2; k++) begin @(negedge clk); zc = 0; x = (k < N) ? w[k] : 16'($urandom); end
      @(negedge clk); t0 = cyc; x = w2[0]; zc = 1; expect_window(w2, t0);
      for (int k = 1; k < N + 6; k++) begin @(negedge clk); zc = 0; x = (k < N) ? w2[k] : 16'($urandom); end
    end
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d samples missing", exp_q.size()); end
    checks++;
    if (ignored == 0) failures++;
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
