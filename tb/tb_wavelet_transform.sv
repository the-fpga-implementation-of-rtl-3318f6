// tb_wavelet_transform: end-to-end test of the one-level DB2 decomposition.
//  1. The 12-sample current window (2, 13, 36, 1464, 6682, 9294, 8562, 4865,
//     95, 23, 7, 0) must give exactly
//        cH = (-112, -11300, 6586, 21846, -35533, -191)
//        cL = ( 112,  -2599, 27460, 198796, 132075, 1087)
//     with the extended stream starting 13, 2, 2, 13, 36.
//  2. The same window with 4685 as eighth sample, and random windows, are
//     compared with a convolution model of the extended window.
//  3. The window repeated without gaps (period 12): every second window is
//     processed, the one in between is ignored while busy.
// Latency: first coefficient pair 7 cycles after the window's first sample,
// then one pair every 2 cycles.
module tb_wavelet_transform;
  localparam int N = 12;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] x = '0;
  logic signed [15:0] ext;
  logic signed [31:0] ch, cl;
  logic cv, clast, busy;
  int checks = 0, failures = 0;
  int cyc = 0;

  wavelet_transform #(.N(N)) dut (.clk, .rst_n, .x, .ext_sample(ext), .ch, .cl,
                                  .coef_valid(cv), .coef_last(clast), .busy);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  int G [4] = '{-8, 13, -4, -2};
  int H [4] = '{-2, 4, 13, 8};

  // expected coefficient queue
  longint eh_q [$], el_q [$];
  int     et_q [$];
  int     windows = 0;

  task automatic expect_window(input int w [], input int t0);
    int s [];
    s = new[N + 2];
    s[0] = w[1]; s[1] = w[0];
    for (int k = 0; k < N; k++) s[k + 2] = w[k];
    for (int n = 3; n <= N + 1; n += 2) begin
      longint a, b;
      a = 0; b = 0;
      for (int k = 0; k < 4; k++) begin a += G[k] * s[n - k]; b += H[k] * s[n - k]; end
      eh_q.push_back(a); el_q.push_back(b); et_q.push_back(t0 + 4 + n);
    end
    windows++;
  endtask

  always @(posedge clk) if (rst_n) begin
    #1;
    if (cv) begin
      checks++;
      if (eh_q.size() == 0) begin
        failures++; $display("FAIL unexpected coefficient at %0d", cyc);
      end else begin
        if (longint'(ch) != eh_q[0] || longint'(cl) != el_q[0] || cyc != et_q[0] ||
            clast !== (eh_q.size() == 1 || et_q[1] != et_q[0] + 2)) begin
          failures++;
          $display("FAIL at %0d: ch=%0d cl=%0d last=%0b, exp %0d %0d at %0d",
                   cyc, ch, cl, clast, eh_q[0], el_q[0], et_q[0]);
        end
        void'(eh_q.pop_front()); void'(el_q.pop_front()); void'(et_q.pop_front());
      end
    end
  end

  // Drive one window preceded by a zero; returns the start cycle.
  int last_t0;
  task automatic drive_window(input int w [], input bit expect_it, input bit known = 0);
    int t0;
    @(negedge clk); x = 0;
    @(negedge clk); t0 = cyc; x = 16'(w[0]);
    last_t0 = t0;
    if (expect_it) expect_window(w, t0);
    if (known) check_known();
    for (int k = 1; k < N; k++) begin @(negedge clk); x = 16'(w[k]); end
  endtask

  task automatic idle(input int n);
    repeat (n) begin @(negedge clk); x = -16'($urandom_range(0, 3000)); end
  endtask

  longint known_h [6] = '{-112, -11300, 6586, 21846, -35533, -191};
  longint known_l [6] = '{112, -2599, 27460, 198796, 132075, 1087};
  task automatic check_known();
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (eh_q[eh_q.size() - 6 + i] != known_h[i] || el_q[el_q.size() - 6 + i] != known_l[i]) begin
        failures++; $display("FAIL reference model differs from known values at %0d", i);
      end
    end
  endtask

  // extended stream log
  logic signed [15:0] ext_log [int];
  always @(posedge clk) begin #1; ext_log[cyc] = ext; end

  initial begin
    int w [];
    w = new[N];
    repeat (3) @(posedge clk);
    rst_n = 1;
    idle(3);

    // 1. known example: check the model itself against the known numbers
    w = '{2, 13, 36, 1464, 6682, 9294, 8562, 4865, 95, 23, 7, 0};
    drive_window(w, 1, 1);
    idle(8);
    begin
      int exp_ext [5] = '{13, 2, 2, 13, 36};
      for (int i = 0; i < 5; i++) begin
        checks++;
        if (ext_log[last_t0 + 2 + i] != 16'(exp_ext[i])) begin
          failures++; $display("FAIL ext[%0d]=%0d", i, ext_log[last_t0 + 2 + i]);
        end
      end
    end

    // 2. the window as listed with 4685, then random windows
    w = '{2, 13, 36, 1464, 6682, 9294, 8562, 4685, 95, 23, 7, 0};
    drive_window(w, 1);
    idle(8);
    for (int r = 0; r < 40; r++) begin
      w[0] = $urandom_range(1, 32767);
      for (int k = 1; k < N; k++) w[k] = $signed(16'($urandom));
      drive_window(w, 1);
      idle($urandom_range(3, 6));
    end

    // 3. repeating sequence without gaps: windows start every 12 samples,
    //    only every second one fits (each needs 14 cycles).
    w = '{2, 13, 36, 1464, 6682, 9294, 8562, 4865, 95, 23, 7, 0};
    @(negedge clk); x = 0;
    for (int rep = 0; rep < 6; rep++) begin
      @(negedge clk);
      x = 16'(w[0]);
      if (rep % 2 == 0) expect_window(w, cyc);
      else begin
        checks++;
        if (!busy) begin failures++; $display("FAIL busy low at ignored window"); end
      end
      for (int k = 1; k < N; k++) begin @(negedge clk); x = 16'(w[k]); end
    end
    idle(20);
    checks++;
    if (eh_q.size() != 0) begin failures++; $display("FAIL %0d coefficients missing", eh_q.size()); end
    $display("windows=%0d", windows);
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
