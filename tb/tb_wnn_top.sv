// tb_wnn_top: end-to-end test of the whole design at its default sizes
// (12-sample windows, 8-input neuron).
//
// Wavelet side: a sampled current made of the 12-sample example window, random
// windows separated by negative samples, and the example repeated without
// gaps. Every coefficient pair is compared with a convolution model of the
// extended window, with the known result for the example window
// (cH = -112, -11300, 6586, 21846, -35533, -191;
//  cL = 112, -2599, 27460, 198796, 132075, 1087) and with its timing.
// Neuron side, in parallel: weight loading, the example evaluation
// (output 199648), random evaluations against floor(sum/2^18) and $tanh.
// Each mechanism must occur at least once: window start at a zero
// crossing, crossing ignored while busy, back-to-back windows, neuron
// evaluation, bus-conversion saturation, negative excitation path, start
// blocked by a weight write, and start ignored while busy.
module tb_wnn_top;
  localparam int N = 12, N_IN = 8, LAT = 14;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] x = '0;
  logic signed [15:0] ext_sample;
  logic signed [31:0] ch, cl;
  logic coef_valid, coef_last, wt_busy;
  logic signed [21:0] nn_x [N_IN];
  logic nn_start = 0, w_we = 0;
  logic [2:0] w_addr = '0;
  logic signed [21:0] w_data = '0;
  logic nn_busy, nn_y_valid;
  logic signed [21:0] nn_sum;
  logic signed [19:0] nn_y;
  int checks = 0, failures = 0;
  int cyc = 0;

  wnn_top dut (.clk, .rst_n, .x, .ext_sample, .ch, .cl, .coef_valid, .coef_last, .wt_busy,
               .nn_x, .nn_start, .w_we, .w_addr, .w_data, .nn_busy, .nn_sum, .nn_y, .nn_y_valid);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int m_window = 0, m_ignored_zc = 0, m_b2b_window = 0, m_eval = 0, m_sat = 0,
      m_neg = 0, m_write_block = 0, m_busy_start = 0;

  // ---------------- wavelet reference ----------------
  int G [4] = '{-8, 13, -4, -2};
  int H [4] = '{-2, 4, 13, 8};
  longint eh_q [$], el_q [$];
  int     et_q [$];

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
    m_window++;
  endtask

  always @(posedge clk) if (rst_n) begin
    #1;
    if (coef_valid) begin
      checks++;
      if (eh_q.size() == 0) begin
        failures++; $display("FAIL unexpected coefficient at %0d", cyc);
      end else begin
        if (longint'(ch) != eh_q[0] || longint'(cl) != el_q[0] || cyc != et_q[0] ||
            coef_last !== (eh_q.size() == 1 || et_q[1] != et_q[0] + 2)) begin
          failures++;
          $display("FAIL wt at %0d: ch=%0d cl=%0d, exp %0d %0d at %0d", cyc, ch, cl, eh_q[0], el_q[0], et_q[0]);
        end
        void'(eh_q.pop_front()); void'(el_q.pop_front()); void'(et_q.pop_front());
      end
    end
  end

  // ---------------- neuron reference ----------------
  longint w_model [N_IN];
  longint es_q [$];
  int     ets_q [$];

  function automatic longint ref_sum();
    longint s;
    s = 0;
    for (int i = 0; i < N_IN; i++) s += longint'(nn_x[i]) * w_model[i];
    s = s >>> 18;
    if (s > 2097151) begin s = 2097151; m_sat++; end
    if (s < -2097152) begin s = -2097152; m_sat++; end
    return s;
  endfunction

  always @(posedge clk) if (rst_n) begin
    #1;
    if (nn_y_valid) begin
      checks++;
      if (es_q.size() == 0) begin
        failures++; $display("FAIL unexpected neuron output at %0d", cyc);
      end else begin
        real e, s;
        s = real'(es_q[0]) / 262144.0;
        if (es_q[0] < 0) begin e = -$tanh(-s - 1.0 / 262144.0) * 262144.0 - 1.0; m_neg++; end
        else e = $tanh(s) * 262144.0;
        if (longint'(nn_sum) != es_q[0] || cyc != ets_q[0] || real'(nn_y) - e > 2.0 || e - real'(nn_y) > 2.0) begin
          failures++;
          $display("FAIL nn at %0d: sum=%0d y=%0d, exp %0d %f at %0d", cyc, nn_sum, nn_y, es_q[0], e, ets_q[0]);
        end
        m_eval++;
        void'(es_q.pop_front()); void'(ets_q.pop_front());
      end
    end
  end

  // ---------------- wavelet stimulus ----------------
  longint ph [6] = '{-112, -11300, 6586, 21846, -35533, -191};
  longint pl [6] = '{112, -2599, 27460, 198796, 132075, 1087};

  task automatic drive_window(input int w [], input bit known = 0);
    @(negedge clk); x = 0;
    @(negedge clk); x = 16'(w[0]); expect_window(w, cyc);
    if (known)
      for (int i = 0; i < 6; i++) begin
        checks++;
        if (eh_q[eh_q.size() - 6 + i] != ph[i] || el_q[el_q.size() - 6 + i] != pl[i]) begin
          failures++; $display("FAIL model vs known result %0d", i);
        end
      end
    for (int k = 1; k < N; k++) begin @(negedge clk); x = 16'(w[k]); end
  endtask

  task automatic idle(input int n);
    repeat (n) begin @(negedge clk); x = -16'($urandom_range(0, 20000)); end
  endtask

  bit wt_done = 0, nn_done = 0;

  initial begin : wavelet_side
    int w [];
    w = new[N];
    wait (rst_n);
    idle(4);
    w = '{2, 13, 36, 1464, 6682, 9294, 8562, 4865, 95, 23, 7, 0};
    drive_window(w, 1);
    idle(5);
    for (int r = 0; r < 60; r++) begin
      w[0] = $urandom_range(1, 32767);
      for (int k = 1; k < N; k++) w[k] = $signed(16'($urandom));
      drive_window(w);
      idle($urandom_range(3, 8));
    end
    // back-to-back windows: a crossing every N+2 samples
    for (int r = 0; r < 4; r++) begin
      w[0] = $urandom_range(1, 32767);
      for (int k = 1; k < N; k++) w[k] = $signed(16'($urandom));
      @(negedge clk); x = 16'(w[0]);
      if (r > 0) begin
        checks++;
        if (!wt_busy) begin failures++; $display("FAIL window not back to back"); end
        m_b2b_window++;
      end
      expect_window(w, cyc);
      for (int k = 1; k < N; k++) begin @(negedge clk); x = 16'(w[k]); end
      repeat (2) begin @(negedge clk); x = -5; end
    end
    idle(6);
    // repeating sequence without gaps: every second crossing is ignored
    w = '{2, 13, 36, 1464, 6682, 9294, 8562, 4865, 95, 23, 7, 0};
    @(negedge clk); x = 0;
    for (int rep = 0; rep < 6; rep++) begin
      @(negedge clk); x = 16'(w[0]);
      if (rep % 2 == 0) expect_window(w, cyc);
      else begin
        checks++;
        if (!wt_busy) begin failures++; $display("FAIL busy low at ignored crossing"); end
        m_ignored_zc++;
      end
      for (int k = 1; k < N; k++) begin @(negedge clk); x = 16'(w[k]); end
    end
    idle(30);
    wt_done = 1;
  end

  // ---------------- neuron stimulus ----------------
  task automatic write_weights(input longint w [N_IN]);
    for (int i = 0; i < N_IN; i++) begin
      @(negedge clk); w_we = 1; w_addr = 3'(i); w_data = 22'(w[i]); w_model[i] = w[i];
    end
    @(negedge clk); w_we = 0;
  endtask

  task automatic run_neuron();
    nn_start = 1;
    es_q.push_back(ref_sum()); ets_q.push_back(cyc + LAT);
    @(negedge clk); nn_start = 0;
    repeat (N_IN) @(negedge clk);
  endtask

  initial begin : neuron_side
    longint w [N_IN];
    for (int i = 0; i < N_IN; i++) nn_x[i] = '0;
    wait (rst_n);
    w = '{262144, 0, 262144, 524288, 0, 0, 0, 262144};
    write_weights(w);
    nn_x = '{0, 262144, 262144, 0, 0, 0, 0, 0};
    @(negedge clk);
    run_neuron();
    repeat (LAT) @(negedge clk);
    checks++;
    if (nn_y != 20'sd199648) begin failures++; $display("FAIL example neuron output %0d", nn_y); end
    for (int r = 0; r < 200; r++) begin
      if (r % 25 == 0) begin
        for (int i = 0; i < N_IN; i++)
          w[i] = (r % 50 == 25) ? longint'($signed(22'($urandom))) : longint'($urandom_range(0, 1048576)) - 524288;
        write_weights(w);
      end
      for (int i = 0; i < N_IN; i++)
        nn_x[i] = (r % 50 == 30) ? 22'($urandom) : 22'($urandom_range(0, 1048576) - 524288);
      run_neuron();
      if (r % 10 == 3) begin            // start together with a weight write: blocked
        w_we = 1; w_addr = 3'($urandom); w_data = 22'(w_model[w_addr]); nn_start = 1;
        @(negedge clk); w_we = 0; nn_start = 0; m_write_block++;
      end
      if (r % 10 == 6) begin            // start while busy: ignored
        nn_start = 1;
        es_q.push_back(ref_sum()); ets_q.push_back(cyc + LAT);
        @(negedge clk);
        @(negedge clk);
        checks++;
        if (!nn_busy) begin failures++; $display("FAIL neuron not busy"); end
        m_busy_start++;
        @(negedge clk); nn_start = 0;
        repeat (N_IN - 2) @(negedge clk);
      end
    end
    repeat (LAT + 4) @(negedge clk);
    nn_done = 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (wt_done && nn_done);
    checks++;
    if (eh_q.size() != 0 || es_q.size() != 0) begin
      failures++; $display("FAIL outputs missing: wt %0d nn %0d", eh_q.size(), es_q.size());
    end
    $display("mechanisms: windows=%0d ignored_crossings=%0d back_to_back_windows=%0d neuron_evals=%0d saturations=%0d negative_outputs=%0d write_blocked_starts=%0d busy_ignored_starts=%0d",
             m_window, m_ignored_zc, m_b2b_window, m_eval, m_sat, m_neg, m_write_block, m_busy_start);
    if (m_window == 0)      begin failures++; $display("FAIL no window"); end
    if (m_ignored_zc == 0)  begin failures++; $display("FAIL no ignored crossing"); end
    if (m_b2b_window == 0)  begin failures++; $display("FAIL no back-to-back window"); end
    if (m_eval == 0)        begin failures++; $display("FAIL no neuron evaluation"); end
    if (m_sat == 0)         begin failures++; $display("FAIL no saturation"); end
    if (m_neg == 0)         begin failures++; $display("FAIL no negative output"); end
    if (m_write_block == 0) begin failures++; $display("FAIL no blocked start"); end
    if (m_busy_start == 0)  begin failures++; $display("FAIL no ignored start"); end
    checks += 8;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
