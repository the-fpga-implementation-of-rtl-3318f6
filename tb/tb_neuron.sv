// tb_neuron: single neuron, y = tanh(sum w[i]*x[i]), all values scaled by 2^18.
//  1. The 8-input example: weights (1, 0, 1, 2, 0, 0, 0, 1), inputs
//     (0, 1, 1, 0, 0, 0, 0, 0). The weighted sum must be 1.0 (262144) and the
//     output exactly 199648 (tanh(1) * 2^18), 14 cycles after start.
//  2. Random weights and inputs: the buffered sum must equal
//     floor(sum(w*x) / 2^18), saturated to 22 bits. The output must be
//     within 2 LSB of tanh(sum) (one's complement form for negative sums).
//  3. Back-to-back starts (a start in the cycle busy falls), a start while
//     busy (ignored), a start together with a weight write (ignored), and
//     sums that saturate.
module tb_neuron;
  localparam int N_IN = 8;
  localparam int LAT  = 14;
  logic clk = 0, rst_n = 0;
  logic signed [21:0] x [N_IN];
  logic start = 0, w_we = 0;
  logic [2:0] w_addr = '0;
  logic signed [21:0] w_data = '0;
  logic busy;
  logic signed [21:0] sum;
  logic signed [19:0] y;
  logic y_valid;
  int checks = 0, failures = 0;
  int cyc = 0;

  neuron dut (.clk, .rst_n, .x, .start, .w_we, .w_addr, .w_data, .busy, .sum, .y, .y_valid);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  longint w_model [N_IN];
  longint exp_sum_q [$];
  int     exp_t_q [$];
  int     n_sat = 0, n_neg = 0, n_b2b = 0, n_ign = 0;

  function automatic longint ref_sum();
    longint s;
    s = 0;
    for (int i = 0; i < N_IN; i++) s += longint'(x[i]) * w_model[i];
    s = s >>> 18;
    if (s > 2097151) begin s = 2097151; n_sat++; end
    if (s < -2097152) begin s = -2097152; n_sat++; end
    return s;
  endfunction

  always @(posedge clk) if (rst_n) begin
    #1;
    if (y_valid) begin
      checks++;
      if (exp_sum_q.size() == 0) begin
        failures++; $display("FAIL unexpected output at %0d", cyc);
      end else begin
        real e, s;
        s = real'(exp_sum_q[0]) / 262144.0;
        if (exp_sum_q[0] < 0) begin e = -$tanh(-s - 1.0 / 262144.0) * 262144.0 - 1.0; n_neg++; end
        else e = $tanh(s) * 262144.0;
        if (longint'(sum) != exp_sum_q[0] || cyc != exp_t_q[0] ||
            real'(y) - e > 2.0 || e - real'(y) > 2.0) begin
          failures++;
          $display("FAIL at %0d: sum=%0d y=%0d, exp sum %0d y %f at %0d",
                   cyc, sum, y, exp_sum_q[0], e, exp_t_q[0]);
        end
        void'(exp_sum_q.pop_front()); void'(exp_t_q.pop_front());
      end
    end
  end

  task automatic write_weights(input longint w [N_IN]);
    for (int i = 0; i < N_IN; i++) begin
      @(negedge clk); w_we = 1; w_addr = 3'(i); w_data = 22'(w[i]); w_model[i] = w[i];
    end
    @(negedge clk); w_we = 0;
  endtask

  // Start at this negedge; inputs held for the 8 busy cycles.
  task automatic run(input bit expect_it);
    start = 1;
    if (expect_it) begin exp_sum_q.push_back(ref_sum()); exp_t_q.push_back(cyc + LAT); end
    @(negedge clk); start = 0;
    repeat (N_IN - 1) @(negedge clk);
  endtask

  initial begin
    longint w [N_IN];
    for (int i = 0; i < N_IN; i++) x[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // 1. example
    w = '{262144, 0, 262144, 524288, 0, 0, 0, 262144};
    write_weights(w);
    x = '{0, 262144, 262144, 0, 0, 0, 0, 0};
    @(negedge clk);
    run(1);
    repeat (LAT) @(negedge clk);
    checks++;
    if (y != 20'sd199648 || sum != 22'sd262144) begin
      failures++; $display("FAIL example: sum=%0d y=%0d", sum, y);
    end

    // 2/3. random, back to back
    for (int r = 0; r < 300; r++) begin
      if (r % 20 == 0) begin
        for (int i = 0; i < N_IN; i++)
          w[i] = (r % 60 == 40) ? longint'($signed(22'($urandom))) : longint'($urandom_range(0, 1048576)) - 524288;
        write_weights(w);
      end
      for (int i = 0; i < N_IN; i++)
        x[i] = (r % 60 == 40) ? 22'($urandom) : 22'($urandom_range(0, 1048576) - 524288);
      run(1);
      // now in the last term: inputs still needed, busy high
      checks++;
      if (!busy) begin failures++; $display("FAIL busy should be high in last term"); end
      // back to back: the next start in the first cycle with busy low
      @(negedge clk);
      if (r % 3 == 0) begin
        checks++;
        if (busy) begin failures++; $display("FAIL busy should be low after last term"); end
        n_b2b++;
        continue;
      end
      @(negedge clk);
      if (r % 7 == 2) begin       // a start with a weight write is ignored
        w_we = 1; w_addr = 3'($urandom); w_data = 22'(w_model[w_addr]); start = 1;
        @(negedge clk); w_we = 0; start = 0; n_ign++;
      end
    end
    // start while busy: ignored
    @(negedge clk);
    start = 1;
    exp_sum_q.push_back(ref_sum()); exp_t_q.push_back(cyc + LAT);
    @(negedge clk); start = 0;
    @(negedge clk); start = 1; n_ign++;   // second term of the run, busy
    checks++;
    if (!busy) begin failures++; $display("FAIL busy low during a run"); end
    @(negedge clk); start = 0;
    // the run is already underway; only one result expected
    repeat (LAT + 12) @(negedge clk);
    checks++;
    if (exp_sum_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_sum_q.size()); end
    checks++;
    if (n_sat == 0 || n_neg == 0 || n_b2b == 0 || n_ign == 0) begin
      failures++; $display("FAIL coverage sat=%0d neg=%0d b2b=%0d ign=%0d", n_sat, n_neg, n_b2b, n_ign);
    end
    $display("coverage: saturated=%0d negative=%0d back_to_back=%0d ignored_starts=%0d", n_sat, n_neg, n_b2b, n_ign);
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
