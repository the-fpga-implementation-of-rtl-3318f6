// tb_neuron_ctrl: after a start the control unit must count idx 0..7 in
// the following 8 cycles, with first on idx 0 and last on idx 7 (the
// comparator with 7), then stop. Starts while busy and starts under hold
// are ignored; a start in the cycle after the count restarts it.
module tb_neuron_ctrl;
  logic clk = 0, rst_n = 0;
  logic start = 0, hold = 0;
  logic [2:0] idx;
  logic active, first, last, busy;
  int checks = 0, failures = 0;

  neuron_ctrl dut (.clk, .rst_n, .start, .hold, .idx, .active, .first, .last, .busy);
  always #5 clk = ~clk;

  // reference model
  int ref_cnt = -1;     // -1 idle, else current idx
  always @(posedge clk) if (rst_n) begin
    if (ref_cnt < 0) begin
      if (start && !hold) ref_cnt <= 0;
    end else if (ref_cnt == 7) ref_cnt <= -1;
    else ref_cnt <= ref_cnt + 1;
  end

  int runs = 0, ignored = 0;
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (active !== (ref_cnt >= 0) || busy !== (ref_cnt >= 0) ||
        (ref_cnt >= 0 && (idx != 3'(ref_cnt) || first !== (ref_cnt == 0) || last !== (ref_cnt == 7))) ||
        (ref_cnt < 0 && (first || last))) begin
      failures++;
      $display("FAIL ref=%0d idx=%0d act=%0b first=%0b last=%0b", ref_cnt, idx, active, first, last);
    end
    if (last) runs++;
    if (start && (busy || hold)) ignored++;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    repeat (3) @(negedge clk);
    start = 1;                    // while busy: ignored
    @(negedge clk) start = 0;
    repeat (6) @(negedge clk);
    start = 1; hold = 1;          // under hold: ignored
    @(negedge clk) start = 0; hold = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      #1 start = ($urandom_range(0, 3) == 0); hold = ($urandom_range(0, 5) == 0);
    end
    @(negedge clk) start = 0; hold = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (runs < 100 || ignored == 0) begin failures++; $display("FAIL runs=%0d ignored=%0d", runs, ignored); end
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
