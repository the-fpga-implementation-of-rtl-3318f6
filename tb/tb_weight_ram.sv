// tb_weight_ram: writes all words, reads them back with one cycle of read
// latency, checks read-first behaviour on a write, and random traffic
// against a model array.
module tb_weight_ram;
  logic clk = 0;
  logic [2:0] addr = '0;
  logic we = 0;
  logic [21:0] wdata = '0, q;
  int checks = 0, failures = 0;
  logic [21:0] model [8];

  weight_ram dut (.clk, .addr, .we, .wdata, .q);
  always #5 clk = ~clk;

  initial begin
    logic [21:0] expq;
    for (int k = 0; k < 8; k++) begin
      @(negedge clk); addr = 3'(k); we = 1; wdata = 22'($urandom); model[k] = wdata;
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 8; k++) begin
      @(negedge clk); addr = 3'(k);
      @(posedge clk); #1 checks++;
      if (q !== model[k]) begin failures++; $display("FAIL read %0d: %h exp %h", k, q, model[k]); end
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      addr = 3'($urandom); we = $urandom_range(0, 2) == 0; wdata = 22'($urandom);
      expq = model[addr];                       // read-first
      @(posedge clk); #1;
      if (we) model[addr] = wdata;
      checks++;
      if (q !== expq) begin failures++; $display("FAIL i=%0d addr=%0d q=%h exp %h", i, addr, q, expq); end
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
