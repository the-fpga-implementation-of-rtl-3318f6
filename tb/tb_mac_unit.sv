// tb_mac_unit: random operands (including the extremes) with random enable
// and reload, compared with a 64-bit reference accumulator; plus the
// product 2^18 * 2^18 = 2^36 (68719476736).
module tb_mac_unit;
  logic clk = 0, rst_n = 0;
  logic signed [21:0] a = '0, b = '0;
  logic en = 0, sload = 0;
  logic signed [47:0] acc;
  int checks = 0, failures = 0;
  longint model;

  mac_unit dut (.clk, .rst_n, .a, .b, .en, .sload, .acc);
  always #5 clk = ~clk;

  function automatic logic signed [21:0] pick();
    case ($urandom_range(0, 5))
      0: return 22'sh1fffff;
      1: return -22'sh200000;
      default: return 22'($urandom);
    endcase
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    model = 0;
    @(negedge clk) begin a = 22'sd262144; b = 22'sd262144; en = 1; sload = 1; end
    @(posedge clk) #1 checks++;
    if (acc != 48'sd68719476736) begin failures++; $display("FAIL 2^36: %0d", acc); end
    model = 68719476736;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      a = pick(); b = pick();
      en = $urandom_range(0, 4) != 0;
      sload = (i % 8 == 0) || ($urandom_range(0, 9) == 0);
      @(posedge clk); #1;
      if (en) model = sload ? longint'(a) * longint'(b) : model + longint'(a) * longint'(b);
      model = longint'(48'(model));
      if (model[47]) model = model | 64'hffff_0000_0000_0000;
      checks++;
      if (longint'(acc) != model) begin failures++; $display("FAIL i=%0d acc=%0d exp %0d", i, acc, model); end
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
