// tb_wt_fir4: checks both wavelet filters (G and H coefficient sets) on
// random and full-scale samples. The reference is a convolution over a
// sample history kept in the testbench, one cycle of latency expected.
module tb_wt_fir4;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] din = '0;
  logic v = 0, f = 0;
  logic signed [31:0] yg, yh;
  logic vg, fg, vh, fh;
  int checks = 0, failures = 0;

  // Reference coefficients: DB2 decomposition filters x16, rounded,
  // newest sample first.
  int G [4] = '{-8, 13, -4, -2};
  int H [4] = '{-2, 4, 13, 8};

  wt_fir4 #(.C(wnn_pkg::WT_G)) dut_g (.clk, .rst_n, .din, .din_valid(v), .din_first(f),
                                      .dout(yg), .dout_valid(vg), .dout_first(fg));
  wt_fir4 #(.C(wnn_pkg::WT_H)) dut_h (.clk, .rst_n, .din, .din_valid(v), .din_first(f),
                                      .dout(yh), .dout_valid(vh), .dout_first(fh));
  always #5 clk = ~clk;

  longint hist [4];   // hist[0] = sample applied in the previous cycle
  logic   pv, pf;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    hist = '{0, 0, 0, 0};
    pv = 0; pf = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // check the output produced for the sample of the previous cycle
      if (i > 0) begin
        longint eg, eh;
        eg = 0; eh = 0;
        for (int k = 0; k < 4; k++) begin eg += G[k] * hist[k]; eh += H[k] * hist[k]; end
        checks += 2;
        if (longint'(yg) != eg || vg !== pv || fg !== pf) begin
          failures++; $display("FAIL G i=%0d got %0d exp %0d", i, yg, eg);
        end
        if (longint'(yh) != eh || vh !== pv || fh !== pf) begin
          failures++; $display("FAIL H i=%0d got %0d exp %0d", i, yh, eh);
        end
      end
      case (i % 5)
        0: din = 16'sh7fff;
        1: din = -16'sh8000;
        default: din = 16'($urandom);
      endcase
      if (i > 2000) din = 16'($urandom);
      v = ($urandom_range(0, 3) != 0);
      f = ($urandom_range(0, 9) == 0);
      for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = din;
      pv = v; pf = f;
    end
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
