// tanh_coef_rom: coefficient table of the piecewise-linear tanh.
//
// The range [0, DEPTH * 2^-SEG_LOG2) of |x| is cut into DEPTH equal
// segments. With the defaults this is [0, 8) in 1024 segments of width
// 1/128. On segment k = [u, u+h), tanh is replaced by its least-squares line
// a0 + a1*x. The line minimises the integral of (tanh(x) - a0 - a1*x)^2
// over the segment:
//   b1 = 12/h^3 * integral_0^h (t - h/2) tanh(u+t) dt
//   b0 = 1/h * integral_0^h tanh(u+t) dt - b1*h/2
//   a1 = b1,   a0 = b0 - b1*u
// The integrals use Simpson's rule with 16 intervals. The offset a0 is
// stored as round(a0 * 2^FRAC). The slope a1 (at most 1) is stored as
// round(a1 * 2^SLOPE_FRAC). Its extra fraction bits keep the error of
// a1*x small up to x = 8. TABLE selects the slope table a1 (ROM A)
// or the offset table a0 (ROM B). The table is computed when the design is
// elaborated, so no data file is needed.
//
// Read: one registered read per cycle (q is valid the cycle after addr).
//
// The segmenting, the least-squares line and the two ROMs follow the
// document. The segment count comes from the 10-bit address of a 22-bit
// input. The integration rule, the rounding and the slope scaling are this
// design's choices.
module tanh_coef_rom #(
  parameter wnn_pkg::tanh_table_e TABLE = wnn_pkg::TANH_SLOPE,
  parameter int ADDR_W   = wnn_pkg::TANH_ADDR_W,
  parameter int WIDTH    = wnn_pkg::TANH_ROM_W,
  parameter int SEG_LOG2 = 7,                 // segment width 2^-SEG_LOG2
  parameter int FRAC     = wnn_pkg::FRAC,
  parameter int SLOPE_FRAC = wnn_pkg::TANH_SLOPE_FRAC
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [WIDTH-1:0]  q
);
  localparam int DEPTH = 1 << ADDR_W;
  typedef logic [WIDTH-1:0] rom_t [DEPTH];

  function automatic rom_t gen_table();
    rom_t r;
    real  h, u, t, f, m0, m1, w, b0, b1, v;
    int   nint;
    nint = 16;
    h = 1.0 / real'(1 << SEG_LOG2);
    for (int k = 0; k < DEPTH; k++) begin
      u  = real'(k) * h;
      m0 = 0.0;
      m1 = 0.0;
      for (int i = 0; i <= nint; i++) begin
        t = real'(i) * h / real'(nint);
        f = $tanh(u + t);
        if (i == 0 || i == nint) w = 1.0;
        else if (i % 2 == 1)     w = 4.0;
        else                     w = 2.0;
        m0 += w * f;
        m1 += w * (t - h / 2.0) * f;
      end
      m0 = m0 * h / (3.0 * real'(nint));
      m1 = m1 * h / (3.0 * real'(nint));
      b1 = 12.0 * m1 / (h * h * h);
      b0 = m0 / h - b1 * h / 2.0;
      if (TABLE == wnn_pkg::TANH_SLOPE) v = b1 * real'(1 << SLOPE_FRAC);
      else                              v = (b0 - b1 * u) * real'(1 << FRAC);
      r[k] = WIDTH'($rtoi(v + 0.5));
    end
    return r;
  endfunction

  localparam rom_t ROM = gen_table();

  always_ff @(posedge clk) q <= ROM[addr];
endmodule
