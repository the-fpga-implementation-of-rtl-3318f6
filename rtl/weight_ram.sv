// weight_ram: single-port RAM that holds the weights of one neuron.
//
// One address port serves a write (we = 1, used to load the weights trained
// offline) or a read. The read is registered: q shows the word at addr one
// cycle later. On a write, q shows the old contents (read-first). Contents
// are not reset; they must be written before the neuron is used.
//
// A single-port weight store follows the document. The read latency and the
// read-first behaviour are this design's choices.
module weight_ram #(
  parameter int DEPTH = 8,
  parameter int WIDTH = wnn_pkg::NN_W,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr,
  input  logic             we,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    q <= mem[addr];
  end
endmodule
