// dea_ram: single-port RAM used for the population memory (PMem, NP*D
// words) and the fitness memory (FXMem, NP words).
//
// Ports follow the generic memory block of the source design: data in (x),
// data out (y), address and write enable. The source gives only the sizes;
// the timing is this design's choice and matches an FPGA block RAM: the
// write happens at the rising edge when we = 1, and y is the word at the
// address presented in the previous cycle (one cycle read latency, read of
// the old data on a simultaneous write). Contents are not reset.
module dea_ram #(
  parameter int unsigned WORDS = 4096,
  parameter int unsigned WIDTH = 64,
  localparam int unsigned AW   = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] x,
  output logic [WIDTH-1:0] y
);
  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= x;
    y <= mem[addr];
  end
endmodule
