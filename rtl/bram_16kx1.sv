// bram_16kx1: interleaver RAM modelled as one 16K x 1 block RAM.
//
// The block-RAM alternative for the interleaver memory: a single 16K x 1
// block RAM (the 18 Kbit block's data bits in 16K x 1 organisation), of which
// the interleaver uses the lowest 288 locations. Like an FPGA block RAM it is
// fully synchronous: a write (we = 1) and a read both happen on the rising
// edge, and q shows the addressed bit one cycle after the address
// (read-before-write on the same address).
module bram_16kx1 #(
  parameter int unsigned DEPTH = 16384,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] a,
  input  logic          d,
  output logic          q
);
  logic mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[a] <= d;
    q <= mem[a];
  end
endmodule
