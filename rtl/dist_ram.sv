// dist_ram: one DEPTH x 1 distributed (LUT) RAM.
//
// Synchronous write on the rising clock edge when we = 1, asynchronous
// (combinational) read of the addressed bit, as LUT RAM in an FPGA behaves.
// The interleaver memory builds a 288 x 1 RAM from four 64 x 1 and one
// 32 x 1 of these. Contents are not initialised.
module dist_ram #(
  parameter int unsigned DEPTH = 64,
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
  end

  assign q = mem[a];
endmodule
