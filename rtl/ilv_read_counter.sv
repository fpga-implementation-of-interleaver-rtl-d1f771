// ilv_read_counter: linear read address of the block interleaver.
//
// An AW-bit up counter that runs 0 .. ncbps-1 and then starts again at 0
// (for 16-QAM in 802.11a/g: 0 .. 191). tc is high in the cycle that holds the
// terminal count ncbps-1; it marks the last address of a block. clr is
// synchronous and returns the count to 0. ncbps must stay constant between
// clears. Default width 9 bits as in the 802.11a/g address generator.
module ilv_read_counter #(
  parameter int unsigned AW = 9
) (
  input  logic          clk,
  input  logic          clr,
  input  logic [AW-1:0] ncbps,
  output logic [AW-1:0] count,
  output logic          tc
);
  assign tc = (count == ncbps - AW'(1));

  always_ff @(posedge clk) begin
    if (clr)     count <= '0;
    else if (tc) count <= '0;
    else         count <= count + AW'(1);
  end
endmodule
