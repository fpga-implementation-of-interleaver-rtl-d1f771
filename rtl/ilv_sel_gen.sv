// ilv_sel_gen: bank select of the ping-pong interleaver memory.
//
// A T flip-flop cleared to 0 by clr (synchronous). It toggles on the clock
// edge that ends a block (block_end = terminal count of the read counter), so
// that the RAM just written is read during the next block and vice versa.
// With sel = 0 RAM-1 is read and RAM-2 written.
module ilv_sel_gen (
  input  logic clk,
  input  logic clr,
  input  logic block_end,
  output logic sel
);
  always_ff @(posedge clk) begin
    if (clr)            sel <= 1'b0;
    else if (block_end) sel <= ~sel;
  end
endmodule
