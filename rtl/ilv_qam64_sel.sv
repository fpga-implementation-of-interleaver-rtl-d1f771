// ilv_qam64_sel: select for the three 64-QAM increments.
//
// A mod-3 counter, as the interleaver's address generator specifies for the
// 64-QAM increment mux: q counts 0,1,2,0,... on every clock edge on which the
// accumulator adds an increment (step = 1). When the preset logic starts a
// new iteration (load = 1), q takes that iteration's starting phase; the
// reload is this design's addition, because the three row classes (row index
// mod 3) start the +2,-1,-1 pattern at different points. clr (synchronous)
// clears q. q = 0 selects rows+2 (20 for 802.11a/g), q = 1 and 2 select rows-1 (17).
module ilv_qam64_sel (
  input  logic       clk,
  input  logic       clr,
  input  logic       load,
  input  logic [1:0] load_phase,
  input  logic       step,
  output logic [1:0] q
);
  always_ff @(posedge clk) begin
    if (clr)       q <= 2'd0;
    else if (load) q <= load_phase;
    else if (step) q <= (q == 2'd2) ? 2'd0 : q + 2'd1;
  end
endmodule
