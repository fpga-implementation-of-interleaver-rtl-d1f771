// ilv_qam16_sel: select for the two alternating 16-QAM increments.
//
// A T flip-flop, as the interleaver's address generator specifies for the
// 16-QAM increment mux: q toggles on every clock edge on which the
// accumulator adds an increment (step = 1). When the preset logic starts a
// new iteration (load = 1), q is loaded with that iteration's starting phase
// instead; the reload is this design's addition, needed because iterations
// with odd and even row index start with different increments. clr (synchronous)
// clears q. q = 0 selects rows+1 (13 for 802.11a/g), q = 1 selects rows-1 (11).
module ilv_qam16_sel (
  input  logic clk,
  input  logic clr,
  input  logic load,
  input  logic load_phase,
  input  logic step,
  output logic q
);
  always_ff @(posedge clk) begin
    if (clr)       q <= 1'b0;
    else if (load) q <= load_phase;
    else if (step) q <= ~q;
  end
endmodule
