// wimax_preset_logic: preset FSM of the 802.16e write-address generator.
//
// Same job as the 802.11a/g preset logic, for the 16 mode/depth combinations
// of 802.16e: reload the accumulator with the first address of the next
// iteration when the current one (16 addresses) ends. The FSM is hierarchical
// as in the original design: SF -> SMTx (by mod_type: QPSK, 16-QAM, 64-QAM) -> SIDy (by ID,
// the interleaver depth) -> preset states. In this design the SMTx and SIDy
// choices are made together on the clock edge that leaves SF (state.lvl
// LVL_RUN, state.mode and state.id then identify SMTx.SIDy), so no address
// cycle is spent on the intermediate level; that is this design's choice.
// While running, a 4-bit column counter marks the terminal cycle of each
// iteration (e.g. accumulator = 90 for QPSK, depth 96, first iteration); in
// that cycle load = 1 and preset is the next iteration's first address, taken
// from the accumulator value (ilv_pkg::preset_next_iter). q16_phase and
// q64_phase give the starting phases of the QAM16_SEL and QAM64_SEL
// selects for that iteration (this design's addition). clr is synchronous
// and may come at any time; mod_type and id are captured when SF is left and
// must stay constant until the next clr.
module wimax_preset_logic
  import ilv_pkg::*;
(
  input  logic          clk,
  input  logic          clr,
  input  logic [1:0]    mod_type,
  input  logic [2:0]    id,
  input  logic [9:0]    acc,
  output logic          load,
  output logic [9:0]    preset,
  output logic          q16_phase,
  output logic [1:0]    q64_phase,
  output preset_state_t state
);
  logic [3:0] col;
  logic [1:0] mode;
  logic [2:0] dep;
  logic [5:0] n;

  assign mode      = (state.lvl == LVL_F) ? mod_type : state.mode;
  assign dep       = (state.lvl == LVL_F) ? id       : state.id;
  assign load      = (state.lvl != LVL_F) && (col == 4'(D_COLS - 1));
  assign n         = preset_next_iter(acc, wimax_ncbps(mode, dep), wimax_rows(mode, dep),
                                      wimax_class(mode));
  assign preset    = 10'(n);
  assign q16_phase = n[0];
  assign q64_phase = qam64_phase(n);

  always_ff @(posedge clk) begin
    if (clr) begin
      state <= '{lvl: LVL_F, mode: 2'd0, id: 3'd0, idx: 6'd0};
      col   <= 4'd0;
    end else begin
      col <= col + 4'd1;
      if (state.lvl == LVL_F) begin
        state <= '{lvl: LVL_RUN, mode: mod_type, id: id, idx: 6'd0};
      end else if (load) begin
        state.lvl <= LVL_PRE;
        state.idx <= n;
      end else begin
        state.lvl <= LVL_RUN;
      end
    end
  end
endmodule
