// wlan_preset_logic: preset FSM of the 802.11a/g write-address generator.
//
// The write address is produced by an accumulator that adds a per-mode
// increment every cycle. That only works within one iteration (16 addresses,
// one per column of the block); at the end of an iteration the accumulator
// must instead be loaded with the first address of the next one. This FSM
// decides when and with what, following the hierarchical state diagram
// of the original design:
//   SF   (LVL_F)   entered by clr; accumulator is 0 (first address).
//   SMTx (LVL_RUN) chosen from mod_typ on the cycle after SF; the increment
//                  is added.
//   Sppp (LVL_PRE) entered when the accumulator holds the terminal value of an
//                  iteration (45, 46, 47 for BPSK); in that same cycle load = 1
//                  and preset is the next iteration's first address, which the
//                  accumulator takes on the clock edge.
// The terminal cycle is found with a 4-bit column counter (cleared by clr,
// wrapping every 16 cycles); which iteration ends, and so the preset, is read
// from the accumulator value: see ilv_pkg::preset_next_iter. After the last
// iteration the preset is 0 and the block repeats (the original state diagram
// labels the BPSK state after 47 with preset 3; the permutation formulas and
// the published address tables need 0, which is used here). The FSM also
// gives the
// phases the 16-QAM T flip-flop and the 64-QAM mod-3 counter must take at the
// start of the next iteration (this design's addition, see ilv_qam16_sel).
// load is combinational from the state, the column count and acc; everything
// else is registered. clr is synchronous and can be applied at any time;
// mod_typ is captured when SF is left and must then stay constant until the
// next clr.
module wlan_preset_logic
  import ilv_pkg::*;
(
  input  logic          clk,
  input  logic          clr,
  input  logic [1:0]    mod_typ,
  input  logic [8:0]    acc,
  output logic          load,
  output logic [8:0]    preset,
  output logic          q16_phase,
  output logic [1:0]    q64_phase,
  output preset_state_t state
);
  logic [3:0] col;
  logic [1:0] mode;
  logic [5:0] n;

  assign mode      = (state.lvl == LVL_F) ? mod_typ : state.mode;
  assign load      = (state.lvl != LVL_F) && (col == 4'(D_COLS - 1));
  assign n         = preset_next_iter({1'b0, acc}, {1'b0, wlan_ncbps(mode)}, wlan_rows(mode),
                                      wlan_class(mode));
  assign preset    = 9'(n);
  assign q16_phase = n[0];
  assign q64_phase = qam64_phase(n);

  always_ff @(posedge clk) begin
    if (clr) begin
      state <= '{lvl: LVL_F, mode: 2'd0, id: 3'd0, idx: 6'd0};
      col   <= 4'd0;
    end else begin
      col <= col + 4'd1;
      if (state.lvl == LVL_F) begin
        state <= '{lvl: LVL_RUN, mode: mod_typ, id: 3'd0, idx: 6'd0};
      end else if (load) begin
        state.lvl <= LVL_PRE;
        state.idx <= n;
      end else begin
        state.lvl <= LVL_RUN;
      end
    end
  end
endmodule
