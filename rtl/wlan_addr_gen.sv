// wlan_addr_gen: multimode address generator of the 802.11a/g interleaver.
//
// Produces, one per clock, the write address j_k of the interleaver
// permutation for BPSK, QPSK, 16-QAM and 64-QAM (mod_typ 00, 01, 10, 11;
// Ncbps 48, 96, 192, 288), the linear read address 0 .. Ncbps-1 and the bank
// select sel. The write address is not computed from the formula but built
// incrementally, following the original design:
//   mux-1 : 13 or 11, selected by the T flip-flop qam16_sel   (16-QAM)
//   mux-2 : 20, 17, 17, selected by the mod-3 counter qam64_sel (64-QAM)
//   mux-3 : 3 (BPSK), 6 (QPSK), mux-1, mux-2, selected by mod_typ
//   6-bit increment, zero-padded to 9 bits, added to the accumulator
// and the preset FSM reloads the accumulator at the end of every 16-address
// iteration. The read address comes from a 9-bit up counter that wraps at
// Ncbps-1, and sel toggles whenever it wraps.
//
// Timing: clr (synchronous, active high) clears everything; in the first
// cycle after clr all three outputs are 0 (address k = 0), and from then on
// write_address and read_address give k = 1, 2, ... one per cycle, both
// wrapping after Ncbps cycles, when sel toggles. mod_typ must not change
// between clears (checked by an assertion). preset_load and state expose the
// preset FSM for observation.
module wlan_addr_gen
  import ilv_pkg::*;
(
  input  logic          clk,
  input  logic          clr,
  input  logic [1:0]    mod_typ,
  output logic [8:0]    write_address,
  output logic [8:0]    read_address,
  output logic          sel,
  output logic          preset_load,
  output preset_state_t state
);
  localparam int unsigned AW = 9;  // adder, accumulator and read counter width
  localparam int unsigned IW = 6;  // increment (mux-3 output) width

  logic          q16;
  logic [1:0]    q64;
  logic [IW-1:0] mux1, mux2, mux3;
  logic [AW-1:0] acc, sum, preset;
  logic          load, q16_phase;
  logic [1:0]    q64_phase;
  logic          block_end;

  // increment multiplexers
  assign mux1 = q16 ? IW'(11) : IW'(13);
  assign mux2 = (q64 == 2'd0) ? IW'(20) : IW'(17);
  always_comb begin
    case (mod_typ)
      2'b00:   mux3 = IW'(3);
      2'b01:   mux3 = IW'(6);
      2'b10:   mux3 = mux1;
      default: mux3 = mux2;
    endcase
  end

  assign sum = acc + {{(AW - IW){1'b0}}, mux3};

  // accumulator
  always_ff @(posedge clk) begin
    if (clr)       acc <= '0;
    else if (load) acc <= preset;
    else           acc <= sum;
  end

  wlan_preset_logic u_preset (
    .clk, .clr, .mod_typ, .acc, .load, .preset, .q16_phase, .q64_phase, .state
  );

  ilv_qam16_sel u_qam16_sel (
    .clk, .clr, .load, .load_phase(q16_phase), .step(~load), .q(q16)
  );

  ilv_qam64_sel u_qam64_sel (
    .clk, .clr, .load, .load_phase(q64_phase), .step(~load), .q(q64)
  );

  ilv_read_counter #(.AW(AW)) u_read_counter (
    .clk, .clr, .ncbps(wlan_ncbps(mod_typ)), .count(read_address), .tc(block_end)
  );

  ilv_sel_gen u_sel_gen (.clk, .clr, .block_end, .sel);

  assign write_address = acc;
  assign preset_load   = load;

  a_mode_stable: assert property (@(posedge clk) disable iff (clr)
      (state.lvl != LVL_F) |-> (mod_typ == state.mode))
    else $error("mod_typ changed without clr");
endmodule
