// wimax_addr_gen: multimode address generator of the 802.16e interleaver.
//
// Generates, one per clock, the permuted interleaver address j_k for every
// modulation and interleaver depth of 802.16e: QPSK with depths 96, 144, 192,
// 288, 384, 432, 480, 576 (id 0..7), 16-QAM with 192, 288, 384, 576 and
// 64-QAM with 288, 384, 432, 576 (id[1:0] 0..3); mod_type 00 QPSK, 01 16-QAM,
// 1X 64-QAM. As in the 802.11a/g generator the address is accumulated: the
// three-level increment multiplexer (wimax_incr_mux, 7-bit output) feeds a
// 10-bit adder whose other input is the accumulator, and the preset FSM
// reloads the accumulator at the start of each 16-address iteration. The
// 16-QAM select is a T flip-flop (QAM16_SEL) and the 64-QAM select a mod-3
// counter (QAM64_SEL).
//
// The linear read address (10-bit up counter, wrapping at Ncbps-1) and the
// bank select sel are generated as in the 802.11a/g address generator, which
// the 802.16e generator shares its schematic with; that the 802.16e
// generator has them too is this design's reading.
//
// Timing: clr is synchronous; in the first cycle after clr the outputs hold
// address k = 0, then k = 1, 2, ... one per cycle. mod_type and id must not
// change between clears (checked by an assertion).
module wimax_addr_gen
  import ilv_pkg::*;
(
  input  logic          clk,
  input  logic          clr,
  input  logic [1:0]    mod_type,
  input  logic [2:0]    id,
  output logic [9:0]    write_address,
  output logic [9:0]    read_address,
  output logic          sel,
  output logic          preset_load,
  output preset_state_t state
);
  localparam int unsigned AW = 10;  // adder / accumulator / read counter width
  localparam int unsigned IW = 7;   // increment width

  logic          q16;
  logic [1:0]    q64;
  logic [IW-1:0] incr;
  logic [AW-1:0] acc, sum, preset;
  logic          load, q16_phase;
  logic [1:0]    q64_phase;
  logic          block_end;

  wimax_incr_mux u_incr_mux (.mod_type, .id, .q16, .q64, .incr);

  assign sum = acc + {{(AW - IW){1'b0}}, incr};

  always_ff @(posedge clk) begin
    if (clr)       acc <= '0;
    else if (load) acc <= preset;
    else           acc <= sum;
  end

  wimax_preset_logic u_preset (
    .clk, .clr, .mod_type, .id, .acc, .load, .preset, .q16_phase, .q64_phase, .state
  );

  ilv_qam16_sel u_qam16_sel (
    .clk, .clr, .load, .load_phase(q16_phase), .step(~load), .q(q16)
  );

  ilv_qam64_sel u_qam64_sel (
    .clk, .clr, .load, .load_phase(q64_phase), .step(~load), .q(q64)
  );

  ilv_read_counter #(.AW(AW)) u_read_counter (
    .clk, .clr, .ncbps(wimax_ncbps(mod_type, id)), .count(read_address), .tc(block_end)
  );

  ilv_sel_gen u_sel_gen (.clk, .clr, .block_end, .sel);

  assign write_address = acc;
  assign preset_load   = load;

  a_mode_stable: assert property (@(posedge clk) disable iff (clr)
      (state.lvl != LVL_F) |-> (mod_type == state.mode && id == state.id))
    else $error("mod_type/id changed without clr");
endmodule
