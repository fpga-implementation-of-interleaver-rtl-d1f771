// interleaver_top: the two multimode interleaver designs side by side.
//
// wlan_*  : the complete 802.11a/g block interleaver (address generator and
//           ping-pong memory), BPSK/QPSK/16-QAM/64-QAM, bit-serial.
// wimax_* : the 802.16e multimode address generator (QPSK, 16-QAM, 64-QAM
//           at all interleaver depths), whose write/read addresses and bank
//           select are brought out for an external interleaver memory.
// The two share only the clock; each has its own synchronous clear. Timing
// is that of wlan_interleaver and wimax_addr_gen. The *_preset_load and
// *_state outputs expose the preset FSMs.
module interleaver_top
  import ilv_pkg::*;
(
  input  logic          clk,
  // 802.11a/g interleaver
  input  logic          wlan_clr,
  input  logic [1:0]    wlan_mod_typ,
  input  logic          wlan_raw_data,
  output logic          wlan_interleaved_data,
  output logic [8:0]    wlan_write_address,
  output logic [8:0]    wlan_read_address,
  output logic          wlan_sel,
  output logic          wlan_preset_load,
  output preset_state_t wlan_state,
  // 802.16e address generator
  input  logic          wimax_clr,
  input  logic [1:0]    wimax_mod_type,
  input  logic [2:0]    wimax_id,
  output logic [9:0]    wimax_write_address,
  output logic [9:0]    wimax_read_address,
  output logic          wimax_sel,
  output logic          wimax_preset_load,
  output preset_state_t wimax_state
);
  wlan_interleaver u_wlan (
    .clk,
    .clr              (wlan_clr),
    .mod_typ          (wlan_mod_typ),
    .raw_data         (wlan_raw_data),
    .interleaved_data (wlan_interleaved_data),
    .write_address    (wlan_write_address),
    .read_address     (wlan_read_address),
    .sel              (wlan_sel),
    .preset_load      (wlan_preset_load),
    .state            (wlan_state)
  );

  wimax_addr_gen u_wimax (
    .clk,
    .clr           (wimax_clr),
    .mod_type      (wimax_mod_type),
    .id            (wimax_id),
    .write_address (wimax_write_address),
    .read_address  (wimax_read_address),
    .sel           (wimax_sel),
    .preset_load   (wimax_preset_load),
    .state         (wimax_state)
  );
endmodule
