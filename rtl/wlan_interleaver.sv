// wlan_interleaver: multimode block interleaver for 802.11a/g OFDM.
//
// Rearranges each block of Ncbps coded bits (48, 96, 192 or 288 for BPSK,
// QPSK, 16-QAM, 64-QAM; mod_typ 00..11) so that adjacent coded bits land on
// non-adjacent subcarriers and alternate between more and less significant
// constellation bits. Bit k of a block is written to location j_k of one RAM
// (write_address from wlan_addr_gen) while the previous block is read from the
// other RAM in linear order (read_address); sel swaps the RAMs every block.
//
// Timing: clr (synchronous) starts block 0 in the cycle after it falls; one
// bit enters per clock on raw_data. During block b (b >= 1) interleaved_data
// carries block b-1 in interleaved order: output position r is input bit k
// with j_k = r. With MEM_STYLE = MEM_DRAM output position r appears in the same
// cycle as read_address = r; with MEM_BRAM one cycle later. The output during
// block 0 is whatever the read RAM held. mod_typ may change only together
// with clr.
module wlan_interleaver
  import ilv_pkg::*;
#(
  parameter mem_style_e MEM_STYLE = MEM_DRAM
) (
  input  logic          clk,
  input  logic          clr,
  input  logic [1:0]    mod_typ,
  input  logic          raw_data,
  output logic          interleaved_data,
  output logic [8:0]    write_address,
  output logic [8:0]    read_address,
  output logic          sel,
  output logic          preset_load,
  output preset_state_t state
);
  wlan_addr_gen u_addr_gen (
    .clk, .clr, .mod_typ, .write_address, .read_address, .sel, .preset_load, .state
  );

  wlan_ilv_memory #(.MEM_STYLE(MEM_STYLE)) u_memory (
    .clk, .raw_data, .sel, .read_address, .write_address, .interleaved_data
  );
endmodule
