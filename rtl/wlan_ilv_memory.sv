// wlan_ilv_memory: ping-pong memory of the block interleaver.
//
// Two 1-bit-wide RAMs, RAM-1 and RAM-2, take turns: while one is written with
// the incoming coded bits at the permuted write addresses, the other is read at
// the linear read addresses, and sel swaps the roles after every block. The
// structure follows the original design:
//   RAM-1: WE = sel,  A = sel ? write_address : read_address
//   RAM-2: WE = ~sel, A = sel ? read_address  : write_address
//   interleaved_data = sel ? RAM-2 output : RAM-1 output
// so with sel = 0 (after clear) RAM-1 is read and RAM-2 written.
//
// MEM_STYLE selects the RAM technique: MEM_DRAM (default, distributed RAM,
// asynchronous read: interleaved_data belongs to the read address of the same
// cycle) or MEM_BRAM (16K x 1 block RAM, synchronous read: interleaved_data
// belongs to the read address of the previous cycle). For MEM_BRAM the output
// mux uses sel delayed by one cycle so that the last bit of a block is taken
// from the right RAM; that register is this design's addition. The choice of
// default is also this design's.
module wlan_ilv_memory
  import ilv_pkg::*;
#(
  parameter mem_style_e MEM_STYLE = MEM_DRAM
) (
  input  logic       clk,
  input  logic       raw_data,
  input  logic       sel,
  input  logic [8:0] read_address,
  input  logic [8:0] write_address,
  output logic       interleaved_data
);
  logic [8:0] a1, a2;
  logic       q1, q2;
  logic       we1, we2;
  logic       out_sel;

  assign a1  = sel ? write_address : read_address;
  assign a2  = sel ? read_address  : write_address;
  assign we1 = sel;
  assign we2 = ~sel;

  if (MEM_STYLE == MEM_DRAM) begin : g_dram
    dram_288x1 u_ram1 (.clk(clk), .we(we1), .a(a1), .d(raw_data), .q(q1));
    dram_288x1 u_ram2 (.clk(clk), .we(we2), .a(a2), .d(raw_data), .q(q2));
    assign out_sel = sel;
  end else begin : g_bram
    logic sel_q;
    bram_16kx1 u_ram1 (.clk(clk), .we(we1), .a({5'b0, a1}), .d(raw_data), .q(q1));
    bram_16kx1 u_ram2 (.clk(clk), .we(we2), .a({5'b0, a2}), .d(raw_data), .q(q2));
    always_ff @(posedge clk) sel_q <= sel;
    assign out_sel = sel_q;
  end

  assign interleaved_data = out_sel ? q2 : q1;
endmodule
