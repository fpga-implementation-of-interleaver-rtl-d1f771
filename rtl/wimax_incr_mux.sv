// wimax_incr_mux: increment selection of the 802.16e address generator.
//
// Three levels of multiplexers choose the value the accumulator adds next,
// following the increment table for the 802.16e interleaver depths:
//   level 1: four 2:1 muxes for 16-QAM (13/11, 19/17, 25/23, 37/35 for depths
//            192, 288, 384, 576), selected together by the T flip-flop q16;
//            four 3:1 muxes for 64-QAM (20/17/17, 26/23/23, 29/26/26,
//            38/35/35 for depths 288, 384, 432, 576), selected by the mod-3
//            counter q64
//   level 2: an 8:1 mux of the QPSK increments 6, 9, 12, 18, 24, 27, 30, 36
//            (depths 96 .. 576) by id, and two 4:1 muxes picking a level-1
//            output by id[1:0] for 16-QAM and for 64-QAM
//   level 3: by mod_type: 00 QPSK, 01 16-QAM, 1X 64-QAM; 7-bit result
// Purely combinational. Each value is rows+1/rows-1 (16-QAM) or rows+2/rows-1
// (64-QAM), rows = depth/16. id[2] is ignored for 16-QAM and 64-QAM.
module wimax_incr_mux (
  input  logic [1:0] mod_type,
  input  logic [2:0] id,
  input  logic       q16,
  input  logic [1:0] q64,
  output logic [6:0] incr
);
  logic [6:0] l1_q16 [4];
  logic [6:0] l1_q64 [4];
  logic [6:0] l2_qpsk, l2_q16, l2_q64;

  // level 1
  assign l1_q16[0] = q16 ? 7'd11 : 7'd13;
  assign l1_q16[1] = q16 ? 7'd17 : 7'd19;
  assign l1_q16[2] = q16 ? 7'd23 : 7'd25;
  assign l1_q16[3] = q16 ? 7'd35 : 7'd37;
  assign l1_q64[0] = (q64 == 2'd0) ? 7'd20 : 7'd17;
  assign l1_q64[1] = (q64 == 2'd0) ? 7'd26 : 7'd23;
  assign l1_q64[2] = (q64 == 2'd0) ? 7'd29 : 7'd26;
  assign l1_q64[3] = (q64 == 2'd0) ? 7'd38 : 7'd35;

  // level 2
  always_comb begin
    case (id)
      3'd0:    l2_qpsk = 7'd6;
      3'd1:    l2_qpsk = 7'd9;
      3'd2:    l2_qpsk = 7'd12;
      3'd3:    l2_qpsk = 7'd18;
      3'd4:    l2_qpsk = 7'd24;
      3'd5:    l2_qpsk = 7'd27;
      3'd6:    l2_qpsk = 7'd30;
      default: l2_qpsk = 7'd36;
    endcase
  end
  assign l2_q16 = l1_q16[id[1:0]];
  assign l2_q64 = l1_q64[id[1:0]];

  // level 3
  always_comb begin
    if (mod_type[1])      incr = l2_q64;
    else if (mod_type[0]) incr = l2_q16;
    else                  incr = l2_qpsk;
  end
endmodule
