// ilv_pkg: types and constants shared by the multimode interleaver blocks.
//
// Both address generators implement the standard two-step block permutation
//   m_k = (Ncbps/d)*(k mod d) + floor(k/d)
//   j_k = s*floor(m_k/s) + (m_k + Ncbps - floor(d*m_k/Ncbps)) mod s
// with d = 16 columns. Ncbps/d is the number of rows of the block; every group
// of 16 consecutive addresses (one "iteration", i.e. one row of the write
// order) starts at the row index and advances by an increment that depends
// only on the modulation and the depth. The tables below give Ncbps, rows and
// the modulation class for each mode code. The mode codes follow the
// interleaver's published encodings (mod_typ for 802.11a/g, mod-type and ID for
// 802.16e); the enum and struct types are this design's own.
package ilv_pkg;

  localparam int unsigned D_COLS = 16;  // columns of the block interleaver (d)

  // Modulation class; decides the increment pattern (s = 1, 2 or 3).
  typedef enum logic [1:0] {
    CLS_S1    = 2'd0,  // BPSK / QPSK: one constant increment
    CLS_QAM16 = 2'd1,  // s = 2: increments rows+1, rows-1 alternating
    CLS_QAM64 = 2'd2   // s = 3: increments rows+2, rows-1, rows-1
  } mod_class_e;

  // 802.11a/g mod_typ encoding.
  typedef enum logic [1:0] {
    WLAN_BPSK  = 2'b00,
    WLAN_QPSK  = 2'b01,
    WLAN_QAM16 = 2'b10,
    WLAN_QAM64 = 2'b11
  } wlan_mod_e;

  // Levels of the hierarchical preset FSM.
  typedef enum logic [1:0] {
    LVL_F   = 2'd0,  // SF: after CLR, accumulator = 0, mode not yet chosen
    LVL_RUN = 2'd1,  // SMTx (802.11) / SMTx.SIDy (802.16e): adding increments
    LVL_PRE = 2'd2   // S_ppp: accumulator was just loaded with a preset
  } preset_lvl_e;

  // Observable state of a preset FSM.
  typedef struct packed {
    preset_lvl_e lvl;
    logic [1:0]  mode;  // mod_typ / mod-type captured when leaving SF
    logic [2:0]  id;    // ID captured when leaving SF (802.16e only, else 0)
    logic [5:0]  idx;   // index of the iteration that the last preset started
  } preset_state_t;

  // Implementation of the two RAMs of the interleaver memory.
  typedef enum logic {
    MEM_DRAM = 1'b0,  // 288 x 1 from distributed RAM, asynchronous read
    MEM_BRAM = 1'b1   // 16K x 1 block RAM, synchronous read (one cycle later)
  } mem_style_e;

  // ---------------- 802.11a/g ----------------
  function automatic logic [8:0] wlan_ncbps(input logic [1:0] m);
    case (m)
      2'b00:   return 9'd48;
      2'b01:   return 9'd96;
      2'b10:   return 9'd192;
      default: return 9'd288;
    endcase
  endfunction

  function automatic logic [5:0] wlan_rows(input logic [1:0] m);
    case (m)
      2'b00:   return 6'd3;
      2'b01:   return 6'd6;
      2'b10:   return 6'd12;
      default: return 6'd18;
    endcase
  endfunction

  function automatic mod_class_e wlan_class(input logic [1:0] m);
    case (m)
      2'b10:   return CLS_QAM16;
      2'b11:   return CLS_QAM64;
      default: return CLS_S1;
    endcase
  endfunction

  // ---------------- 802.16e ----------------
  function automatic mod_class_e wimax_class(input logic [1:0] mt);
    if (mt[1])      return CLS_QAM64;  // mod-type 1X
    else if (mt[0]) return CLS_QAM16;  // mod-type 01
    else            return CLS_S1;     // mod-type 00 (QPSK)
  endfunction

  // Rows (= Ncbps/16) for each interleaver depth of the ID table.
  function automatic logic [5:0] wimax_rows(input logic [1:0] mt, input logic [2:0] id);
    if (wimax_class(mt) == CLS_S1) begin
      case (id)
        3'd0:    return 6'd6;   //  96
        3'd1:    return 6'd9;   // 144
        3'd2:    return 6'd12;  // 192
        3'd3:    return 6'd18;  // 288
        3'd4:    return 6'd24;  // 384
        3'd5:    return 6'd27;  // 432
        3'd6:    return 6'd30;  // 480
        default: return 6'd36;  // 576
      endcase
    end else if (wimax_class(mt) == CLS_QAM16) begin
      case (id[1:0])
        2'd0:    return 6'd12;  // 192
        2'd1:    return 6'd18;  // 288
        2'd2:    return 6'd24;  // 384
        default: return 6'd36;  // 576
      endcase
    end else begin
      case (id[1:0])
        2'd0:    return 6'd18;  // 288
        2'd1:    return 6'd24;  // 384
        2'd2:    return 6'd27;  // 432
        default: return 6'd36;  // 576
      endcase
    end
  endfunction

  function automatic logic [9:0] wimax_ncbps(input logic [1:0] mt, input logic [2:0] id);
    return {wimax_rows(mt, id), 4'b0000};  // rows * 16
  endfunction

  // ---------------- preset arithmetic (shared) ----------------
  // At the last address of iteration i the accumulator holds
  //   Ncbps - rows + i        for s = 1 and s = 3,
  //   Ncbps - rows + (i ^ 1)  for s = 2,
  // so the iteration can be read back from the accumulator. The next
  // iteration n = i + 1 (0 after the last row) starts at address n.
  function automatic logic [5:0] preset_next_iter(input logic [9:0] acc, input logic [9:0] ncbps,
                                                  input logic [5:0] rows, input mod_class_e cls);
    logic [5:0] t;
    logic [5:0] i;
    t = 6'(acc - (ncbps - 10'(rows)));
    i = (cls == CLS_QAM16) ? (t ^ 6'd1) : t;
    return (i == rows - 6'd1) ? 6'd0 : i + 6'd1;
  endfunction

  // Phase of the mod-3 select at the start of iteration n: iterations with
  // n mod 3 = 0, 1, 2 start with increment patterns (+2,-1,-1), (-1,+2,-1)
  // and (-1,-1,+2), i.e. at phase 0, 2, 1.
  function automatic logic [1:0] qam64_phase(input logic [5:0] n);
    logic [1:0] r;
    r = 2'(n % 6'd3);
    return (r == 2'd0) ? 2'd0 : 2'd3 - r;
  endfunction

endpackage
