// ilv_ref_pkg: reference model for the interleaver testbenches.
//
// Evaluates the interleaver permutation directly from its defining formulas
// (no accumulators, no increments), so the address generators can be checked
// against values worked out independently of them:
//   m_k = (Ncbps/16)*(k mod 16) + floor(k/16)
//   j_k = s*floor(m_k/s) + (m_k + Ncbps - floor(16*m_k/Ncbps)) mod s
package ilv_ref_pkg;

  function automatic int unsigned ref_jk(int unsigned ncbps, int unsigned s, int unsigned k);
    int unsigned m;
    m = (ncbps / 16) * (k % 16) + k / 16;
    return s * (m / s) + (m + ncbps - (16 * m) / ncbps) % s;
  endfunction

  // 802.11a/g: mod_typ 0..3 = BPSK, QPSK, 16-QAM, 64-QAM
  function automatic int unsigned wlan_ncbps_ref(int unsigned mt);
    case (mt)
      0: return 48;
      1: return 96;
      2: return 192;
      default: return 288;
    endcase
  endfunction

  function automatic int unsigned wlan_s_ref(int unsigned mt);
    case (mt)
      2: return 2;
      3: return 3;
      default: return 1;
    endcase
  endfunction

  // 802.16e: mod_type 00 QPSK, 01 16-QAM, 1X 64-QAM; id selects the depth
  function automatic int unsigned wimax_ncbps_ref(int unsigned mt, int unsigned id);
    int unsigned qpsk[8];
    int unsigned q16[4];
    int unsigned q64[4];
    qpsk = '{96, 144, 192, 288, 384, 432, 480, 576};
    q16  = '{192, 288, 384, 576};
    q64  = '{288, 384, 432, 576};
    if (mt >= 2)      return q64[id % 4];
    else if (mt == 1) return q16[id % 4];
    else              return qpsk[id];
  endfunction

  function automatic int unsigned wimax_s_ref(int unsigned mt);
    if (mt >= 2)      return 3;
    else if (mt == 1) return 2;
    else              return 1;
  endfunction

endpackage
