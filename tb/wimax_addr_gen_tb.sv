// wimax_addr_gen_tb: runs the 802.16e address generator for every modulation
// and interleaver depth (mod_type 00/01/10/11, all IDs) for one and a half
// blocks and compares, cycle by cycle, the write address with j_k from the
// permutation formulas, the read address with k mod Ncbps and sel with the
// block parity. It also checks printed cells of the published permutation
// table (QPSK 96, 16-QAM 288, 64-QAM 384) and a clear in mid-block followed
// by a different mode.
module wimax_addr_gen_tb;
  import ilv_pkg::*;
  import ilv_ref_pkg::*;
  logic clk = 0, clr, sel, preset_load;
  logic [1:0] mod_type;
  logic [2:0] id;
  logic [9:0] write_address, read_address;
  preset_state_t state;
  int checks = 0, failures = 0;
  int loads = 0, toggles = 0;
  int unsigned got [32];

  wimax_addr_gen dut (.*);

  initial forever #5 clk = ~clk;
  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("mod_type %0d id %0d: %s", mod_type, id, what);
    end
  endtask

  task automatic run(int mt, int di, int cycles);
    int unsigned n, s;
    logic last_sel;
    n = wimax_ncbps_ref(mt, di); s = wimax_s_ref(mt);
    mod_type = 2'(mt); id = 3'(di); clr = 1;
    @(posedge clk); #1;
    clr = 0;
    last_sel = 0;
    for (int k = 0; k < cycles; k++) begin
      int unsigned j;
      j = ref_jk(n, s, k % n);
      if (k < 32) got[k] = write_address;
      chk(write_address == 10'(j), $sformatf("k=%0d write %0d expected %0d", k, write_address, j));
      chk(read_address == 10'(k % n), $sformatf("k=%0d read %0d", k, read_address));
      chk(sel == 1'((k / n) % 2), $sformatf("k=%0d sel %0b", k, sel));
      if (sel != last_sel) toggles++;
      last_sel = sel;
      if (preset_load) loads++;
      @(posedge clk); #1;
    end
  endtask

  initial begin
    for (int mt = 0; mt < 4; mt++)
      for (int di = 0; di < ((mt == 0) ? 8 : 4); di++)
        run(mt, di, 3 * wimax_ncbps_ref(mt, di) / 2);
    run(0, 0, 32);
    chk(got[8:15] == '{48, 54, 60, 66, 72, 78, 84, 90}, "QPSK 96 row 2");
    chk(got[16:23] == '{1, 7, 13, 19, 25, 31, 37, 43}, "QPSK 96 row 3");
    run(1, 1, 32);
    chk(got[0:7] == '{0, 19, 36, 55, 72, 91, 108, 127}, "16-QAM 288 row 1");
    chk(got[24:31] == '{145, 162, 181, 198, 217, 234, 253, 270}, "16-QAM 288 row 4");
    run(2, 1, 32);
    chk(got[0:7] == '{0, 26, 49, 72, 98, 121, 144, 170}, "64-QAM 384 row 1");
    chk(got[24:31] == '{194, 217, 240, 266, 289, 312, 338, 361}, "64-QAM 384 row 4");
    // clear in mid-block, then a different depth
    run(2, 3, 300);
    run(1, 2, 400);
    chk(loads > 0 && toggles > 0, "no preset loads or bank switches seen");
    $display("preset loads %0d, bank switches %0d", loads, toggles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
