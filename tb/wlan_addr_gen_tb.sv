// wlan_addr_gen_tb: runs the 802.11a/g address generator in all four modes
// for two and a half blocks each and compares, cycle by cycle, the write
// address with j_k from the permutation formulas, the read address with
// k mod Ncbps and sel with the block parity. It also checks printed cells of
// the published first-32-address table, that the first address appears in
// the cycle after clr, and a clr in mid-block followed by a mode change.
module wlan_addr_gen_tb;
  import ilv_pkg::*;
  import ilv_ref_pkg::*;
  logic clk = 0, clr, sel, preset_load;
  logic [1:0] mod_typ;
  logic [8:0] write_address, read_address;
  preset_state_t state;
  int checks = 0, failures = 0;
  int loads = 0, toggles = 0;
  int unsigned got [4][32];

  wlan_addr_gen dut (.*);

  initial forever #5 clk = ~clk;
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("mode %0d: %s", mod_typ, what);
    end
  endtask

  task automatic run(int mt, int cycles);
    int unsigned n, s;
    logic last_sel;
    n = wlan_ncbps_ref(mt); s = wlan_s_ref(mt);
    mod_typ = 2'(mt); clr = 1;
    @(posedge clk); #1;
    clr = 0;
    last_sel = 0;
    for (int k = 0; k < cycles; k++) begin
      int unsigned j;
      j = ref_jk(n, s, k % n);
      if (k < 32) got[mt][k] = write_address;
      chk(write_address == 9'(j), $sformatf("k=%0d write %0d expected %0d", k, write_address, j));
      chk(read_address == 9'(k % n), $sformatf("k=%0d read %0d", k, read_address));
      chk(sel == 1'((k / n) % 2), $sformatf("k=%0d sel %0b", k, sel));
      if (sel != last_sel) toggles++;
      last_sel = sel;
      if (preset_load) loads++;
      @(posedge clk); #1;
    end
  endtask

  initial begin
    for (int mt = 0; mt < 4; mt++) run(mt, 5 * wlan_ncbps_ref(mt) / 2);
    // printed rows of the first-32-address table
    chk(got[0][0:7]  == '{0, 3, 6, 9, 12, 15, 18, 21}, "BPSK row 1");
    chk(got[1][8:15] == '{48, 54, 60, 66, 72, 78, 84, 90}, "QPSK row 2");
    chk(got[1][24:31] == '{49, 55, 61, 67, 73, 79, 85, 91}, "QPSK row 4");
    chk(got[2][0:7]  == '{0, 13, 24, 37, 48, 61, 72, 85}, "16-QAM row 1");
    chk(got[2][16:23] == '{1, 12, 25, 36, 49, 60, 73, 84}, "16-QAM row 3");
    chk(got[2][24:31] == '{97, 108, 121, 132, 145, 156, 169, 180}, "16-QAM row 4");
    chk(got[3][0:7]  == '{0, 20, 37, 54, 74, 91, 108, 128}, "64-QAM row 1");
    chk(got[3][8:15] == '{145, 162, 182, 199, 216, 236, 253, 270}, "64-QAM row 2");
    chk(got[3][24:31] == '{146, 163, 180, 200, 217, 234, 254, 271}, "64-QAM row 4");
    // clear in the middle of a 64-QAM block, then switch to 16-QAM
    run(3, 100);
    run(2, 400);
    chk(loads > 0 && toggles > 0, "no preset loads or bank switches seen");
    $display("preset loads %0d, bank switches %0d", loads, toggles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
