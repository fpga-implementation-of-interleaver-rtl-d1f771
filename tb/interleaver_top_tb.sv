// interleaver_top_tb: end-to-end test of both designs at their default
// parameters, running concurrently.
//  802.11a/g: every mode interleaves three blocks of random bits; each
//    output bit of blocks 1 and 2 is compared with the input bit the
//    permutation formulas put at that position, and the write/read addresses
//    and sel are checked every cycle. Then a 64-QAM run is cleared in
//    mid-block and restarted as QPSK (on-the-fly mode change).
//  802.16e: every modulation and interleaver depth runs one and a half
//    blocks with the write address, read address and sel checked every cycle,
//    followed by a mid-block clear and a depth change.
// Counted mechanisms, each of which must occur: preset loads, bank switches,
// on-the-fly mode changes, 16-QAM and 64-QAM increment patterns (modes run),
// and every preset-FSM level.
module interleaver_top_tb;
  import ilv_pkg::*;
  import ilv_ref_pkg::*;
  logic clk = 0;
  logic wlan_clr, wlan_raw_data, wlan_interleaved_data, wlan_sel, wlan_preset_load;
  logic [1:0] wlan_mod_typ;
  logic [8:0] wlan_write_address, wlan_read_address;
  preset_state_t wlan_state;
  logic wimax_clr, wimax_sel, wimax_preset_load;
  logic [1:0] wimax_mod_type;
  logic [2:0] wimax_id;
  logic [9:0] wimax_write_address, wimax_read_address;
  preset_state_t wimax_state;

  int checks = 0, failures = 0;
  int n_wlan_preset = 0, n_wimax_preset = 0, n_wlan_switch = 0, n_wimax_switch = 0;
  int n_onthefly = 0, n_qam16 = 0, n_qam64 = 0, n_pre_state = 0;
  bit wlan_done = 0, wimax_done = 0;
  logic in_bits [3][288];
  int unsigned inv [288];

  interleaver_top dut (.*);

  initial forever #5 clk = ~clk;
  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%0t: %s", $time, what);
    end
  endtask

  // count preset loads, bank switches and preset states on every clock
  logic wlan_sel_q = 0, wimax_sel_q = 0;
  always @(posedge clk) begin
    if (!wlan_clr && wlan_preset_load) n_wlan_preset++;
    if (!wimax_clr && wimax_preset_load) n_wimax_preset++;
    if (!wlan_clr && wlan_sel != wlan_sel_q) n_wlan_switch++;
    if (!wimax_clr && wimax_sel != wimax_sel_q) n_wimax_switch++;
    if (wlan_state.lvl == LVL_PRE || wimax_state.lvl == LVL_PRE) n_pre_state++;
    wlan_sel_q <= wlan_sel;
    wimax_sel_q <= wimax_sel;
  end

  task automatic wlan_run(int mt, int cycles, bit check_data);
    int unsigned n, s;
    n = wlan_ncbps_ref(mt); s = wlan_s_ref(mt);
    for (int k = 0; k < n; k++) inv[ref_jk(n, s, k)] = k;
    wlan_mod_typ = 2'(mt); wlan_clr = 1;
    @(posedge clk); #1;
    wlan_clr = 0;
    if (mt == 2) n_qam16++;
    if (mt == 3) n_qam64++;
    for (int t = 0; t < cycles; t++) begin
      int b, r;
      b = t / n; r = t % n;
      wlan_raw_data = 1'($urandom);
      if (b < 3) in_bits[b][r] = wlan_raw_data;
      #1;
      chk(wlan_write_address == 9'(ref_jk(n, s, r)), $sformatf("wlan %0d write address t=%0d", mt, t));
      chk(wlan_read_address == 9'(r), $sformatf("wlan %0d read address t=%0d", mt, t));
      chk(wlan_sel == 1'(b % 2), $sformatf("wlan %0d sel t=%0d", mt, t));
      if (check_data && b >= 1 && b < 3)
        chk(wlan_interleaved_data == in_bits[b - 1][inv[r]],
            $sformatf("wlan %0d data block %0d pos %0d", mt, b, r));
      @(posedge clk); #1;
    end
  endtask

  task automatic wimax_run(int mt, int di, int cycles);
    int unsigned n, s;
    n = wimax_ncbps_ref(mt, di); s = wimax_s_ref(mt);
    wimax_mod_type = 2'(mt); wimax_id = 3'(di); wimax_clr = 1;
    @(posedge clk); #1;
    wimax_clr = 0;
    if (mt == 1) n_qam16++;
    if (mt >= 2) n_qam64++;
    for (int k = 0; k < cycles; k++) begin
      #1;
      chk(wimax_write_address == 10'(ref_jk(n, s, k % n)),
          $sformatf("wimax %0d/%0d write address k=%0d", mt, di, k));
      chk(wimax_read_address == 10'(k % n), $sformatf("wimax %0d/%0d read address k=%0d", mt, di, k));
      chk(wimax_sel == 1'((k / n) % 2), $sformatf("wimax %0d/%0d sel k=%0d", mt, di, k));
      @(posedge clk); #1;
    end
  endtask

  initial begin
    wlan_clr = 1; wlan_mod_typ = 0; wlan_raw_data = 0;
    @(posedge clk); #1;
    for (int mt = 0; mt < 4; mt++) wlan_run(mt, 3 * wlan_ncbps_ref(mt), 1);
    wlan_run(3, 150, 0);  // cleared in mid-block ...
    n_onthefly++;
    wlan_run(1, 3 * 96, 1);  // ... and restarted as QPSK
    wlan_done = 1;
  end

  initial begin
    wimax_clr = 1; wimax_mod_type = 0; wimax_id = 0;
    @(posedge clk); #1;
    for (int mt = 0; mt < 4; mt++)
      for (int di = 0; di < ((mt == 0) ? 8 : 4); di++)
        wimax_run(mt, di, 3 * wimax_ncbps_ref(mt, di) / 2);
    wimax_run(2, 3, 250);  // cleared in mid-block ...
    n_onthefly++;
    wimax_run(0, 5, 500);  // ... and restarted with another depth
    wimax_done = 1;
  end

  initial begin
    wait (wlan_done && wimax_done);
    $display("802.11a/g preset loads %0d, bank switches %0d", n_wlan_preset, n_wlan_switch);
    $display("802.16e   preset loads %0d, bank switches %0d", n_wimax_preset, n_wimax_switch);
    $display("on-the-fly mode changes %0d, 16-QAM runs %0d, 64-QAM runs %0d, preset-state cycles %0d",
             n_onthefly, n_qam16, n_qam64, n_pre_state);
    chk(n_wlan_preset > 0, "no 802.11a/g preset load");
    chk(n_wimax_preset > 0, "no 802.16e preset load");
    chk(n_wlan_switch > 0, "no 802.11a/g bank switch");
    chk(n_wimax_switch > 0, "no 802.16e bank switch");
    chk(n_onthefly == 2, "on-the-fly mode change missing");
    chk(n_qam16 > 0 && n_qam64 > 0, "QAM increment patterns not exercised");
    chk(n_pre_state > 0, "preset state never entered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
