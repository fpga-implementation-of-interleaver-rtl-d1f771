// wlan_preset_logic_tb: the testbench plays the accumulator. For each
// 802.11a/g mode it feeds the preset FSM the address sequence j_k computed
// from the permutation formulas (loading the FSM's own preset when it asks)
// and checks that: the FSM leaves SF after one cycle; load is high exactly
// at the last address of every 16-address iteration; preset equals the next
// address j_(k+1); and the select phases give the increments the formula
// shows for the next iteration.
module wlan_preset_logic_tb;
  import ilv_pkg::*;
  import ilv_ref_pkg::*;
  logic clk = 0, clr, load, q16_phase;
  logic [1:0] mod_typ, q64_phase;
  logic [8:0] acc, preset;
  preset_state_t state;
  int checks = 0, failures = 0;
  int loads = 0;

  wlan_preset_logic dut (.*);

  initial forever #5 clk = ~clk;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what, int k);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("mode %0d k=%0d: %s", mod_typ, k, what);
    end
  endtask

  initial begin
    for (int mt = 0; mt < 4; mt++) begin
      int unsigned n, s, rows;
      n = wlan_ncbps_ref(mt); s = wlan_s_ref(mt); rows = n / 16;
      mod_typ = 2'(mt); clr = 1; acc = 0;
      @(posedge clk); #1;
      clr = 0;
      chk(state.lvl == LVL_F, "not in SF after clr", 0);
      for (int k = 0; k < 2 * n; k++) begin
        int unsigned kk, jn;
        kk = k % n;
        acc = 9'(ref_jk(n, s, kk));
        jn = ref_jk(n, s, (kk + 1) % n);
        #1;
        chk(load == (kk % 16 == 15), "load at wrong cycle", k);
        if (load) begin
          int unsigned p;
          loads++;
          chk(preset == 9'(jn), $sformatf("preset %0d, expected %0d", preset, jn), k);
          // the first increments of the next iteration, from the formula
          if (s == 2) begin
            p = (ref_jk(n, s, (kk + 2) % n) - jn == rows + 1) ? 0 : 1;
            chk(q16_phase == 1'(p), "16-QAM phase", k);
          end
          if (s == 3) begin
            for (int t = 0; t < 3; t++) begin
              int unsigned inc, q;
              inc = ref_jk(n, s, (kk + 2 + t) % n) - ref_jk(n, s, (kk + 1 + t) % n);
              q = (q64_phase + t) % 3;
              chk((q == 0) == (inc == rows + 2), "64-QAM phase", k);
            end
          end
        end
        @(posedge clk); #1;
        if (k > 0) chk(state.lvl == ((kk % 16 == 15) ? LVL_PRE : LVL_RUN), "level", k);
        chk(state.mode == 2'(mt), "captured mode", k);
      end
    end
    chk(loads == 2 * (3 + 6 + 12 + 18), $sformatf("%0d preset loads", loads), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
