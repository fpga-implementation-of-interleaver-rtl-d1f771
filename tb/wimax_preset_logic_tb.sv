// wimax_preset_logic_tb: the testbench plays the accumulator. For all 16
// combinations of 802.16e modulation and interleaver depth it feeds the FSM
// the address sequence j_k from the permutation formulas and checks that
// load is high exactly at the last address of each 16-address iteration, that
// preset is the next address, that the select phases match the increments of
// the next iteration, and the SF -> SMTx.SIDy -> preset-state sequence.
module wimax_preset_logic_tb;
  import ilv_pkg::*;
  import ilv_ref_pkg::*;
  logic clk = 0, clr, load, q16_phase;
  logic [1:0] mod_type, q64_phase;
  logic [2:0] id;
  logic [9:0] acc, preset;
  preset_state_t state;
  int checks = 0, failures = 0;
  int loads = 0, exp_loads = 0;

  wimax_preset_logic dut (.*);

  initial forever #5 clk = ~clk;
  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what, int k);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("mod_type %0d id %0d k=%0d: %s", mod_type, id, k, what);
    end
  endtask

  task automatic run(int mt, int di);
    int unsigned n, s, rows;
    n = wimax_ncbps_ref(mt, di); s = wimax_s_ref(mt); rows = n / 16;
    mod_type = 2'(mt); id = 3'(di); clr = 1; acc = 0;
    @(posedge clk); #1;
    clr = 0;
    chk(state.lvl == LVL_F, "not in SF after clr", 0);
    for (int k = 0; k < n + 20; k++) begin
      int unsigned kk, jn;
      kk = k % n;
      acc = 10'(ref_jk(n, s, kk));
      jn = ref_jk(n, s, (kk + 1) % n);
      #1;
      chk(load == (kk % 16 == 15), "load at wrong cycle", k);
      if (kk % 16 == 15) exp_loads++;
      if (load) begin
        loads++;
        chk(preset == 10'(jn), $sformatf("preset %0d, expected %0d", preset, jn), k);
        if (s == 2)
          chk(q16_phase == ((ref_jk(n, s, (kk + 2) % n) - jn == rows + 1) ? 1'b0 : 1'b1),
              "16-QAM phase", k);
        if (s == 3)
          for (int t = 0; t < 3; t++) begin
            int unsigned inc;
            inc = ref_jk(n, s, (kk + 2 + t) % n) - ref_jk(n, s, (kk + 1 + t) % n);
            chk((((q64_phase + t) % 3) == 0) == (inc == rows + 2), "64-QAM phase", k);
          end
      end
      @(posedge clk); #1;
      chk(state.lvl == ((kk % 16 == 15) ? LVL_PRE : LVL_RUN), "level", k);
      chk(state.mode == 2'(mt) && state.id == 3'(di), "captured mode/ID", k);
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) run(0, i);
    for (int i = 0; i < 4; i++) run(1, i);
    for (int i = 0; i < 4; i++) run(2, i);
    run(3, 6);  // mod-type 11 is 64-QAM too
    chk(loads == exp_loads && loads > 0, $sformatf("%0d preset loads", loads), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
