// wlan_interleaver_tb: end-to-end check of the 802.11a/g interleaver in all
// four modes, with both RAM styles side by side. Random coded bits are fed
// for four blocks; in block b the output at read position r must be the
// input bit k of block b-1 whose permuted address j_k (from the permutation
// formulas) is r. The distributed-RAM instance delivers position r in the
// cycle of read address r, the block-RAM instance one cycle later.
module wlan_interleaver_tb;
  import ilv_pkg::*;
  import ilv_ref_pkg::*;
  localparam int BLOCKS = 4;
  logic clk = 0, clr, raw_data, out_d, out_b, sel_d, sel_b, pl_d, pl_b;
  logic [1:0] mod_typ;
  logic [8:0] wa_d, ra_d, wa_b, ra_b;
  preset_state_t st_d, st_b;
  logic in_bits [BLOCKS][288];
  int unsigned inv [288];
  int checks = 0, failures = 0;

  wlan_interleaver #(.MEM_STYLE(MEM_DRAM)) dut_d (.clk, .clr, .mod_typ, .raw_data,
    .interleaved_data(out_d), .write_address(wa_d), .read_address(ra_d), .sel(sel_d),
    .preset_load(pl_d), .state(st_d));
  wlan_interleaver #(.MEM_STYLE(MEM_BRAM)) dut_b (.clk, .clr, .mod_typ, .raw_data,
    .interleaved_data(out_b), .write_address(wa_b), .read_address(ra_b), .sel(sel_b),
    .preset_load(pl_b), .state(st_b));

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

  initial begin
    for (int mt = 0; mt < 4; mt++) begin
      int unsigned n, s;
      logic exp_prev;
      n = wlan_ncbps_ref(mt); s = wlan_s_ref(mt);
      for (int k = 0; k < n; k++) inv[ref_jk(n, s, k)] = k;
      mod_typ = 2'(mt); clr = 1;
      @(posedge clk); #1;
      clr = 0;
      for (int t = 0; t < BLOCKS * n + 1; t++) begin
        int b, r;
        logic exp_now;
        b = t / n; r = t % n;
        raw_data = 1'($urandom);
        if (b < BLOCKS) in_bits[b][r] = raw_data;
        #1;
        if (b >= 1 && b < BLOCKS) begin
          exp_now = in_bits[b - 1][inv[r]];
          chk(out_d == exp_now, $sformatf("DRAM block %0d pos %0d", b, r));
        end
        if (t > n) chk(out_b == exp_prev, $sformatf("BRAM block %0d pos %0d", b, r));
        exp_prev = (b >= 1 && b < BLOCKS) ? in_bits[b - 1][inv[r]] : 1'b0;
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
