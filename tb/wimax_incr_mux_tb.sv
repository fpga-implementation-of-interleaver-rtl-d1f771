// wimax_incr_mux_tb: exhaustive check of the 802.16e increment multiplexer
// over mod_type, id and both selects. The expected increment is derived from
// the permutation formulas: the difference between the second and first
// address of the iteration whose start phase matches the select value.
module wimax_incr_mux_tb;
  import ilv_ref_pkg::*;
  logic [1:0] mod_type, q64;
  logic [2:0] id;
  logic q16;
  logic [6:0] incr;
  int checks = 0, failures = 0;

  wimax_incr_mux dut (.*);

  initial begin
    for (int mt = 0; mt < 4; mt++)
      for (int i = 0; i < 8; i++)
        for (int p = 0; p < 3; p++) begin
          int unsigned n, s, k, exp;
          mod_type = 2'(mt); id = 3'(i);
          n = wimax_ncbps_ref(mt, i); s = wimax_s_ref(mt);
          // iteration 0 starts at phase 0; the increment at column c of
          // iteration 0 has phase c mod 2 (16-QAM) or c mod 3 (64-QAM)
          k = (s == 1) ? 0 : p % s;
          exp = ref_jk(n, s, k + 1) - ref_jk(n, s, k);
          q16 = 1'(p % 2); q64 = 2'(p);
          if (s == 2) exp = ref_jk(n, s, (p % 2) + 1) - ref_jk(n, s, p % 2);
          #1;
          checks++;
          if (incr != 7'(exp)) begin
            failures++;
            $display("mod_type=%0d id=%0d phase=%0d: incr=%0d expected %0d", mt, i, p, incr, exp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
