// ilv_qam64_sel_tb: checks the 64-QAM mod-3 select counter against a cycle
// model under random clear, load and step inputs.
module ilv_qam64_sel_tb;
  logic clk = 0, clr, load, step;
  logic [1:0] load_phase, q;
  int exp_q;
  int checks = 0, failures = 0;

  ilv_qam64_sel dut (.*);

  initial forever #5 clk = ~clk;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1; load = 0; load_phase = 0; step = 0;
    @(posedge clk); #1;
    exp_q = 0;
    for (int i = 0; i < 2000; i++) begin
      clr = ($urandom_range(0, 49) == 0);
      load = ($urandom_range(0, 7) == 0);
      load_phase = 2'($urandom_range(0, 2));
      step = 1'($urandom);
      @(posedge clk); #1;
      if (clr) exp_q = 0;
      else if (load) exp_q = load_phase;
      else if (step) exp_q = (exp_q + 1) % 3;
      checks++;
      if (q != 2'(exp_q)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: q=%0d expected %0d", i, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
