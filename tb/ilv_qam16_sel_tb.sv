// ilv_qam16_sel_tb: checks the 16-QAM select T flip-flop against a cycle model
// under random clear, load and step inputs.
module ilv_qam16_sel_tb;
  logic clk = 0, clr, load, load_phase, step, q;
  logic exp_q;
  int checks = 0, failures = 0;

  ilv_qam16_sel dut (.*);

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
      load_phase = 1'($urandom);
      step = 1'($urandom);
      @(posedge clk); #1;
      if (clr) exp_q = 0;
      else if (load) exp_q = load_phase;
      else if (step) exp_q = ~exp_q;
      checks++;
      if (q !== exp_q) begin
        failures++;
        if (failures < 10) $display("cycle %0d: q=%0b expected %0b", i, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
