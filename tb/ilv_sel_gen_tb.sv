// ilv_sel_gen_tb: checks that sel is cleared by clr and toggles exactly on
// the edges that end a block, under random block_end and clr inputs.
module ilv_sel_gen_tb;
  logic clk = 0, clr, block_end, sel, exp_sel;
  int checks = 0, failures = 0;

  ilv_sel_gen dut (.*);

  initial forever #5 clk = ~clk;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1; block_end = 0;
    @(posedge clk); #1;
    exp_sel = 0;
    for (int i = 0; i < 2000; i++) begin
      clr = ($urandom_range(0, 39) == 0);
      block_end = ($urandom_range(0, 3) == 0);
      @(posedge clk); #1;
      if (clr) exp_sel = 0;
      else if (block_end) exp_sel = ~exp_sel;
      checks++;
      if (sel !== exp_sel) begin
        failures++;
        if (failures < 10) $display("cycle %0d: sel=%0b expected %0b", i, sel, exp_sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
