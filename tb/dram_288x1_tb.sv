// dram_288x1_tb: checks the 288 x 1 distributed-RAM memory: every one of the
// 288 locations is written with a random bit and read back (which exercises
// all five banks and the write-enable decoder), then random mixed traffic is
// checked against an array model, with asynchronous read.
module dram_288x1_tb;
  logic clk = 0, we, d, q;
  logic [8:0] a;
  logic model [288];
  int checks = 0, failures = 0;

  dram_288x1 dut (.*);

  initial forever #5 clk = ~clk;
  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd(int unsigned addr);
    we = 0; a = 9'(addr); #1;
    checks++;
    if (q !== model[addr]) begin
      failures++;
      if (failures < 10) $display("a=%0d q=%0b expected %0b", addr, q, model[addr]);
    end
  endtask

  initial begin
    for (int i = 0; i < 288; i++) begin
      we = 1; a = 9'(i); d = 1'($urandom); model[i] = d;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 288; i++) rd(i);
    // reverse fill with the complement: detects aliasing between banks
    for (int i = 287; i >= 0; i--) begin
      we = 1; a = 9'(i); d = ~model[i]; model[i] = d;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 288; i++) rd(i);
    for (int i = 0; i < 3000; i++) begin
      int unsigned addr;
      addr = $urandom_range(0, 287);
      if ($urandom_range(0, 1) == 1) begin
        we = 1; a = 9'(addr); d = 1'($urandom);
        @(posedge clk); #1;
        model[addr] = d;
      end else begin
        rd(addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
