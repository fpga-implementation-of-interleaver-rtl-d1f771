// bram_16kx1_tb: checks the 16K x 1 block RAM model. All locations are
// written with random bits, then read back with a new address every cycle
// (the 288 locations the interleaver uses first, then random ones, with
// occasional writes in between); the data of an address must appear on q one
// clock after the address.
module bram_16kx1_tb;
  logic clk = 0, we, d, q;
  logic [13:0] a;
  logic model [16384];
  int checks = 0, failures = 0;

  bram_16kx1 dut (.*);

  initial forever #5 clk = ~clk;
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16384; i++) begin
      we = 1; a = 14'(i); d = 1'($urandom); model[i] = d;
      @(posedge clk); #1;
    end
    we = 0; a = 14'd0;
    @(posedge clk); #1;
    for (int i = 1; i < 6000; i++) begin
      logic [13:0] prev;
      prev = a;
      a = 14'((i < 288) ? i : $urandom_range(0, 16383));
      checks++;
      if (q !== model[prev]) begin
        failures++;
        if (failures < 10) $display("a=%0d q=%0b expected %0b", prev, q, model[prev]);
      end
      @(posedge clk); #1;
      if ($urandom_range(0, 3) == 0) begin
        // one write, then the current address is presented again
        we = 1; prev = a; a = 14'($urandom_range(0, 16383)); d = 1'($urandom);
        @(posedge clk); #1;
        model[a] = d; we = 0; a = prev;
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
