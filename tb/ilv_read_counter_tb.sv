// ilv_read_counter_tb: runs the read counter for every 802.11a/g and 802.16e
// block size and checks that it counts 0 .. Ncbps-1, flags the terminal count
// and starts again at 0; also checks a clear in mid-count.
module ilv_read_counter_tb;
  localparam int unsigned AW = 10;
  logic clk = 0, clr, tc;
  logic [AW-1:0] ncbps, count;
  int checks = 0, failures = 0;
  int unsigned sizes[12] = '{48, 96, 144, 192, 288, 384, 432, 480, 576, 4, 1000, 2};

  ilv_read_counter #(.AW(AW)) dut (.*);

  initial forever #5 clk = ~clk;
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int unsigned exp);
    checks++;
    if (count != AW'(exp) || tc != (exp == ncbps - 1)) begin
      failures++;
      if (failures < 10) $display("ncbps=%0d: count=%0d tc=%0b expected %0d", ncbps, count, tc, exp);
    end
  endtask

  initial begin
    foreach (sizes[n]) begin
      ncbps = AW'(sizes[n]);
      clr = 1;
      @(posedge clk); #1;
      clr = 0;
      for (int i = 0; i < 2 * sizes[n] + 3; i++) begin
        check(i % sizes[n]);
        @(posedge clk); #1;
      end
      // clear in mid-count
      clr = 1;
      @(posedge clk); #1;
      clr = 0;
      check(0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
