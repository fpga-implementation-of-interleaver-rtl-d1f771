// wlan_ilv_memory_tb: checks the ping-pong interleaver memory in both RAM
// styles. Blocks of 288 bits are written at a random permutation of the
// addresses while the other RAM is read linearly; sel toggles every block.
// The distributed-RAM instance must return the read RAM's bit in the same
// cycle, the block-RAM instance one cycle later. Both are compared with two
// array models of RAM-1 and RAM-2.
module wlan_ilv_memory_tb;
  import ilv_pkg::*;
  localparam int unsigned N = 288;
  logic clk = 0, raw_data, sel, out_d, out_b;
  logic [8:0] read_address, write_address;
  logic ram1 [N];
  logic ram2 [N];
  int unsigned perm [N];
  logic exp_b;
  int checks = 0, failures = 0;

  wlan_ilv_memory #(.MEM_STYLE(MEM_DRAM)) dut_d (.clk, .raw_data, .sel, .read_address,
    .write_address, .interleaved_data(out_d));
  wlan_ilv_memory #(.MEM_STYLE(MEM_BRAM)) dut_b (.clk, .raw_data, .sel, .read_address,
    .write_address, .interleaved_data(out_b));

  initial forever #5 clk = ~clk;
  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel = 0;
    for (int blk = 0; blk < 6; blk++) begin
      for (int i = 0; i < N; i++) perm[i] = i;
      perm.shuffle();
      for (int i = 0; i < N; i++) begin
        logic exp_d;
        read_address = 9'(i); write_address = 9'(perm[i]); raw_data = 1'($urandom);
        #1;
        exp_d = sel ? ram2[i] : ram1[i];
        if (blk > 0) begin
          checks++;
          if (out_d !== exp_d) begin
            failures++;
            if (failures < 10) $display("DRAM blk %0d r=%0d out=%0b exp=%0b", blk, i, out_d, exp_d);
          end
        end
        @(posedge clk); #1;
        if (sel) ram1[perm[i]] = raw_data; else ram2[perm[i]] = raw_data;
        if (blk > 0) begin
          checks++;
          if (out_b !== exp_d) begin
            failures++;
            if (failures < 10) $display("BRAM blk %0d r=%0d out=%0b exp=%0b", blk, i, out_b, exp_d);
          end
        end
        if (i == N - 1) sel = ~sel;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
