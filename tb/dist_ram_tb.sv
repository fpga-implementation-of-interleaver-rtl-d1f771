// dist_ram_tb: random writes and reads of a 64 x 1 and a 32 x 1 distributed
// RAM against an array model; the read is checked in the same cycle as the
// address (asynchronous read).
module dist_ram_tb;
  logic clk = 0;
  logic we64, d64, q64, we32, d32, q32;
  logic [5:0] a64;
  logic [4:0] a32;
  logic m64 [64];
  logic m32 [32];
  int checks = 0, failures = 0;

  dist_ram #(.DEPTH(64)) dut64 (.clk, .we(we64), .a(a64), .d(d64), .q(q64));
  dist_ram #(.DEPTH(32)) dut32 (.clk, .we(we32), .a(a32), .d(d32), .q(q32));

  initial forever #5 clk = ~clk;
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill both
    for (int i = 0; i < 64; i++) begin
      we64 = 1; a64 = 6'(i); d64 = 1'($urandom); m64[i] = d64;
      we32 = (i < 32); a32 = 5'(i); d32 = 1'($urandom);
      if (i < 32) m32[i] = d32;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 3000; i++) begin
      we64 = 1'($urandom); a64 = 6'($urandom); d64 = 1'($urandom);
      we32 = 1'($urandom); a32 = 5'($urandom); d32 = 1'($urandom);
      #1;
      checks += 2;
      if (q64 !== m64[a64]) begin failures++; $display("64x1 a=%0d q=%0b", a64, q64); end
      if (q32 !== m32[a32]) begin failures++; $display("32x1 a=%0d q=%0b", a32, q32); end
      @(posedge clk); #1;
      if (we64) m64[a64] = d64;
      if (we32) m32[a32] = d32;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
