// dram_288x1: 288 x 1 interleaver RAM assembled from distributed RAM.
//
// 288 bits, the largest 802.11a/g block (64-QAM), are covered by four 64 x 1
// and one 32 x 1 LUT RAMs, following the original design, with a 3-to-5 decoder
// producing their write enables. The decoder input is a[8:6], this design's
// choice: bank b (b = 0..3) holds addresses 64b .. 64b+63, bank 4 (32 x 1)
// holds 256 .. 287. The read data is taken from the bank a[8:6] points at.
// Write: synchronous, we = 1. Read: asynchronous. Addresses 288 .. 511 are
// never produced by the address generator; 288 .. 319 alias onto bank 4 and
// 320 .. 511 write nothing and read 0.
module dram_288x1 (
  input  logic       clk,
  input  logic       we,
  input  logic [8:0] a,
  input  logic       d,
  output logic       q
);
  logic [4:0] bank_we;
  logic [4:0] bank_q;

  // 3-to-5 write-enable decoder
  always_comb begin
    bank_we = '0;
    if (a[8:6] <= 3'd4) bank_we[a[8:6]] = we;
  end

  for (genvar b = 0; b < 4; b++) begin : g_bank64
    dist_ram #(.DEPTH(64)) u_ram (
      .clk(clk), .we(bank_we[b]), .a(a[5:0]), .d(d), .q(bank_q[b])
    );
  end

  dist_ram #(.DEPTH(32)) u_ram32 (
    .clk(clk), .we(bank_we[4]), .a(a[4:0]), .d(d), .q(bank_q[4])
  );

  always_comb begin
    q = 1'b0;
    if (a[8:6] <= 3'd4) q = bank_q[a[8:6]];
  end
endmodule
