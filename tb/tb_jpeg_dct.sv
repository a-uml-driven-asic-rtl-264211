// tb_jpeg_dct: checks the 8x8 DCT against a floating-point DCT (tolerance 2)
// for four random blocks streamed back to back, the zig-zag output order, the
// DC marker, and the timing: the first coefficient of a block appears in the
// cycle after the block's last sample and each block takes 64 cycles.
`timescale 1ns/1ps
module tb_jpeg_dct;
  import jpeg_ref_pkg::*;
  localparam int NBLK = 4;
  logic clk = 0, ena = 0, rst = 1, dstrb = 0;
  logic [7:0] din = 0;
  logic signed [10:0] dout;
  logic douten, dfirst;
  int checks = 0, failures = 0;
  int pix [NBLK][64];
  int zz [64];
  int n = 0, b = 0, cyc = 0;
  always #5 clk = ~clk;
  jpeg_dct dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic lastflag = 0;
  int last_in = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (lastflag) last_in <= cyc;

  always @(posedge clk) if (!rst && douten && b < NBLK) begin
    real f[64], e;
    real_dct(pix[b], f);
    e = real'(dout) - f[zz[n]];
    check(e < 2.0 && e > -2.0, $sformatf("blk %0d n %0d got %0d exp %f", b, n, dout, f[zz[n]]));
    check(dfirst == (n == 0), "dfirst");
    if (n == 0) check(cyc == last_in + 1, $sformatf("latency blk %0d: %0d", b, cyc - last_in));
    n++;
    if (n == 64) begin n = 0; b++; end
  end

  initial begin
    zigzag(zz);
    foreach (pix[i, j]) pix[i][j] = int'($urandom_range(255));
    repeat (3) @(posedge clk);
    rst <= 0; ena <= 1;
    for (int i = 0; i < NBLK; i++)
      for (int j = 0; j < 64; j++) begin
        dstrb <= (i == 0 && j == 0);
        din <= 8'(pix[i][j]);
        lastflag <= (j == 63);
        @(posedge clk);
      end
    dstrb <= 0;
    lastflag <= 0;
    repeat (100) @(posedge clk);
    check(b == NBLK, "all blocks out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
