// tb_jpeg_rle: coefficient blocks in zig-zag order with chosen zero patterns
// (all zero, long runs ending in a coefficient, long runs ending in zeros,
// dense random) and random enable gaps; checks the symbol sequence of the
// full run-length encoder: (15,0) symbols directly before end of block must be removed.
`timescale 1ns/1ps
module tb_jpeg_rle;
  import jpeg_ref_pkg::*;
  localparam int NBLK = 6;
  logic clk = 0, ena = 0, rst = 1;
  logic signed [10:0] din = 0;
  logic den = 0, dfirst = 0, douten, dc_o;
  logic [3:0] rlen, size;
  logic [11:0] amp;
  
  int checks = 0, failures = 0;
  int c [NBLK][64];
  sym_t expq[$];
  sym_t gotq[$];
  int n_zrl = 0;
  always #5 clk = ~clk;
  jpeg_rle dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (!rst && douten && ena) begin
    sym_t g;
    g.rlen = int'(rlen); g.size = int'(size); g.amp = int'(amp); g.dc = dc_o;
    gotq.push_back(g);
    if (rlen == 15 && size == 0) n_zrl++;
  end

  initial begin
    foreach (c[i, j]) c[i][j] = 0;
    c[0][0] = 5;                                    // DC only: (15,0) x3 then EOB
    c[1][0] = -300; c[1][20] = 7; c[1][63] = -1;    // run 19 -> (15,0),(3,..); run 42 -> 2x(15,0),(10,..)
    c[2][0] = 1000; c[2][1] = -1; c[2][40] = 2;      // run 38 then zeros to the end
    for (int j = 0; j < 64; j++) c[3][j] = int'($urandom_range(20)) - 10;
    c[4][0] = -1023; c[4][17] = 1023; c[4][34] = -512;
    c[5][0] = 0; c[5][16] = 3;                        // run of exactly 15 then 16 zeros after
    for (int b = 0; b < NBLK; b++) rle_block(c[b], 1'b1, expq);
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int b = 0; b < NBLK; b++)
      for (int j = 0; j < 64; j++) begin
        while ($urandom_range(7) == 0) begin ena <= 0; @(posedge clk); end
        ena <= 1; den <= 1; dfirst <= (j == 0); din <= 11'(c[b][j]);
        @(posedge clk);
      end
    den <= 0; dfirst <= 0; ena <= 1;
    repeat (20) @(posedge clk);
    check(gotq.size() == expq.size(), $sformatf("%0d symbols, expected %0d", gotq.size(), expq.size()));
    foreach (expq[i]) if (i < gotq.size())
      check(gotq[i] == expq[i], $sformatf("sym %0d got (%0d,%0d,%h,%0d) exp (%0d,%0d,%h,%0d)", i,
            gotq[i].rlen, gotq[i].size, gotq[i].amp, gotq[i].dc, expq[i].rlen, expq[i].size, expq[i].amp, expq[i].dc));
    check(n_zrl > 0, "(15,0) symbols emitted");
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
