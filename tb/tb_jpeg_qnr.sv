// tb_jpeg_qnr: random coefficients and a random quantisation table; checks
// the table address sequence on qnt_cnt, the rounded quotient, the DC marker
// and the one-cycle latency, including a table entry of zero.
`timescale 1ns/1ps
module tb_jpeg_qnr;
  import jpeg_ref_pkg::*;
  logic clk = 0, ena = 0, rst = 1;
  logic signed [10:0] din = 0, dout;
  logic den = 0, dfirst = 0, douten, dfirst_o;
  logic [7:0] qnt_val;
  logic [5:0] qnt_cnt;
  int checks = 0, failures = 0;
  int qtab [64];
  int expq[$];
  bit expf[$];
  always #5 clk = ~clk;
  jpeg_qnr dut (.*);
  assign qnt_val = 8'(qtab[qnt_cnt]);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (!rst && douten) begin
    int e;
    e = expq.pop_front();
    check(int'(dout) == e, $sformatf("got %0d exp %0d", dout, e));
    check(dfirst_o == expf.pop_front(), "dfirst");
  end

  initial begin
    foreach (qtab[i]) qtab[i] = 1 + int'($urandom_range(254));
    qtab[5] = 0;
    repeat (3) @(posedge clk);
    rst <= 0; ena <= 1;
    for (int blk = 0; blk < 3; blk++)
      for (int k = 0; k < 64; k++) begin
        int v;
        v = int'($urandom_range(2046)) - 1023;
        din <= 11'(v); den <= 1; dfirst <= (k == 0);
        #1;
        check(qnt_cnt == 6'(k), $sformatf("qnt_cnt %0d exp %0d", qnt_cnt, k));
        expq.push_back(qdiv(v, qtab[k]));
        expf.push_back(k == 0);
        @(posedge clk);
      end
    den <= 0;
    @(posedge clk);
    #1 check(expq.size() == 0, "one cycle latency");
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
