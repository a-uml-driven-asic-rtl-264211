// tb_vp3_quantize: blocks of random coefficients (small, large enough to hit
// the +-511 limit, and negative) with random reciprocals, sent back to
// back and with gaps. Checks every output value against the reference
// quantiser, the zig-zag order, out_first on the first value and 64
// outputs per block.
`timescale 1ns/1ps
module tb_vp3_quantize;
  import vp3_ref_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [15:0] coef = 0;
  logic [15:0] recip = 0;
  logic out_valid, out_first;
  logic signed [9:0] qcoef;
  int checks = 0, failures = 0, n_clip = 0, n_first = 0;
  int expq[$];
  int out_idx = 0;
  always #5 clk = ~clk;
  vp3_quantize dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (!rst && out_valid) begin
    check(out_first == (out_idx % 64 == 0), "out_first marks the DC value");
    if (out_first) n_first++;
    if (expq.size() == 0) check(0, "output without block");
    else check(int'(qcoef) == expq.pop_front(), $sformatf("value %0d", qcoef));
    out_idx++;
  end

  task automatic run(input bit gaps);
    blk_t c, r, q;
    foreach (c[i]) begin
      case ($urandom_range(3))
        0: c[i] = int'($urandom_range(60)) - 30;
        1: c[i] = int'($urandom_range(4000)) - 2000;
        2: c[i] = int'($urandom_range(65535)) - 32768;
        default: c[i] = 0;
      endcase
      r[i] = 1 + int'($urandom_range(65534));
      q[i] = quant(c[i], r[i], 511);
      if (q[i] == 511 || q[i] == -511) n_clip++;
    end
    for (int n = 0; n < 64; n++) expq.push_back(q[zz(n)]);
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      in_valid = 1; coef = 16'(c[i]); recip = 16'(r[i]);
      @(negedge clk);
      in_valid = 0;
      if (gaps && $urandom_range(3) == 0) @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int b = 0; b < 8; b++) run(b % 2 != 0);
    repeat (70) @(negedge clk);
    check(expq.size() == 0 && out_idx == 8 * 64, "64 outputs per block");
    check(n_first == 8 && n_clip > 0, "all blocks started, limit reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
