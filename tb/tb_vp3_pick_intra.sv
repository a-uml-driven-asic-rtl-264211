// tb_vp3_pick_intra: runs the walker on a CIF frame (22 x 18 macroblocks,
// the default) and on a 5 x 3 frame whose edge superblocks stick out. A
// mode table model starts with random non-intra modes; after each run every
// entry must be intra and written exactly once, the writes must come in
// superblock order (worked out here independently), the run must take four
// clocks per superblock, and done must pulse once.
`timescale 1ns/1ps
module tb_vp3_pick_intra;
  logic clk = 0, reset = 1, start = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic busy_a, wr_a, done_a, busy_b, wr_b, done_b;
  logic [15:0] idx_a, idx_b;
  logic [3:0] mode_a, mode_b;
  vp3_pick_intra dut_a (.clk, .reset, .start, .busy(busy_a), .wr(wr_a), .mb_index(idx_a), .mode(mode_a), .done(done_a));
  vp3_pick_intra #(.MB_COLS(5), .MB_ROWS(3)) dut_b (.clk, .reset, .start, .busy(busy_b), .wr(wr_b), .mb_index(idx_b), .mode(mode_b), .done(done_b));

  int table_a[22 * 18], table_b[5 * 3], wcount_a[22 * 18], wcount_b[5 * 3];
  int order_a[$], order_b[$];
  int n_done_a = 0, n_done_b = 0;
  always @(posedge clk) if (!reset) begin
    if (wr_a) begin table_a[int'(idx_a)] = int'(mode_a); wcount_a[int'(idx_a)]++; order_a.push_back(int'(idx_a)); end
    if (wr_b) begin table_b[int'(idx_b)] = int'(mode_b); wcount_b[int'(idx_b)]++; order_b.push_back(int'(idx_b)); end
    if (done_a) n_done_a++;
    if (done_b) n_done_b++;
  end

  function automatic void expected(input int cols, input int rows, ref int q[$]);
    q.delete();
    for (int sr = 0; sr < (rows + 1) / 2; sr++)
      for (int sc = 0; sc < (cols + 1) / 2; sc++)
        for (int s = 0; s < 4; s++) begin
          int x = 2 * sc + s % 2, y = 2 * sr + s / 2;
          if (x < cols && y < rows) q.push_back(y * cols + x);
        end
  endfunction

  initial begin
    int exp_a[$], exp_b[$];
    int cyc_a, cyc_b, t;
    repeat (2) @(negedge clk);
    reset = 0;
    for (int run = 0; run < 2; run++) begin
      foreach (table_a[i]) begin table_a[i] = 2 + int'($urandom_range(6)); wcount_a[i] = 0; end
      foreach (table_b[i]) begin table_b[i] = 2 + int'($urandom_range(6)); wcount_b[i] = 0; end
      order_a.delete(); order_b.delete(); n_done_a = 0; n_done_b = 0;
      @(negedge clk);
      start = 1; @(negedge clk); start = 0;
      check(busy_a && busy_b, "busy after start");
      cyc_a = 0; cyc_b = 0; t = 1;
      while ((busy_a || busy_b) && t < 2000) begin
        if (busy_a) cyc_a++;
        if (busy_b) cyc_b++;
        // a second start while busy must be ignored
        start = (t == 3);
        @(negedge clk); t++;
        start = 0;
      end
      @(negedge clk);
      check(cyc_a == 4 * 11 * 9, $sformatf("CIF walk took %0d clocks", cyc_a));
      check(cyc_b == 4 * 3 * 2, $sformatf("5x3 walk took %0d clocks", cyc_b));
      check(n_done_a == 1 && n_done_b == 1, "one done per walk");
      foreach (table_a[i]) check(table_a[i] == 1 && wcount_a[i] == 1, $sformatf("CIF MB %0d mode %0d writes %0d", i, table_a[i], wcount_a[i]));
      foreach (table_b[i]) check(table_b[i] == 1 && wcount_b[i] == 1, $sformatf("5x3 MB %0d mode %0d writes %0d", i, table_b[i], wcount_b[i]));
      expected(22, 18, exp_a);
      expected(5, 3, exp_b);
      check(order_a == exp_a, "CIF superblock order");
      check(order_b == exp_b, "5x3 superblock order");
    end
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
