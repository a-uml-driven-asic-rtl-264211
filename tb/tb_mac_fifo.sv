// tb_mac_fifo: random simultaneous reads and writes on an 8-deep byte FIFO
// against a queue model, with phases that fill and drain it; checks the
// fall-through data, full, empty and that overflowing writes and
// underflowing reads are ignored.
`timescale 1ns/1ps
module tb_mac_fifo;
  localparam int DEPTH = 8;
  logic clk = 0, rst = 1, wr_en = 0, rd_en = 0;
  logic [7:0] wr_data = 0, rd_data;
  logic full, empty;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  byte unsigned model[$];
  always #5 clk = ~clk;
  mac_fifo #(.DEPTH(DEPTH), .W(8)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    @(posedge clk); rst <= 0; @(posedge clk);
    for (int c = 0; c < 2000; c++) begin
      bit w, r;
      byte unsigned d;
      int bias;
      bias = ((c / 100) % 2 == 0) ? 7 : 3;
      w = $urandom_range(9) < bias;
      r = $urandom_range(9) >= bias;
      d = 8'($urandom);
      #1;
      check(empty == (model.size() == 0) && full == (model.size() == DEPTH), "flags");
      if (model.size() > 0) check(rd_data == model[0], "head data");
      if (full) n_full++;
      if (empty) n_empty++;
      wr_en <= w; rd_en <= r; wr_data <= d;
      @(posedge clk);
      begin
        bit do_r, do_w;
        do_r = r && model.size() > 0;
        do_w = w && model.size() < DEPTH;
        if (do_r) void'(model.pop_front());
        if (do_w) model.push_back(d);
      end
    end
    check(n_full > 0 && n_empty > 0, "reached full and empty");
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
