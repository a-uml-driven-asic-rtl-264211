// tb_circ_buf: 3000 cycles of random read and write requests, biased in
// phases towards filling and towards draining, against a queue model. Checks
// data_out after each read, full and empty every cycle, the read-over-write
// priority, that the buffer reached full and empty, and the reset clear.
`timescale 1ns/1ps
module tb_circ_buf;
  localparam int BUFSIZE = 16;
  logic clk = 0, reset = 1, read_fifo = 0, write_fifo = 0;
  logic signed [31:0] data_in = 0, data_out;
  logic full, empty;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0, n_both = 0;
  int model[$];
  always #5 clk = ~clk;
  circ_buf dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    @(posedge clk);
    reset <= 0;
    @(posedge clk);
    for (int c = 0; c < 3000; c++) begin
      bit rd, wr;
      int v, bias;
      int exp_out;
      bias = ((c / 200) % 2 == 0) ? 8 : 2;
      wr = ($urandom_range(9) < bias);
      rd = ($urandom_range(9) >= bias);
      if ($urandom_range(15) == 0) begin rd = 1; wr = 1; end
      v = int'($urandom);
      read_fifo <= rd; write_fifo <= wr; data_in <= v;
      @(posedge clk);
      #1;
      exp_out = 0;
      if (rd && model.size() > 0) begin
        exp_out = model.pop_front();
        check(data_out == exp_out, $sformatf("cycle %0d data %0d exp %0d", c, data_out, exp_out));
        if (wr) n_both++;
      end else if (wr && model.size() < BUFSIZE) model.push_back(v);
      check(full == (model.size() == BUFSIZE) && empty == (model.size() == 0), "flags");
      if (full) n_full++;
      if (empty) n_empty++;
    end
    check(n_full > 0 && n_empty > 0 && n_both > 0, "full, empty and read-with-write reached");
    reset <= 1; read_fifo <= 0; write_fifo <= 0;
    @(posedge clk);
    #1 check(empty && !full && data_out == 0, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
