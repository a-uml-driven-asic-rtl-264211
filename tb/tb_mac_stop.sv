// tb_mac_stop: random byte bursts on the serial input; checks every
// assembled byte, its timing (valid one cycle after the byte's last bit),
// that a partial byte at the end of a burst is dropped and that frame_end
// pulses once per burst.
`timescale 1ns/1ps
module tb_mac_stop;
  logic clk = 0, rst = 1;
  logic rxd, rx_dv;
  logic [7:0] data;
  logic valid, frame_end;
  int checks = 0, failures = 0, n_end = 0;
  byte unsigned expq[$];
  always #5 clk = ~clk;
  mac_stop dut (.*);
  mac_line_drv drv (.clk, .rxd, .rx_dv);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (!rst) begin
    if (valid) begin
      if (expq.size() == 0) check(0, "extra byte");
      else check(data == expq.pop_front(), "byte");
    end
    if (frame_end) n_end++;
  end

  initial begin
    repeat (2) @(posedge clk); rst <= 0; @(posedge clk);
    for (int b = 0; b < 6; b++) begin
      byte unsigned line[$];
      int n;
      line.delete();
      n = 1 + int'($urandom_range(12));
      for (int i = 0; i < n; i++) line.push_back(8'($urandom));
      foreach (line[i]) if (i < n - b % 2) expq.push_back(line[i]);
      // odd bursts lose their last byte: 4 bits of it are sent
      drv.send(line, (b % 2 != 0) ? 4 : 0);
      check(expq.size() == 0, "bytes of burst delivered");
      check(n_end == b + 1, "frame_end per burst");
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
