// tb_mac_ptos: loads random bytes, sometimes back to back and sometimes with
// idle gaps, and checks the serial bit order (LSB first), tx_en and that
// ready allows a new byte during the last bit without a gap.
`timescale 1ns/1ps
module tb_mac_ptos;
  logic clk = 0, rst = 1, load = 0;
  logic [7:0] data = 0;
  logic ready, txd, tx_en;
  int checks = 0, failures = 0;
  bit expbits[$];
  always #5 clk = ~clk;
  mac_ptos dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (!rst) begin
    if (expbits.size() > 0 && tx_en) check(txd == expbits.pop_front(), "bit");
    else check(!tx_en, "tx_en only while sending");
  end

  initial begin
    @(posedge clk); rst <= 0; @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      byte unsigned d;
      d = 8'($urandom);
      @(negedge clk);
      while (!ready) @(negedge clk);
      load = 1; data = d;
      for (int k = 0; k < 8; k++) expbits.push_back(d[k]);
      @(negedge clk);
      load = 0;
      if (i % 5 == 4) repeat (12) @(posedge clk);
    end
    repeat (12) @(posedge clk);
    check(expbits.size() == 0, "all bits sent");
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
