// tb_mac_tx_core: drives the transmit core's selection inputs as the
// controller would: preamble, delimiter, header and payload bytes, then the
// four FCS bytes, and compares every byte (the FCS with a bit-serial
// reference) for three frames.
`timescale 1ns/1ps
module tb_mac_tx_core;
  import mac_ref_pkg::*;
  logic clk = 0, rst = 1, start = 0, next = 0;
  logic [1:0] sel = 0, fcs_idx = 0;
  logic [7:0] fifo_data = 0, byte_out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  mac_tx_core dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic put(input logic [1:0] s, input logic [1:0] idx, input byte unsigned d, input byte unsigned exp);
    @(negedge clk);
    sel = s; fcs_idx = idx; fifo_data = d; next = 1;
    #1;
    check(byte_out == exp, $sformatf("sel %0d idx %0d: %h exp %h", s, idx, byte_out, exp));
    @(negedge clk);
    next = 0;
    repeat ($urandom_range(2)) @(negedge clk);
  endtask

  initial begin
    @(posedge clk); rst <= 0;
    for (int f = 0; f < 3; f++) begin
      byte unsigned body[$], line[$];
      make_body(10 * f + 3, body);
      make_line(body, line);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      for (int i = 0; i < 7; i++) put(0, 0, 8'hAA, 8'h55);
      put(1, 0, 8'hAA, 8'hD5);
      foreach (body[i]) put(2, 0, body[i], body[i]);
      for (int i = 0; i < 4; i++) put(3, 2'(i), 8'h00, line[line.size()-4+i]);
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
