// tb_mac_rx_block: serial frames into the receive block: three good frames
// (payload 0, 7 and 64 bytes), one with a wrong FCS, one with a broken
// preamble and one cut short in the payload. Good frames must give frame_ok
// and their header and payload bytes in the FIFO; each bad one exactly one
// frame_err.
`timescale 1ns/1ps
module tb_mac_rx_block;
  import mac_ref_pkg::*;
  logic clk = 0, rst = 1, rx_rd = 0;
  logic rxd, rx_dv, rx_empty, frame_ok, frame_err;
  logic [7:0] rx_data;
  int checks = 0, failures = 0, n_ok = 0, n_err = 0;
  byte unsigned expq[$];
  always #5 clk = ~clk;
  mac_rx_block dut (.*);
  mac_line_drv drv (.clk, .rxd, .rx_dv);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (!rst) begin
    if (frame_ok) n_ok++;
    if (frame_err) n_err++;
  end

  task automatic drain();
    while (!rx_empty) begin
      if (expq.size() == 0) begin check(0, "extra byte"); end
      else check(rx_data == expq.pop_front(), "rx byte");
      rx_rd <= 1; @(posedge clk); rx_rd <= 0; @(posedge clk);
    end
    check(expq.size() == 0, "all bytes present");
    expq.delete();
  endtask

  task automatic frame(input int len, input int kind);
    byte unsigned body[$], line[$];
    int ok0, err0;
    make_body(len, body);
    make_line(body, line);
    ok0 = n_ok; err0 = n_err;
    if (kind == 1) line[line.size()-1] ^= 8'h01;     // bad FCS
    if (kind == 2) line[3] = 8'h54;                  // bad preamble
    drv.send(line, (kind == 3) ? 80 : 0);
    check(n_ok - ok0 == int'(kind == 0), $sformatf("frame_ok count, kind %0d", kind));
    check(n_err - err0 == int'(kind != 0), $sformatf("frame_err count, kind %0d", kind));
    if (kind != 2) foreach (body[i]) if (kind != 3 || i < body.size() - 6) expq.push_back(body[i]);
    drain();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    frame(0, 0);
    frame(7, 0);
    frame(20, 1);
    frame(64, 0);
    frame(10, 2);
    frame(30, 3);
    frame(5, 0);
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
