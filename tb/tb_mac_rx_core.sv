// tb_mac_rx_core: feeds line bytes directly (as StoP would deliver them,
// with random spacing) into the receive core: good frames, a wrong FCS, a
// wrong delimiter, a length above 1500 and a frame ended early. Checks the
// bytes forwarded to the FIFO and one frame_ok or frame_err per frame.
`timescale 1ns/1ps
module tb_mac_rx_core;
  import mac_ref_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, frame_end = 0;
  logic [7:0] in_data = 0, out_data;
  logic out_wr, frame_ok, frame_err;
  int checks = 0, failures = 0, n_ok = 0, n_err = 0;
  byte unsigned expq[$];
  always #5 clk = ~clk;
  mac_rx_core dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (!rst) begin
    if (out_wr) begin
      if (expq.size() == 0) check(0, "extra byte");
      else check(out_data == expq.pop_front(), "forwarded byte");
    end
    if (frame_ok) n_ok++;
    if (frame_err) n_err++;
  end

  task automatic frame(input int len, input int kind);
    byte unsigned body[$], line[$];
    int ok0, err0, n;
    make_body(len, body);
    if (kind == 3) begin body[12] = 8'h05; body[13] = 8'hDD; end   // length 1501
    make_line(body, line);
    if (kind == 1) line[line.size()-2] ^= 8'h80;
    if (kind == 2) line[7] = 8'hD4;
    n = (kind == 4) ? line.size() - 9 : line.size();
    ok0 = n_ok; err0 = n_err;
    case (kind)
      0, 1: foreach (body[i]) expq.push_back(body[i]);
      3:    for (int i = 0; i < 14; i++) expq.push_back(body[i]);
      4:    for (int i = 0; i < n - 8; i++) expq.push_back(body[i]);
      default: ;
    endcase
    for (int i = 0; i < n; i++) begin
      @(negedge clk); in_valid = 1; in_data = line[i];
      @(negedge clk); in_valid = 0;
      repeat ($urandom_range(3)) @(negedge clk);
    end
    frame_end = 1; @(negedge clk); frame_end = 0;
    repeat (3) @(negedge clk);
    check(n_ok - ok0 == int'(kind == 0), $sformatf("ok count kind %0d", kind));
    check(n_err - err0 == int'(kind != 0), $sformatf("err count kind %0d", kind));
    check(expq.size() == 0, $sformatf("forwarded bytes kind %0d", kind));
    expq.delete();
  endtask

  initial begin
    repeat (2) @(posedge clk); rst <= 0; @(posedge clk);
    frame(3, 0);
    frame(17, 1);
    frame(0, 0);
    frame(9, 2);
    frame(4, 3);
    frame(40, 4);
    frame(50, 0);
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
