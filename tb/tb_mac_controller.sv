// tb_mac_controller: loopback test of the MAC controller. The serial output
// is wired back to the serial input. Five frames (payload lengths 0, 1, 46,
// 100 and 300) are written to the transmit FIFO and sent; every received
// header and payload byte is compared with what was sent and every frame must
// end with frame_ok. A sixth frame has one bit inverted on the wire and must
// end with frame_err; its bytes, which stay in the FIFO, are read as well. The transmit time of each frame must be exactly eight
// clocks per line byte.
`timescale 1ns/1ps
module tb_mac_controller;
  import mac_ref_pkg::*;
  logic clk = 0, rst = 1, tx_enable = 0, rx_enable = 0, tx_wr = 0, tx_start = 0, rx_rd = 0;
  logic [7:0] tx_data = 0, rx_data;
  logic tx_full, txd, tx_en, tx_busy, tx_done, rx_empty, rx_frame_ok, rx_frame_err;
  logic rxd, rx_dv;
  logic corrupt = 0;
  int bitpos = 0, flip_at = -1;
  int checks = 0, failures = 0, n_ok = 0, n_err = 0, txcycles = 0;
  byte unsigned expq[$];
  always #5 clk = ~clk;
  mac_controller dut (.*);

  // loopback wire, optionally inverting one bit
  assign rx_dv = tx_en;
  assign rxd   = txd ^ (corrupt && bitpos == flip_at);
  always @(posedge clk) if (tx_en) bitpos <= bitpos + 1; else bitpos <= 0;
  always @(posedge clk) if (tx_en) txcycles++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) begin
    if (!rst && rx_frame_ok) n_ok++;
    if (!rst && rx_frame_err) n_err++;
  end

  // host reads the receive FIFO
  always @(posedge clk) begin
    if (!rst && rx_rd && !rx_empty) begin
      if (expq.size() == 0) check(0, "unexpected byte");
      else begin
        byte unsigned e;
        e = expq.pop_front();
        check(rx_data == e, $sformatf("rx byte %h exp %h", rx_data, e));
      end
    end
    rx_rd <= ($urandom_range(1) == 0);
  end

  task automatic send(input int len, input bit bad);
    byte unsigned body[$], line[$];
    make_body(len, body);
    make_line(body, line);
    // a failed frame's bytes stay in the FIFO, with the inverted bit
    foreach (body[i]) expq.push_back((bad && i == 22) ? (body[i] ^ 8'h08) : body[i]);
    corrupt = bad;
    flip_at = 8 * 30 + 3;
    foreach (body[i]) begin
      tx_wr <= 1; tx_data <= body[i];
      @(posedge clk);
    end
    tx_wr <= 0;
    tx_start <= 1;
    @(posedge clk);
    tx_start <= 0;
    txcycles = 0;
    wait (tx_done);
    @(posedge clk);
    while (tx_en) @(posedge clk);
    check(txcycles == 8 * line.size(), $sformatf("tx time %0d for %0d bytes", txcycles, line.size()));
    repeat (20) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0; tx_enable <= 1; rx_enable <= 1;
    send(0, 0);
    send(1, 0);
    send(46, 0);
    send(100, 0);
    send(300, 0);
    send(20, 1);
    corrupt = 0;
    repeat (2000) @(posedge clk);
    check(n_ok == 5, $sformatf("%0d frames ok", n_ok));
    check(n_err == 1, $sformatf("%0d frames in error", n_err));
    check(expq.size() == 0, $sformatf("%0d bytes not received", expq.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
