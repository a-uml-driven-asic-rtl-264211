// tb_mac_tx_block: sends three frames (payload 0, 5 and 60 bytes) through the
// transmit block and rebuilds bytes from the serial output. The line bytes
// must equal preamble, delimiter, header, payload and a reference FCS; tx_en
// must stay high without gaps for exactly eight clocks per byte; busy and
// tx_done must frame the transmission.
`timescale 1ns/1ps
module tb_mac_tx_block;
  import mac_ref_pkg::*;
  logic clk = 0, rst = 1, tx_wr = 0, tx_start = 0;
  logic [7:0] tx_data = 0;
  logic tx_full, txd, tx_en, busy, tx_done;
  int checks = 0, failures = 0;
  byte unsigned got[$];
  logic [7:0] sh;
  int nb = 0, en_cycles = 0;
  always #5 clk = ~clk;
  mac_tx_block dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (!rst && tx_en) begin
    sh = {txd, sh[7:1]};
    nb++;
    en_cycles++;
    if (nb == 8) begin got.push_back(sh); nb = 0; end
  end

  initial begin
    static int lens[3] = '{0, 5, 60};
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    foreach (lens[f]) begin
      byte unsigned body[$], line[$];
      make_body(lens[f], body);
      make_line(body, line);
      foreach (body[i]) begin tx_wr <= 1; tx_data <= body[i]; @(posedge clk); end
      tx_wr <= 0;
      check(!busy, "idle before start");
      tx_start <= 1; @(posedge clk); tx_start <= 0;
      got.delete(); nb = 0; en_cycles = 0;
      @(posedge clk);
      check(busy, "busy after start");
      wait (tx_done);
      @(posedge clk);
      while (tx_en) @(posedge clk);
      check(!busy, "idle after done");
      check(got.size() == line.size(), $sformatf("frame %0d: %0d bytes exp %0d", f, got.size(), line.size()));
      check(en_cycles == 8 * line.size(), "tx_en without gaps");
      foreach (line[i]) if (i < got.size()) check(got[i] == line[i], $sformatf("frame %0d byte %0d: %h exp %h", f, i, got[i], line[i]));
      repeat (5) @(posedge clk);
    end
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
