// tb_jpeg_rzs: one zero-run suppression stage. A symbol sequence with single
// and repeated (15,0) symbols, some ended by end of block and some by a
// coefficient, is fed with random gaps. One stage may only drop the (15,0)
// symbol directly in front of an end of block; all other symbols must pass in
// order, and an ordinary symbol must leave one cycle after it entered when no
// further symbol follows.
`timescale 1ns/1ps
module tb_jpeg_rzs;
  import jpeg_pkg::*;
  logic clk = 0, ena = 0, rst = 1;
  rle_sym_t din, dout;
  logic den = 0, dc_i = 0, douten, dc_o;
  int checks = 0, failures = 0, n_drop = 0;
  rle_sym_t inq[$], expq[$], gotq[$];
  bit       dcq[$];
  always #5 clk = ~clk;
  jpeg_rzs dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic rle_sym_t s(input int r, input int z, input int a);
    return '{rlen: 4'(r), size: 4'(z), amp: 12'(a)};
  endfunction

  always @(posedge clk) if (!rst && douten) gotq.push_back(dout);

  initial begin
    // DC, (15,0), EOB | DC, (15,0),(15,0),EOB | DC,(15,0),(3,2,1),EOB | DC,(1,1,1),(15,0),(0,4,9)
    rle_sym_t seq[$];
    bit isdc[$];
    seq = '{s(0,3,5), sym_zrl(), sym_eob(), s(0,2,2), sym_zrl(), sym_zrl(), sym_eob(),
            s(0,1,1), sym_zrl(), s(3,2,1), sym_eob(), s(0,0,0), s(1,1,1), sym_zrl(), s(0,4,9)};
    isdc = '{1,0,0,1,0,0,0,1,0,0,0,1,0,0,0};
    foreach (seq[i]) begin
      bit drop;
      drop = seq[i] == sym_zrl() && i + 1 < seq.size() && seq[i+1] == sym_eob() && !isdc[i+1];
      if (drop) n_drop++; else expq.push_back(seq[i]);
    end
    repeat (3) @(posedge clk);
    rst <= 0; ena <= 1;
    foreach (seq[i]) begin
      repeat ($urandom_range(2)) begin den <= 0; @(posedge clk); end
      den <= 1; din <= seq[i]; dc_i <= isdc[i];
      @(posedge clk);
    end
    den <= 0;
    @(posedge clk);
    #1 check(douten && dout == seq[seq.size()-1], "last ordinary symbol leaves after one cycle");
    repeat (5) @(posedge clk);
    check(gotq.size() == expq.size(), $sformatf("%0d symbols, expected %0d", gotq.size(), expq.size()));
    foreach (expq[i]) if (i < gotq.size()) check(gotq[i] == expq[i], $sformatf("sym %0d", i));
    check(n_drop == 2, "two drops in the sequence");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
