// tb_vp3_clear_down_qfrag_data: clears stores of 1, 3 and 0 fragments and
// one more with enable pulsed again while busy. A 256-word model memory
// filled with non-zero data is written through addr/dataout on every
// output_data_ready; afterwards exactly the words of the requested
// fragments must be zero, the rest untouched, and busy must be low.
`timescale 1ns/1ps
module tb_vp3_clear_down_qfrag_data;
  logic clk = 0, reset = 1, enable = 0;
  logic [31:0] datain = 0, dataout, addr;
  logic output_data_ready, busy;
  logic [31:0] mem [256];
  int checks = 0, failures = 0, n_wr = 0;
  always #5 clk = ~clk;
  vp3_clear_down_qfrag_data dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (!reset && output_data_ready) begin
    n_wr++;
    if (addr < 256) mem[addr[7:0]] <= dataout;
    else check(0, "address beyond the requested fragments");
  end

  task automatic run(input int nfrag, input bit poke);
    int w0, waited;
    foreach (mem[i]) mem[i] = 32'hA5A5_0000 + 32'(i);
    w0 = n_wr;
    @(negedge clk);
    enable = 1; datain = 32'(nfrag);
    @(negedge clk);
    enable = 0; datain = 32'd1;
    if (poke) begin repeat (5) @(negedge clk); enable = 1; @(negedge clk); enable = 0; end
    waited = 0;
    while (busy && waited < 1000) begin @(negedge clk); waited++; end
    @(negedge clk);
    check(!busy && !output_data_ready, "finished");
    check(n_wr - w0 == 64 * nfrag, $sformatf("%0d writes for %0d fragments", n_wr - w0, nfrag));
    foreach (mem[i])
      check(mem[i] == ((i < 64 * nfrag) ? 32'd0 : 32'hA5A5_0000 + 32'(i)), $sformatf("word %0d", i));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    run(1, 0);
    run(3, 0);
    run(0, 0);
    run(2, 1);
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
