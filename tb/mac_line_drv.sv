// mac_line_drv: testbench helper that puts a byte sequence on a serial
// line, least significant bit first, one bit per clock, with rx_dv high.
// The last `trunc_bits` bits are not sent, which models a frame cut short.
`timescale 1ns/1ps
module mac_line_drv (
  input  logic clk,
  output logic rxd,
  output logic rx_dv
);
  initial begin rxd = 0; rx_dv = 0; end
  task automatic send(input byte unsigned line[$], input int trunc_bits);
    for (int n = 0; n < 8 * line.size() - trunc_bits; n++) begin
      rxd <= line[n / 8][n % 8]; rx_dv <= 1;
      @(posedge clk);
    end
    rx_dv <= 0; rxd <= 0;
    repeat (10) @(posedge clk);
  endtask
endmodule
