// circ_buf: circular-buffer FIFO of 32-bit integers.
//
// A buffer of BUFSIZE words with head and tail pointers of LOGBUFSIZE bits
// and a fill count of LOGBUFSIZE+1 bits, as in the document's class diagram.
// Every clock the FIFO looks at its commands in the order of the document's
// if / else-if: a read_fifo request on a non-empty buffer moves the oldest
// word to data_out; otherwise a write_fifo request on a non-full buffer
// stores data_in. A simultaneous read and write therefore performs only the
// read. full and empty are decoded from the registered fill count and change
// with the clock edge of each operation. A synchronous reset clears the buffer, the pointers and data_out.
// BUFSIZE must be a power of two; its default of 16 is this design's choice
// (the document leaves it to a macro without value).
module circ_buf #(
  parameter int BUFSIZE    = 16,
  parameter int LOGBUFSIZE = $clog2(BUFSIZE)
) (
  input  logic               clk,
  input  logic               reset,
  input  logic               read_fifo,
  input  logic               write_fifo,
  input  logic signed [31:0] data_in,
  output logic signed [31:0] data_out,
  output logic               full,
  output logic               empty
);
  logic signed [31:0]    buffer [BUFSIZE];
  logic [LOGBUFSIZE-1:0] headp, tailp;
  logic [LOGBUFSIZE:0]   num_in_buf;

  assign full  = (num_in_buf == (LOGBUFSIZE+1)'(BUFSIZE));
  assign empty = (num_in_buf == '0);

  always_ff @(posedge clk) begin
    if (reset) begin
      headp      <= '0;
      tailp      <= '0;
      num_in_buf <= '0;
      data_out   <= '0;
      for (int i = 0; i < BUFSIZE; i++) buffer[i] <= '0;
    end else if (read_fifo && !empty) begin
      data_out   <= buffer[headp];
      headp      <= headp + 1'b1;
      num_in_buf <= num_in_buf - 1'b1;
    end else if (write_fifo && !full) begin
      buffer[tailp] <= data_in;
      tailp         <= tailp + 1'b1;
      num_in_buf    <= num_in_buf + 1'b1;
    end
  end

  a_count: assert property (@(posedge clk) disable iff (reset) num_in_buf <= (LOGBUFSIZE+1)'(BUFSIZE));
endmodule
