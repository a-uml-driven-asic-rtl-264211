// fft_module: 16-point complex FFT with handshaked input and output.
//
// The behaviour follows the document's activity diagram: after reset the
// module requests and reads 16 samples, computes the transform in
// M = log2(16) = 4 butterfly stages and writes the 16 transform values, then
// starts over. Input: data_req is raised while a sample is wanted; a sample
// (in_real, in_imag) is taken in each cycle in which data_req and data_valid
// are both high. Output: data_ready is raised with a value on
// out_real/out_imag, and the value is consumed in a cycle in which data_ready
// and data_ack are both high; values leave in natural frequency order.
// The transform is a radix-2 decimation in frequency, in place, one butterfly
// per cycle (32 cycles for the four stages): a' = a + b, b' = (a - b) * W^k
// with twiddle factors cos/sin(2 pi k / 16) in Q14, products rounded to
// nearest. Results are not scaled, so X[k] = sum x[n] e^(-j 2 pi nk/16) and
// inputs must be small enough (|x| <= 2047) for 16-bit results. The
// algorithm, fixed-point format, scaling and handshake timing are this
// design's choices; the ports and the 16-sample loops are the document's.
module fft_module #(
  parameter int N = 16
) (
  input  logic               clk,
  input  logic               reset,
  input  logic signed [15:0] in_real,
  input  logic signed [15:0] in_imag,
  input  logic               data_valid,
  input  logic               data_ack,
  output logic signed [15:0] out_real,
  output logic signed [15:0] out_imag,
  output logic               data_req,
  output logic               data_ready
);
  localparam int M = $clog2(N);
  typedef enum logic [1:0] {READ, COMPUTE, WRITE} phase_t;

  phase_t              phase;
  logic signed [15:0]  re [N];
  logic signed [15:0]  im [N];
  logic [M-1:0]        index;
  logic [$clog2(M)-1:0] stage;
  logic [M-2:0]        bfly;
  logic signed [15:0]  wr [N/2];
  logic signed [15:0]  wi [N/2];

  // twiddle table W^k = cos(2 pi k/N) - j sin(2 pi k/N), Q14, for N = 16
  initial begin
    for (int k = 0; k < N / 2; k++) begin
      wr[k] = 16'(int'($floor(16384.0 * $cos(6.283185307179586 * k / N) + 0.5)));
      wi[k] = 16'(int'($floor(-16384.0 * $sin(6.283185307179586 * k / N) + 0.5)));
    end
  end

  function automatic logic [M-1:0] bitrev(input logic [M-1:0] v);
    logic [M-1:0] r;
    for (int i = 0; i < M; i++) r[i] = v[M-1-i];
    return r;
  endfunction

  // butterfly addresses for the current stage and butterfly number
  logic [M-1:0]        span, j, i0, i1;
  logic [M-2:0]        tw;
  logic signed [15:0]  ar, ai, br, bi, dr, di;
  logic signed [15:0]  pr, pi;

  always_comb begin
    span = M'(N >> (int'(stage) + 1));
    j    = M'(bfly) & (span - 1'b1);
    i0   = ((M'(bfly) - j) << 1) + j;
    i1   = i0 + span;
    tw   = (M-1)'(j << stage);
    ar = re[i0]; ai = im[i0]; br = re[i1]; bi = im[i1];
    dr = ar - br;
    di = ai - bi;
    pr = 16'((32'(dr) * wr[tw] - 32'(di) * wi[tw] + 32'sd8192) >>> 14);
    pi = 16'((32'(dr) * wi[tw] + 32'(di) * wr[tw] + 32'sd8192) >>> 14);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      phase <= READ;
      index <= '0;
      stage <= '0;
      bfly  <= '0;
      for (int i = 0; i < N; i++) begin
        re[i] <= '0;
        im[i] <= '0;
      end
    end else begin
      case (phase)
        READ: if (data_valid) begin
          re[index] <= in_real;
          im[index] <= in_imag;
          index     <= index + 1'b1;
          if (index == M'(N - 1)) begin
            phase <= COMPUTE;
            stage <= '0;
            bfly  <= '0;
          end
        end
        COMPUTE: begin
          re[i0] <= ar + br;
          im[i0] <= ai + bi;
          re[i1] <= pr;
          im[i1] <= pi;
          bfly   <= bfly + 1'b1;
          if (bfly == '1) begin
            stage <= stage + 1'b1;
            if (stage == ($clog2(M))'(M - 1)) begin
              phase <= WRITE;
              index <= '0;
            end
          end
        end
        WRITE: if (data_ack) begin
          index <= index + 1'b1;
          if (index == M'(N - 1)) phase <= READ;
        end
        default: phase <= READ;
      endcase
    end
  end

  always_comb begin
    data_req   = (phase == READ);
    data_ready = (phase == WRITE);
    out_real   = re[bitrev(index)];
    out_imag   = im[bitrev(index)];
  end
endmodule
