// Behavioural model of a streaming 1024-point FFT core (testbench use only).
//
// It collects N consecutive input samples, one per clock with `ce` high, and
// during the next N input samples streams out that frame's spectrum in natural
// order, one bin per enabled clock: xk_dv pulses one clock after each `ce`,
// with xk_index and the unscaled bin X[k] = sum x[n] exp(-j 2 pi k n / N),
// rounded to the nearest integer.  Only the lowest NCOMP bins are computed
// (that is all the beat detector reads); higher bins are output as zero.
// `out_frame` numbers the frame being streamed out, from 0.
module fft_model #(
  parameter int N     = 1024,
  parameter int NCOMP = 32,
  parameter int OW    = 27
) (
  input  logic                 clk,
  input  logic                 ce,
  input  logic signed [15:0]   xn_re,
  output logic                 xk_dv,
  output logic [9:0]           xk_index,
  output logic signed [OW-1:0] xk_re,
  output logic signed [OW-1:0] xk_im,
  output int                   out_frame
);
  real costab [N], sintab [N];
  real inbuf [N];
  longint ore [NCOMP], oim [NCOMP];
  int n_in = 0, n_out = 0;
  bit have_out = 0;

  initial begin
    for (int i = 0; i < N; i++) begin
      costab[i] = $cos(2.0 * 3.14159265358979 * i / N);
      sintab[i] = $sin(2.0 * 3.14159265358979 * i / N);
    end
    xk_dv = 0; xk_index = 0; xk_re = 0; xk_im = 0; out_frame = -1;
  end

  always @(posedge clk) begin
    xk_dv <= 1'b0;
    if (ce) begin
      // stream out the previous frame
      if (have_out) begin
        xk_dv    <= 1'b1;
        xk_index <= 10'(n_out);
        xk_re    <= (n_out < NCOMP) ? OW'(ore[n_out]) : '0;
        xk_im    <= (n_out < NCOMP) ? OW'(oim[n_out]) : '0;
        n_out = (n_out == N - 1) ? 0 : n_out + 1;
      end
      // collect the current frame
      inbuf[n_in] = real'(xn_re);
      n_in++;
      if (n_in == N) begin
        n_in = 0;
        for (int k = 0; k < NCOMP; k++) begin
          real sr, si;
          sr = 0.0; si = 0.0;
          for (int n = 0; n < N; n++) begin
            sr += inbuf[n] * costab[(k * n) % N];
            si -= inbuf[n] * sintab[(k * n) % N];
          end
          ore[k] = longint'($floor(sr + 0.5));
          oim[k] = longint'($floor(si + 0.5));
        end
        have_out = 1;
        n_out = 0;
        out_frame <= out_frame + 1;
      end
    end
  end
endmodule
