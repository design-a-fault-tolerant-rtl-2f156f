// fft_corrector: rebuilds the output of the faulty FFT from the parity FFT.
//
// The parity FFT transforms the sum of all NFFT inputs, so for a faulty FFT f
//   X_f = P - sum_{g != f} X_g.
// When fft_err[f] is set, every bin of FFT f is replaced by that difference
// (saturated to OW bits); the other FFTs pass through unchanged. With fft_err
// zero all outputs pass through.
//
// Interface: x_re/x_im[f][k] is bin k of FFT f on OW bits signed; p_re/p_im the
// parity FFT bins on OW+2 bits; fft_err one-hot. Timing: combinational.
//
// Correction through the parity FFT follows the document; saturation is this
// design's choice (it only matters if the parity FFT is itself corrupted).
module fft_corrector #(
  parameter int OW   = ft_fft_pkg::DATA_W + 4,
  parameter int NFFT = ft_fft_pkg::NFFT
) (
  input  logic signed [OW-1:0]   x_re [NFFT][8],
  input  logic signed [OW-1:0]   x_im [NFFT][8],
  input  logic signed [OW+1:0]   p_re [8],
  input  logic signed [OW+1:0]   p_im [8],
  input  logic        [NFFT-1:0] fft_err,
  output logic signed [OW-1:0]   y_re [NFFT][8],
  output logic signed [OW-1:0]   y_im [NFFT][8]
);
  localparam int RW = OW + 4;

  function automatic logic signed [OW-1:0] sat(input logic signed [RW-1:0] v);
    localparam logic signed [RW-1:0] MAXV = RW'({1'b0, {(OW-1){1'b1}}});
    localparam logic signed [RW-1:0] MINV = -MAXV - 1;
    if (v > MAXV) return OW'(MAXV);
    if (v < MINV) return OW'(MINV);
    return OW'(v);
  endfunction

  always_comb begin
    logic signed [RW-1:0] r_re, r_im;
    for (int f = 0; f < NFFT; f++) begin
      for (int k = 0; k < 8; k++) begin
        r_re = RW'(p_re[k]);
        r_im = RW'(p_im[k]);
        for (int g = 0; g < NFFT; g++) begin
          if (g != f) begin
            r_re = r_re - RW'(x_re[g][k]);
            r_im = r_im - RW'(x_im[g][k]);
          end
        end
        y_re[f][k] = fft_err[f] ? sat(r_re) : x_re[f][k];
        y_im[f][k] = fft_err[f] ? sat(r_im) : x_im[f][k];
      end
    end
  end
endmodule
