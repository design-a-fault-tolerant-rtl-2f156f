// sos_unit: sum of squares of an N-element complex vector.
//
// sos = sum over n of re[n]^2 + im[n]^2, computed exactly on 2*W+clog2(2N)
// bits. It is the building block of the Parseval check: applied to the FFT
// inputs on one side and to the FFT outputs on the other.
//
// Interface: v_re/v_im are W-bit signed; sos is unsigned.
// Timing: combinational.
//
// The sum-of-squares check follows the document; the exact, full-width
// arithmetic is this design's choice.
module sos_unit #(
  parameter int W = ft_fft_pkg::DATA_W + 6,
  parameter int N = ft_fft_pkg::NPT
) (
  input  logic signed [W-1:0]                 v_re [N],
  input  logic signed [W-1:0]                 v_im [N],
  output logic        [2*W+$clog2(2*N)-1:0]   sos
);
  localparam int SW = 2 * W + $clog2(2 * N);

  always_comb begin
    logic signed [2*W-1:0] sq_re, sq_im;
    sos = '0;
    for (int n = 0; n < N; n++) begin
      sq_re = (2*W)'(v_re[n]) * (2*W)'(v_re[n]);
      sq_im = (2*W)'(v_im[n]) * (2*W)'(v_im[n]);
      sos = sos + SW'(unsigned'(sq_re)) + SW'(unsigned'(sq_im));
    end
  end
endmodule
