// parity_fft: the redundant FFT that makes correction possible.
//
// It adds the inputs of the NFFT protected FFTs sample by sample and
// transforms the sum with an fft8. Because the FFT is linear, its output
// equals the sum of the protected FFTs' outputs (up to the rounding of the
// W8^1 / W8^3 rotations), so the output of any one faulty FFT can be rebuilt as
// this output minus the outputs of the others.
//
// Interface: x_re/x_im[f][n] is sample n of FFT f, IN_W bits signed. The sum is
// carried on IN_W+2 bits (exact for four inputs); p_re/p_im are IN_W+6 bits.
// Timing: combinational.
//
// The parity FFT and its role follow the document; the widening of the sum is
// this design's choice.
module parity_fft #(
  parameter int IN_W = ft_fft_pkg::DATA_W,
  parameter int NFFT = ft_fft_pkg::NFFT,
  parameter int TW_F = 30
) (
  input  logic signed [IN_W-1:0] x_re [NFFT][8],
  input  logic signed [IN_W-1:0] x_im [NFFT][8],
  output logic signed [IN_W+5:0] p_re [8],
  output logic signed [IN_W+5:0] p_im [8]
);
  localparam int SW = IN_W + 2;

  logic signed [SW-1:0] s_re [8], s_im [8];

  always_comb begin
    for (int n = 0; n < 8; n++) begin
      s_re[n] = '0;
      s_im[n] = '0;
      for (int f = 0; f < NFFT; f++) begin
        s_re[n] = s_re[n] + SW'(x_re[f][n]);
        s_im[n] = s_im[n] + SW'(x_im[f][n]);
      end
    end
  end

  fft8 #(.IN_W(SW), .TW_F(TW_F)) u_fft (
    .x_re(s_re), .x_im(s_im), .y_re(p_re), .y_im(p_im)
  );
endmodule
