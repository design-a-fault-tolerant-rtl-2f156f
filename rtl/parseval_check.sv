// parseval_check: compares the energy of an FFT's outputs with that of its
// inputs.
//
// By Parseval's theorem an unscaled N-point DFT satisfies
// sum |X[k]|^2 = N * sum |x[n]|^2. Fixed-point rounding makes the two sides
// differ slightly, so the check only fires when
//   |sos_out - N*sos_in| > (N*sos_in >> TOL_SHIFT) + TOL_ABS.
// The relative term covers the quantised twiddle factor, the absolute term the
// rounding of the rotated products. Errors below this threshold pass unseen.
//
// Interface: sos_in and sos_out unsigned on SOS_W bits; mismatch is 1 when the
// check fails. Timing: combinational.
//
// The check itself and the existence of a detection threshold follow the
// document; the form and size of the threshold are this design's choice.
module parseval_check #(
  parameter int          SOS_W     = 84,
  parameter int          LOG2N     = ft_fft_pkg::LOG2N,
  parameter int          TOL_SHIFT = 16,
  parameter logic [31:0] TOL_ABS   = 32'd1 << 24
) (
  input  logic [SOS_W-1:0] sos_in,
  input  logic [SOS_W-1:0] sos_out,
  output logic             mismatch
);
  localparam int CW = SOS_W + LOG2N + 1;

  logic [CW-1:0] ref_sos, diff, tol;

  always_comb begin
    ref_sos  = CW'(sos_in) << LOG2N;
    diff     = (CW'(sos_out) >= ref_sos) ? CW'(sos_out) - ref_sos
                                         : ref_sos - CW'(sos_out);
    tol      = (ref_sos >> TOL_SHIFT) + CW'(TOL_ABS);
    mismatch = diff > tol;
  end
endmodule
