// sos_ecc_decoder: locates the faulty FFT from the three SOS check results.
//
// Each of the three Parseval checks covers the sum of three of the four FFTs
// (map in ft_fft_pkg::SOS_ECC_MAP), so the three results form the syndrome of a
// small Hamming-like code. A syndrome equal to an FFT's column marks that FFT
// faulty; a syndrome with a single bit set cannot come from one faulty FFT and
// is reported as a fault in a check itself. Zero means no error.
//
// Interface: syndrome[c] = check c failed; fft_err is one-hot (or zero);
// detected = any check failed; check_err = single-bit syndrome.
// Timing: combinational.
//
// Using a set of SOS checks as an ECC follows the document; the particular
// check-to-FFT assignment is this design's choice.
module sos_ecc_decoder
  import ft_fft_pkg::*;
(
  input  logic [NCHK-1:0] syndrome,
  output logic [NFFT-1:0] fft_err,
  output logic            detected,
  output logic            check_err
);
  always_comb begin
    fft_err = '0;
    for (int f = 0; f < NFFT; f++)
      fft_err[f] = (syndrome == fft_syndrome(2'(f)));
    detected  = |syndrome;
    check_err = detected && (fft_err == '0);
  end
endmodule
