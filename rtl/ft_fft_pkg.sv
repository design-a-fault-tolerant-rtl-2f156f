// ft_fft_pkg: constants shared by the fault-tolerant parallel FFT.
//
// The design protects NFFT = 4 parallel FFTs of NPT = 8 points on 32-bit
// samples (32-bit signed real and 32-bit signed imaginary part). The numbers of
// points, the sample width and the count of four protected FFTs follow the
// document; everything else is this design's own choice.
//
// SOS_ECC_MAP gives which FFTs each of the three sum-of-squares checks covers
// (bit f of entry c set = FFT f is summed into check c). The pattern gives every
// FFT a distinct, at least two-bit syndrome, so a single faulty FFT can be
// located and a single-bit syndrome can only come from a faulty check:
//   check 0: FFT 0,1,2    check 1: FFT 0,1,3    check 2: FFT 0,2,3
package ft_fft_pkg;
  localparam int NPT    = 8;   // FFT points
  localparam int LOG2N  = 3;   // log2(NPT), the Parseval scale factor exponent
  localparam int NFFT   = 4;   // protected FFTs
  localparam int NCHK   = 3;   // SOS checks forming the ECC
  localparam int DATA_W = 32;  // input sample component width

  localparam logic [NFFT-1:0] SOS_ECC_MAP [NCHK] = '{4'b0111, 4'b1011, 4'b1101};

  // Syndrome (bit c = check c failed) that each FFT produces when it is faulty.
  function automatic logic [NCHK-1:0] fft_syndrome(input logic [$clog2(NFFT)-1:0] f);
    logic [NCHK-1:0] s;
    for (int c = 0; c < NCHK; c++) s[c] = SOS_ECC_MAP[c][f];
    return s;
  endfunction
endpackage
