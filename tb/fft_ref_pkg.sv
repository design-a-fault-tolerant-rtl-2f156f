// fft_ref_pkg: floating-point reference models shared by the testbenches.
//
// dft8 computes X[k] = sum_n x[n] exp(-j 2 pi n k / 8) in double precision,
// independently of the fixed-point radix-2 hardware. sos8 is the exact
// sum of squares of eight complex integers, as a real.
package fft_ref_pkg;
  localparam real PI = 3.14159265358979323846;

  function automatic void dft8(input longint xr [8], input longint xi [8],
                               output real yr [8], output real yi [8]);
    real th;
    for (int k = 0; k < 8; k++) begin
      yr[k] = 0.0;
      yi[k] = 0.0;
      for (int n = 0; n < 8; n++) begin
        th = 2.0 * PI * real'(n * k) / 8.0;
        yr[k] += real'(xr[n]) * $cos(th) + real'(xi[n]) * $sin(th);
        yi[k] += real'(xi[n]) * $cos(th) - real'(xr[n]) * $sin(th);
      end
    end
  endfunction

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Allowed deviation of the fixed-point FFT from the exact DFT: rounding of
  // the two rotated products plus the quantisation of 1/sqrt(2).
  function automatic real fft_tol(input longint xr [8], input longint xi [8]);
    real s;
    s = 0.0;
    for (int n = 0; n < 8; n++) s += absr(real'(xr[n])) + absr(real'(xi[n]));
    return 3.0 + s * 1.0e-8;
  endfunction

  // Random signed value of the given width (<= 32 bits), with occasional
  // full-scale extremes.
  function automatic longint rand_s(input int w);
    int unsigned r;
    longint v;
    r = $urandom;
    case ($urandom_range(0, 15))
      0: v = (longint'(1) <<< (w - 1)) - 1;
      1: v = -(longint'(1) <<< (w - 1));
      default: begin
        v = longint'(r) & ((longint'(1) <<< w) - 1);
        if (v >= (longint'(1) <<< (w - 1))) v -= (longint'(1) <<< w);
      end
    endcase
    return v;
  endfunction
endpackage
