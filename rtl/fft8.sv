// fft8: 8-point complex FFT, all eight samples in parallel, combinational.
//
// One of the protected FFT modules (the parity FFT uses it too, on wider data).
// Radix-2 decimation in frequency: the first stage forms u[k] = x[k] + x[k+4]
// and d[k] = x[k] - x[k+4], k = 0..3, and rotates d[k] by W8^k. Two 4-point
// DFTs then give the even bins from u and the odd bins from the rotated d.
// W8^0 and W8^2 = -j are exact; W8^1 = c(1-j) and W8^3 = -c(1+j) multiply by
// c = 1/sqrt(2), held as round(2^TW_F / sqrt(2)), with the product rounded to
// the nearest integer. Everything else is exact integer arithmetic.
//
// Interface: x_re/x_im are IN_W-bit signed; y_re/y_im are IN_W+4 bits signed
// and unscaled (y[k] = sum_n x[n] W8^(nk)), which cannot overflow. Bin k of the
// output is y[k] in natural order.
// Timing: purely combinational; the caller registers the result.
//
// The 8 points and the 32-bit input follow the document; the architecture,
// the unscaled output and the twiddle precision are this design's choice.
module fft8 #(
  parameter int IN_W = ft_fft_pkg::DATA_W,
  parameter int TW_F = 30
) (
  input  logic signed [IN_W-1:0] x_re [8],
  input  logic signed [IN_W-1:0] x_im [8],
  output logic signed [IN_W+3:0] y_re [8],
  output logic signed [IN_W+3:0] y_im [8]
);
  localparam int W = IN_W + 4;

  // round(sqrt(2^(2*TW_F-1))) = round(2^TW_F / sqrt(2)), by integer search.
  function automatic longint isqrt_round(input int f);
    longint t, lo, hi, mid;
    t  = longint'(1) <<< (2 * f - 1);
    lo = 0;
    hi = longint'(1) <<< f;
    while (hi - lo > 1) begin
      mid = (lo + hi) / 2;
      if (mid * mid <= t) lo = mid;
      else hi = mid;
    end
    if (4 * lo * lo + 4 * lo + 1 < (t <<< 2)) lo = lo + 1;
    return lo;
  endfunction

  localparam longint C = isqrt_round(TW_F);
  localparam int PW = W + TW_F + 2;

  // Multiply by c and round to nearest.
  function automatic logic signed [W-1:0] mulc(input logic signed [W-1:0] v);
    logic signed [PW-1:0] p;
    p = PW'(v) * PW'(signed'({1'b0, C[TW_F:0]}));
    p = p + (PW'(1) <<< (TW_F - 1));
    return W'(p >>> TW_F);
  endfunction

  logic signed [W-1:0] u_re [4], u_im [4], v_re [4], v_im [4];
  logic signed [W-1:0] d_re [4], d_im [4];

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      u_re[k] = W'(x_re[k]) + W'(x_re[k+4]);
      u_im[k] = W'(x_im[k]) + W'(x_im[k+4]);
      d_re[k] = W'(x_re[k]) - W'(x_re[k+4]);
      d_im[k] = W'(x_im[k]) - W'(x_im[k+4]);
    end
    // d * W8^k
    v_re[0] = d_re[0];
    v_im[0] = d_im[0];
    v_re[1] = mulc(d_re[1] + d_im[1]);         // c(a+b)
    v_im[1] = mulc(d_im[1] - d_re[1]);         // c(b-a)
    v_re[2] = d_im[2];                         // -j(a+jb) = b - ja
    v_im[2] = -d_re[2];
    v_re[3] = mulc(d_im[3] - d_re[3]);         // c(b-a)
    v_im[3] = -mulc(d_re[3] + d_im[3]);        // -c(a+b)
  end

  // 4-point DFTs: G0 = g0+g1+g2+g3, G1 = e - j f, G2 = (g0+g2)-(g1+g3),
  // G3 = e + j f, with e = g0-g2 and f = g1-g3.
  always_comb begin
    logic signed [W-1:0] s02r, s02i, s13r, s13i, er, ei, fr, fi;
    // even bins from u
    s02r = u_re[0] + u_re[2];  s02i = u_im[0] + u_im[2];
    s13r = u_re[1] + u_re[3];  s13i = u_im[1] + u_im[3];
    er   = u_re[0] - u_re[2];  ei   = u_im[0] - u_im[2];
    fr   = u_re[1] - u_re[3];  fi   = u_im[1] - u_im[3];
    y_re[0] = s02r + s13r;     y_im[0] = s02i + s13i;
    y_re[2] = er + fi;         y_im[2] = ei - fr;
    y_re[4] = s02r - s13r;     y_im[4] = s02i - s13i;
    y_re[6] = er - fi;         y_im[6] = ei + fr;
    // odd bins from v
    s02r = v_re[0] + v_re[2];  s02i = v_im[0] + v_im[2];
    s13r = v_re[1] + v_re[3];  s13i = v_im[1] + v_im[3];
    er   = v_re[0] - v_re[2];  ei   = v_im[0] - v_im[2];
    fr   = v_re[1] - v_re[3];  fi   = v_im[1] - v_im[3];
    y_re[1] = s02r + s13r;     y_im[1] = s02i + s13i;
    y_re[3] = er + fi;         y_im[3] = ei - fr;
    y_re[5] = s02r - s13r;     y_im[5] = s02i - s13i;
    y_re[7] = er - fi;         y_im[7] = ei + fr;
  end
endmodule
