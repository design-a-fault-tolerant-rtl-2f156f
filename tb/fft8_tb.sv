// fft8_tb: checks the 8-point FFT against a double-precision DFT.
//
// Drives impulses at every position, full-scale extremes and random 32-bit
// complex frames, and checks each output bin to within the rounding bound of
// fft_ref_pkg::fft_tol. The core is combinational, so each vector is checked
// one time step after it is applied.
module fft8_tb;
  import fft_ref_pkg::*;

  localparam int IN_W = 32;
  localparam int NVEC = 3000;

  logic signed [IN_W-1:0] x_re [8], x_im [8];
  logic signed [IN_W+3:0] y_re [8], y_im [8];
  int checks = 0, failures = 0;

  fft8 dut (.x_re(x_re), .x_im(x_im), .y_re(y_re), .y_im(y_im));

  task automatic run_vec(input longint xr [8], input longint xi [8]);
    real rr [8], ri [8], tol;
    for (int n = 0; n < 8; n++) begin
      x_re[n] = IN_W'(xr[n]);
      x_im[n] = IN_W'(xi[n]);
    end
    #1;
    dft8(xr, xi, rr, ri);
    tol = fft_tol(xr, xi);
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (absr(real'(y_re[k]) - rr[k]) > tol || absr(real'(y_im[k]) - ri[k]) > tol) begin
        failures++;
        if (failures < 10)
          $display("mismatch bin %0d: got (%0d, %0d) expected (%f, %f)", k,
                   y_re[k], y_im[k], rr[k], ri[k]);
      end
    end
  endtask

  initial begin
    longint xr [8], xi [8];
    // impulses
    for (int p = 0; p < 8; p++) begin
      for (int n = 0; n < 8; n++) begin xr[n] = 0; xi[n] = 0; end
      xr[p] = 1000;
      xi[p] = -77;
      run_vec(xr, xi);
    end
    // extremes: all most negative, all most positive, alternating
    for (int n = 0; n < 8; n++) begin xr[n] = -(longint'(1) <<< 31); xi[n] = -(longint'(1) <<< 31); end
    run_vec(xr, xi);
    for (int n = 0; n < 8; n++) begin
      xr[n] = (n % 2) ? -(longint'(1) <<< 31) : (longint'(1) <<< 31) - 1;
      xi[n] = (n % 4 < 2) ? -(longint'(1) <<< 31) : (longint'(1) <<< 31) - 1;
    end
    run_vec(xr, xi);
    // random
    for (int v = 0; v < NVEC; v++) begin
      for (int n = 0; n < 8; n++) begin xr[n] = rand_s(IN_W); xi[n] = rand_s(IN_W); end
      run_vec(xr, xi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
