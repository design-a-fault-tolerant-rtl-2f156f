// parity_fft_tb: checks that the parity FFT equals the DFT of the sum of the
// four input frames (and so the sum of the four FFT outputs), on random and
// full-scale frames, to within the fixed-point rounding bound.
module parity_fft_tb;
  import fft_ref_pkg::*;

  localparam int IN_W = 32;
  localparam int NVEC = 1500;

  logic signed [IN_W-1:0] x_re [4][8], x_im [4][8];
  logic signed [IN_W+5:0] p_re [8], p_im [8];
  int checks = 0, failures = 0;

  parity_fft dut (.x_re(x_re), .x_im(x_im), .p_re(p_re), .p_im(p_im));

  task automatic run_vec(input bit extreme);
    longint sr [8], si [8], v;
    real rr [8], ri [8], tol;
    for (int n = 0; n < 8; n++) begin sr[n] = 0; si[n] = 0; end
    for (int f = 0; f < 4; f++)
      for (int n = 0; n < 8; n++) begin
        v = extreme ? ((n + f) % 3 == 0 ? (longint'(1) <<< 31) - 1 : -(longint'(1) <<< 31)) : rand_s(IN_W);
        x_re[f][n] = IN_W'(v); sr[n] += v;
        v = extreme ? ((n % 2) ? (longint'(1) <<< 31) - 1 : -(longint'(1) <<< 31)) : rand_s(IN_W);
        x_im[f][n] = IN_W'(v); si[n] += v;
      end
    #1;
    dft8(sr, si, rr, ri);
    tol = fft_tol(sr, si);
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (absr(real'(p_re[k]) - rr[k]) > tol || absr(real'(p_im[k]) - ri[k]) > tol) begin
        failures++;
        if (failures < 10)
          $display("mismatch bin %0d: got (%0d, %0d) expected (%f, %f)", k, p_re[k], p_im[k], rr[k], ri[k]);
      end
    end
  endtask

  initial begin
    run_vec(1'b1);
    for (int i = 0; i < NVEC; i++) run_vec(1'b0);
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
