// fft_corrector_tb: builds four random spectra and their exact sum as parity,
// corrupts the spectrum marked faulty (or none), and checks that every output
// equals the uncorrupted spectrum.
module fft_corrector_tb;
  localparam int OW = 36;

  logic signed [OW-1:0] x_re [4][8], x_im [4][8], y_re [4][8], y_im [4][8];
  logic signed [OW-1:0] g_re [4][8], g_im [4][8];
  logic signed [OW+1:0] p_re [8], p_im [8];
  logic [3:0] fft_err;
  int checks = 0, failures = 0;

  fft_corrector dut (.x_re(x_re), .x_im(x_im), .p_re(p_re), .p_im(p_im),
                     .fft_err(fft_err), .y_re(y_re), .y_im(y_im));

  initial begin
    int bad;
    for (int t = 0; t < 2000; t++) begin
      bad = $urandom_range(0, 4);   // 4 = no fault
      for (int k = 0; k < 8; k++) begin
        p_re[k] = '0;
        p_im[k] = '0;
      end
      for (int f = 0; f < 4; f++)
        for (int k = 0; k < 8; k++) begin
          g_re[f][k] = OW'({$urandom, $urandom});
          g_im[f][k] = OW'({$urandom, $urandom});
          p_re[k] = p_re[k] + (OW+2)'(g_re[f][k]);
          p_im[k] = p_im[k] + (OW+2)'(g_im[f][k]);
          x_re[f][k] = g_re[f][k] ^ ((f == bad) ? OW'({$urandom, $urandom}) : '0);
          x_im[f][k] = g_im[f][k] ^ ((f == bad) ? OW'($urandom) : '0);
        end
      fft_err = (bad < 4) ? 4'(1 << bad) : 4'b0;
      #1;
      for (int f = 0; f < 4; f++)
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (y_re[f][k] !== g_re[f][k] || y_im[f][k] !== g_im[f][k]) begin
            failures++;
            if (failures < 10)
              $display("fft %0d bin %0d (faulty %0d): got (%0d, %0d) expected (%0d, %0d)",
                       f, k, bad, y_re[f][k], y_im[f][k], g_re[f][k], g_im[f][k]);
          end
        end
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
