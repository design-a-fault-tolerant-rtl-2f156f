// sos_ecc_decoder_tb: all eight syndromes against the decoding table of the
// three checks (check 0 covers FFT 0,1,2; check 1 FFT 0,1,3; check 2 FFT 0,2,3).
module sos_ecc_decoder_tb;
  logic [2:0] syndrome;
  logic [3:0] fft_err;
  logic detected, check_err;
  int checks = 0, failures = 0;

  sos_ecc_decoder dut (.syndrome(syndrome), .fft_err(fft_err),
                       .detected(detected), .check_err(check_err));

  initial begin
    // syndrome -> {fft_err, detected, check_err}
    logic [5:0] table_exp [8];
    table_exp[3'b000] = {4'b0000, 1'b0, 1'b0};
    table_exp[3'b001] = {4'b0000, 1'b1, 1'b1};
    table_exp[3'b010] = {4'b0000, 1'b1, 1'b1};
    table_exp[3'b011] = {4'b0010, 1'b1, 1'b0};  // FFT 1: checks 0,1
    table_exp[3'b100] = {4'b0000, 1'b1, 1'b1};
    table_exp[3'b101] = {4'b0100, 1'b1, 1'b0};  // FFT 2: checks 0,2
    table_exp[3'b110] = {4'b1000, 1'b1, 1'b0};  // FFT 3: checks 1,2
    table_exp[3'b111] = {4'b0001, 1'b1, 1'b0};  // FFT 0: all checks
    for (int s = 0; s < 8; s++) begin
      syndrome = 3'(s);
      #1;
      checks++;
      if ({fft_err, detected, check_err} !== table_exp[s]) begin
        failures++;
        $display("syndrome %03b: got %04b %0b %0b", syndrome, fft_err, detected, check_err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
