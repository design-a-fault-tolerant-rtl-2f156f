// parseval_check_tb: places sos_out just inside and just outside the tolerance
// band around 8*sos_in, on both sides, for random input energies from tiny to
// full scale, and checks that only the outside cases are flagged.
module parseval_check_tb;
  localparam int SOS_W = 84;
  localparam int TOL_SHIFT = 16;
  localparam logic [31:0] TOL_ABS = 32'd1 << 24;

  logic [SOS_W-1:0] sos_in, sos_out;
  logic mismatch;
  int checks = 0, failures = 0;

  parseval_check dut (.sos_in(sos_in), .sos_out(sos_out), .mismatch(mismatch));

  task automatic expect_flag(input logic [127:0] si, input logic [127:0] so, input bit exp);
    sos_in = SOS_W'(si);
    sos_out = SOS_W'(so);
    #1;
    checks++;
    if (mismatch !== exp) begin
      failures++;
      if (failures < 10) $display("sos_in=%0d sos_out=%0d: mismatch=%0b expected %0b", si, so, mismatch, exp);
    end
  endtask

  initial begin
    logic [127:0] si, r, tol;
    for (int t = 0; t < 3000; t++) begin
      // energy with a random number of significant bits (up to 76)
      si = {$urandom, $urandom, $urandom};
      si = si >> $urandom_range(20, 95);
      r = si * 8;
      tol = (r >> TOL_SHIFT) + 128'(TOL_ABS);
      expect_flag(si, r, 1'b0);
      expect_flag(si, r + tol, 1'b0);
      expect_flag(si, r + tol + 1, 1'b1);
      if (r >= tol + 1) begin
        expect_flag(si, r - tol, 1'b0);
        expect_flag(si, r - tol - 1, 1'b1);
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
