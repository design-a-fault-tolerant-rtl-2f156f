// sos_unit_tb: checks the sum of squares of 8 complex values at the default
// 38-bit width against a sum built here on 128-bit arithmetic, for random,
// full-scale negative and full-scale positive vectors.
module sos_unit_tb;
  localparam int W = 38;
  localparam int N = 8;
  localparam int SW = 2 * W + 4;

  logic signed [W-1:0] v_re [N], v_im [N];
  logic [SW-1:0] sos;
  int checks = 0, failures = 0;

  sos_unit dut (.v_re(v_re), .v_im(v_im), .sos(sos));

  function automatic logic signed [W-1:0] rnd(input int mode);
    logic [63:0] r;
    r = {$urandom, $urandom};
    case (mode)
      1: return {1'b1, {(W-1){1'b0}}};
      2: return {1'b0, {(W-1){1'b1}}};
      default: return W'(r);
    endcase
  endfunction

  initial begin
    logic signed [127:0] a, b;
    logic [127:0] acc;
    for (int t = 0; t < 2000; t++) begin
      acc = '0;
      for (int n = 0; n < N; n++) begin
        v_re[n] = rnd(t < 2 ? t + 1 : ($urandom_range(0, 7) == 0 ? 1 : 0));
        v_im[n] = rnd(t < 2 ? t + 1 : ($urandom_range(0, 7) == 0 ? 2 : 0));
        a = 128'(v_re[n]);
        b = 128'(v_im[n]);
        acc = acc + 128'(a * a) + 128'(b * b);
      end
      #1;
      checks++;
      if (128'(sos) != acc) begin
        failures++;
        if (failures < 10) $display("mismatch: got %0d expected %0d", sos, acc);
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
