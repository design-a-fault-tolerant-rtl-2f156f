// ft_fft_top_tb: end-to-end test of the protected parallel FFT at its default
// sizes (four 8-point FFTs on 32-bit complex samples).
//
// A source presents sets of four random frames, 9 ns into each 10 ns cycle
// (clk_del is clk delayed by 3 ns), with occasional idle cycles. Each set is
// given one scenario:
//   clean        full-scale data, no fault: no check may fire;
//   fft fault    a high bit flipped in one bin of FFT 0..3 (data kept below
//                2^23 so the error is far above the check threshold): it must
//                be detected, located and corrected;
//   parity fault a bit flipped in the parity FFT: no check fires, outputs exact;
//   check fault  a bit flipped in one check's input energy: only check_err,
//                outputs untouched;
//   late         the set arrives 1 ns after the clock edge: the Razor register
//                must flag it, restore it one cycle late, and the source must
//                hold its next set for a cycle.
// Every output set is compared with a double-precision DFT of its inputs,
// the flags with the scenario, and the latency (1 cycle, 2 after a late
// arrival) with the cycle of acceptance. Each scenario must occur.
module ft_fft_top_tb;
  import fft_ref_pkg::*;

  localparam int NS = 300;   // frame sets

  logic clk = 1'b0, clk_del = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [31:0] x_re [4][8], x_im [4][8];
  logic inj_en = 1'b0, inj_im = 1'b0;
  logic [2:0] inj_fft = '0, inj_bin = '0;
  logic [37:0] inj_mask = '0;
  logic razor_error, out_valid, err_detected, check_err;
  logic signed [35:0] y_re [4][8], y_im [4][8];
  logic [3:0] err_fft;

  ft_fft_top dut (
    .clk(clk), .clk_del(clk_del), .rst_n(rst_n), .in_valid(in_valid),
    .x_re(x_re), .x_im(x_im), .inj_en(inj_en), .inj_fft(inj_fft),
    .inj_bin(inj_bin), .inj_im(inj_im), .inj_mask(inj_mask),
    .razor_error(razor_error), .out_valid(out_valid), .y_re(y_re), .y_im(y_im),
    .err_detected(err_detected), .err_fft(err_fft), .check_err(check_err)
  );

  always #5 clk = ~clk;
  always @(clk) clk_del <= #3 clk;

  typedef enum int {CLEAN, FFT_FAULT, PARITY_FAULT, CHECK_FAULT, LATE, NSCEN} scen_e;

  longint sx_re [NS][4][8], sx_im [NS][4][8];
  scen_e  scen [NS];
  int     fault_fft [NS];
  int     accept_cycle [NS];
  int     exp_q [$];
  int     cycles = 0, checks = 0, failures = 0, done_sets = 0;
  int     seen [NSCEN];
  int     stalls = 0;

  always @(posedge clk) cycles++;

  task automatic fail(input string msg);
    failures++;
    if (failures < 15) $display("t=%0t: %s", $time, msg);
  endtask

  task automatic apply(input int s);
    in_valid = 1'b1;
    for (int f = 0; f < 4; f++)
      for (int n = 0; n < 8; n++) begin
        x_re[f][n] = 32'(sx_re[s][f][n]);
        x_im[f][n] = 32'(sx_im[s][f][n]);
      end
    inj_en   = 1'b0;
    inj_fft  = '0;
    inj_bin  = 3'($urandom_range(0, 7));
    inj_im   = 1'($urandom);
    inj_mask = '0;
    case (scen[s])
      FFT_FAULT: begin
        inj_en = 1'b1;
        inj_fft = 3'(fault_fft[s]);
        inj_mask = 38'(1) << $urandom_range(30, 34);
      end
      PARITY_FAULT: begin
        inj_en = 1'b1;
        inj_fft = 3'd4;
        inj_mask = 38'(1) << $urandom_range(0, 36);
      end
      CHECK_FAULT: begin
        inj_en = 1'b1;
        inj_fft = 3'(5 + fault_fft[s]);
        inj_mask = 38'(1) << 37;
      end
      default: ;
    endcase
  endtask

  // ------------------------------------------------------------ stimulus
  initial begin
    int s, w;
    for (s = 0; s < NS; s++) begin
      scen[s] = (s < 4) ? CLEAN : scen_e'($urandom_range(0, 4));
      if (s == 5) scen[s] = LATE;
      fault_fft[s] = (scen[s] == CHECK_FAULT) ? $urandom_range(0, 2) : $urandom_range(0, 3);
      w = (scen[s] == FFT_FAULT) ? 23 : 32;
      for (int f = 0; f < 4; f++)
        for (int n = 0; n < 8; n++) begin
          sx_re[s][f][n] = rand_s(w);
          sx_im[s][f][n] = rand_s(w);
        end
    end
    for (int f = 0; f < 4; f++)
      for (int n = 0; n < 8; n++) begin
        sx_re[0][f][n] = (longint'(1) <<< 31) - 1;  // full-scale set
        sx_im[0][f][n] = -(longint'(1) <<< 31);
        x_re[f][n] = '0;
        x_im[f][n] = '0;
      end

    #12 rst_n = 1'b1;
    @(posedge clk);
    s = 0;
    #9;
    while (s < NS) begin
      // here: 9 ns into a cycle, clk_del has fallen, razor_error is settled
      if (razor_error) begin
        stalls++;                            // next edge will not take data
        @(posedge clk); #9;
      end else if ($urandom_range(0, 9) == 0) begin
        in_valid = 1'b0;                     // idle cycle
        @(posedge clk); #9;
      end else if (scen[s] == LATE) begin
        @(posedge clk); #1;                  // 1 ns after the edge: late
        apply(s);
        accept_cycle[s] = cycles;
        exp_q.push_back(s);
        s++;
        #8;
      end else begin
        apply(s);
        accept_cycle[s] = cycles + 1;
        exp_q.push_back(s);
        s++;
        @(posedge clk); #9;
      end
    end
    in_valid = 1'b0;
    inj_en = 1'b0;
    repeat (5) @(posedge clk);
    if (exp_q.size() != 0) fail($sformatf("%0d sets never came out", exp_q.size()));
    for (int c = 0; c < NSCEN; c++) begin
      checks++;
      if (seen[c] == 0) fail($sformatf("scenario %0d never exercised", c));
    end
    checks++;
    if (stalls == 0) fail("no re-execution stall");
    $display("sets=%0d clean=%0d fft_fault=%0d parity_fault=%0d check_fault=%0d late=%0d stalls=%0d",
             done_sets, seen[CLEAN], seen[FFT_FAULT], seen[PARITY_FAULT], seen[CHECK_FAULT],
             seen[LATE], stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ checker
  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      int s, lat;
      longint xr [8], xi [8];
      real rr [8], ri [8], tol, xs;
      if (exp_q.size() == 0) begin
        fail("unexpected output");
      end else begin
        s = exp_q.pop_front();
        done_sets++;
        seen[scen[s]]++;
        lat = (scen[s] == LATE) ? 2 : 1;
        checks++;
        if (cycles - accept_cycle[s] != lat)
          fail($sformatf("set %0d latency %0d, expected %0d", s, cycles - accept_cycle[s], lat));
        // allowed deviation: rounding in up to four FFTs
        xs = 0.0;
        for (int f = 0; f < 4; f++)
          for (int n = 0; n < 8; n++) xs += absr(real'(sx_re[s][f][n])) + absr(real'(sx_im[s][f][n]));
        tol = 12.0 + xs * 1.0e-8;
        for (int f = 0; f < 4; f++) begin
          for (int n = 0; n < 8; n++) begin xr[n] = sx_re[s][f][n]; xi[n] = sx_im[s][f][n]; end
          dft8(xr, xi, rr, ri);
          for (int k = 0; k < 8; k++) begin
            checks++;
            if (absr(real'(y_re[f][k]) - rr[k]) > tol || absr(real'(y_im[f][k]) - ri[k]) > tol)
              fail($sformatf("set %0d (scenario %0d) fft %0d bin %0d: got (%0d, %0d) expected (%f, %f)",
                             s, scen[s], f, k, y_re[f][k], y_im[f][k], rr[k], ri[k]));
          end
        end
        checks++;
        case (scen[s])
          FFT_FAULT:
            if (!err_detected || err_fft != 4'(1 << fault_fft[s]) || check_err)
              fail($sformatf("set %0d: fft %0d fault flags %0b %04b %0b", s, fault_fft[s],
                             err_detected, err_fft, check_err));
          CHECK_FAULT:
            if (!err_detected || err_fft != 0 || !check_err)
              fail($sformatf("set %0d: check fault flags %0b %04b %0b", s,
                             err_detected, err_fft, check_err));
          default:
            if (err_detected || err_fft != 0 || check_err)
              fail($sformatf("set %0d (scenario %0d): false alarm %0b %04b %0b", s, scen[s],
                             err_detected, err_fft, check_err));
        endcase
      end
    end
  end

  initial begin
    wait (cycles == 20 * NS + 100);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
