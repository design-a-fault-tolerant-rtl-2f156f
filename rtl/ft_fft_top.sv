// ft_fft_top: four parallel 8-point FFTs protected by a parity FFT and three
// combined sum-of-squares (Parseval) checks, with a Razor register.
//
// Stage 1 (combinational from the input ports, captured in a razor_ff bank):
//   - four fft8 cores, one per input frame;
//   - parity_fft, the FFT of the sum of the four input frames;
//   - for each of the three SOS checks, the sum of squares of the sum of the
//     time-domain frames the check covers (Parseval makes this equal, up to the
//     factor 8, to the energy of the sum of those FFTs' outputs).
// Stage 2 (combinational from the Razor register, captured in the output
// register):
//   - the sum of squares of the summed outputs of each check's FFTs;
//   - three parseval_check comparisons giving a 3-bit syndrome;
//   - sos_ecc_decoder naming the faulty FFT, and fft_corrector replacing its
//     bins with parity output minus the other three FFTs.
// A single faulty FFT is detected, located and corrected; a failure of one
// check alone is reported (check_err) but changes nothing.
//
// Razor recovery: the FFT results are captured in Razor flip-flops. When a
// result settles after the clock edge (a timing error), razor_error rises
// after the delayed clock falls. At the next edge the Razor register reloads
// the late value from its shadow latches, the output register skips that
// cycle, and the input then presented is not taken: the source must hold it
// one more cycle (re-execute). razor_error is also the signal an adaptive
// hold logic (AHL) controller would receive.
//
// Fault injection: when inj_en is set, inj_mask is XORed into bin inj_bin
// (imaginary part if inj_im) of FFT inj_fft (0..3, or 4 for the parity FFT)
// before the Razor register, to emulate a soft error in that FFT. inj_fft
// 5..7 instead XORs inj_mask into the top bits of the input-side sum of
// squares of check 0..2, to emulate a fault in a check.
//
// Interface and timing: frames x_re/x_im[f][n] with in_valid are taken at a
// rising edge of clk when razor_error is low; results y_re/y_im with
// out_valid and the error flags appear at the following rising edge (latency
// 1 cycle, one frame set per cycle). Inputs must be stable from before the
// clk edge until clk_del falls, except when modelling a late arrival.
//
// The four FFTs, the 8 points, 32-bit inputs, parity FFT, SOS checks forming
// an ECC and the Razor flip-flops follow the document; the two-stage
// pipeline, the check assignment, thresholds, fault-injection port and
// stall-based re-execution are this design's choices. The assertions at the
// end state the output and Razor rules; rst_n in their disable clause is the
// reason a linter may see rst_n used both asynchronously and synchronously.
module ft_fft_top
  import ft_fft_pkg::NPT, ft_fft_pkg::LOG2N, ft_fft_pkg::NFFT, ft_fft_pkg::NCHK, ft_fft_pkg::SOS_ECC_MAP;
#(
  parameter int          DATA_W    = ft_fft_pkg::DATA_W,
  parameter int          TW_F      = 30,
  parameter int          TOL_SHIFT = 16,
  parameter logic [31:0] TOL_ABS   = 32'd1 << 24
) (
  input  logic                     clk,
  input  logic                     clk_del,
  input  logic                     rst_n,
  // input frames
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x_re [NFFT][NPT],
  input  logic signed [DATA_W-1:0] x_im [NFFT][NPT],
  // fault injection
  input  logic                     inj_en,
  input  logic [2:0]               inj_fft,
  input  logic [2:0]               inj_bin,
  input  logic                     inj_im,
  input  logic [DATA_W+5:0]        inj_mask,
  // Razor timing error (re-execute request, AHL notification)
  output logic                     razor_error,
  // results
  output logic                     out_valid,
  output logic signed [DATA_W+3:0] y_re [NFFT][NPT],
  output logic signed [DATA_W+3:0] y_im [NFFT][NPT],
  output logic                     err_detected,
  output logic [NFFT-1:0]          err_fft,
  output logic                     check_err
);
  localparam int OW  = DATA_W + 4;            // FFT output width
  localparam int PW  = OW + 2;                // parity FFT output width
  localparam int CIW = DATA_W + 2;            // sum of three input frames
  localparam int SIW = 2 * CIW + 4;           // SOS of that sum
  localparam int COW = OW + 2;                // sum of three FFT outputs
  localparam int SOW = 2 * COW + 4;           // SOS of that sum
  localparam int XB  = NFFT * NPT * 2 * OW;   // Razor bits for the FFT outputs
  localparam int PB  = NPT * 2 * PW;          // Razor bits for the parity FFT
  localparam int SB  = NCHK * SIW;            // Razor bits for the input SOS
  localparam int TOT = XB + PB + SB + 1;      // plus in_valid

  // ---------------------------------------------------------------- stage 1
  logic signed [OW-1:0]  fx_re [NFFT][NPT], fx_im [NFFT][NPT];
  logic signed [PW-1:0]  fp_re [NPT], fp_im [NPT];
  logic signed [CIW-1:0] ci_re [NCHK][NPT], ci_im [NCHK][NPT];
  logic        [SIW-1:0] sos_in_d [NCHK];

  for (genvar f = 0; f < NFFT; f++) begin : g_fft
    fft8 #(.IN_W(DATA_W), .TW_F(TW_F)) u_fft (
      .x_re(x_re[f]), .x_im(x_im[f]), .y_re(fx_re[f]), .y_im(fx_im[f])
    );
  end

  parity_fft #(.IN_W(DATA_W), .NFFT(NFFT), .TW_F(TW_F)) u_parity (
    .x_re(x_re), .x_im(x_im), .p_re(fp_re), .p_im(fp_im)
  );

  always_comb begin
    for (int c = 0; c < NCHK; c++)
      for (int n = 0; n < NPT; n++) begin
        ci_re[c][n] = '0;
        ci_im[c][n] = '0;
        for (int f = 0; f < NFFT; f++)
          if (SOS_ECC_MAP[c][f]) begin
            ci_re[c][n] = ci_re[c][n] + CIW'(x_re[f][n]);
            ci_im[c][n] = ci_im[c][n] + CIW'(x_im[f][n]);
          end
      end
  end

  for (genvar c = 0; c < NCHK; c++) begin : g_sos_in
    sos_unit #(.W(CIW), .N(NPT)) u_sos (
      .v_re(ci_re[c]), .v_im(ci_im[c]), .sos(sos_in_d[c])
    );
  end

  // pack (with fault injection) into the Razor register word
  logic [TOT-1:0] s1_d, s1_q;

  always_comb begin
    logic [OW-1:0] m;
    m = inj_mask[OW-1:0];
    for (int f = 0; f < NFFT; f++)
      for (int k = 0; k < NPT; k++) begin
        s1_d[((f*NPT+k)*2)*OW +: OW] = fx_re[f][k]
          ^ ((inj_en && inj_fft == 3'(f) && inj_bin == 3'(k) && !inj_im) ? m : '0);
        s1_d[((f*NPT+k)*2+1)*OW +: OW] = fx_im[f][k]
          ^ ((inj_en && inj_fft == 3'(f) && inj_bin == 3'(k) && inj_im) ? m : '0);
      end
    for (int k = 0; k < NPT; k++) begin
      s1_d[XB + (2*k)*PW +: PW] = fp_re[k]
        ^ ((inj_en && inj_fft == 3'd4 && inj_bin == 3'(k) && !inj_im) ? inj_mask : '0);
      s1_d[XB + (2*k+1)*PW +: PW] = fp_im[k]
        ^ ((inj_en && inj_fft == 3'd4 && inj_bin == 3'(k) && inj_im) ? inj_mask : '0);
    end
    for (int c = 0; c < NCHK; c++)
      s1_d[XB + PB + c*SIW +: SIW] = sos_in_d[c]
        ^ ((inj_en && inj_fft == 3'(c + 5)) ? {inj_mask, {(SIW-PW){1'b0}}} : '0);
    s1_d[TOT-1] = in_valid;
  end

  razor_ff #(.WIDTH(TOT)) u_razor (
    .clk(clk), .clk_del(clk_del), .rst_n(rst_n),
    .d(s1_d), .q(s1_q), .error(razor_error)
  );

  // ---------------------------------------------------------------- stage 2
  logic signed [OW-1:0]  rx_re [NFFT][NPT], rx_im [NFFT][NPT];
  logic signed [PW-1:0]  rp_re [NPT], rp_im [NPT];
  logic        [SIW-1:0] rsos_in [NCHK];
  logic                  r_valid;
  logic signed [COW-1:0] co_re [NCHK][NPT], co_im [NCHK][NPT];
  logic        [SOW-1:0] sos_out [NCHK];
  logic        [NCHK-1:0] syndrome;
  logic        [NFFT-1:0] fft_err_c;
  logic                   detected_c, check_err_c;
  logic signed [OW-1:0]  cy_re [NFFT][NPT], cy_im [NFFT][NPT];

  always_comb begin
    for (int f = 0; f < NFFT; f++)
      for (int k = 0; k < NPT; k++) begin
        rx_re[f][k] = s1_q[((f*NPT+k)*2)*OW +: OW];
        rx_im[f][k] = s1_q[((f*NPT+k)*2+1)*OW +: OW];
      end
    for (int k = 0; k < NPT; k++) begin
      rp_re[k] = s1_q[XB + (2*k)*PW +: PW];
      rp_im[k] = s1_q[XB + (2*k+1)*PW +: PW];
    end
    for (int c = 0; c < NCHK; c++)
      rsos_in[c] = s1_q[XB + PB + c*SIW +: SIW];
    r_valid = s1_q[TOT-1];

    for (int c = 0; c < NCHK; c++)
      for (int k = 0; k < NPT; k++) begin
        co_re[c][k] = '0;
        co_im[c][k] = '0;
        for (int f = 0; f < NFFT; f++)
          if (SOS_ECC_MAP[c][f]) begin
            co_re[c][k] = co_re[c][k] + COW'(rx_re[f][k]);
            co_im[c][k] = co_im[c][k] + COW'(rx_im[f][k]);
          end
      end
  end

  for (genvar c = 0; c < NCHK; c++) begin : g_check
    sos_unit #(.W(COW), .N(NPT)) u_sos (
      .v_re(co_re[c]), .v_im(co_im[c]), .sos(sos_out[c])
    );
    parseval_check #(
      .SOS_W(SOW), .LOG2N(LOG2N), .TOL_SHIFT(TOL_SHIFT), .TOL_ABS(TOL_ABS)
    ) u_chk (
      .sos_in(SOW'(rsos_in[c])), .sos_out(sos_out[c]), .mismatch(syndrome[c])
    );
  end

  sos_ecc_decoder u_dec (
    .syndrome(syndrome), .fft_err(fft_err_c),
    .detected(detected_c), .check_err(check_err_c)
  );

  fft_corrector #(.OW(OW), .NFFT(NFFT)) u_corr (
    .x_re(rx_re), .x_im(rx_im), .p_re(rp_re), .p_im(rp_im),
    .fft_err(fft_err_c), .y_re(cy_re), .y_im(cy_im)
  );

  // output register; a cycle with a Razor error is not taken
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid    <= 1'b0;
      err_detected <= 1'b0;
      err_fft      <= '0;
      check_err    <= 1'b0;
      for (int f = 0; f < NFFT; f++)
        for (int k = 0; k < NPT; k++) begin
          y_re[f][k] <= '0;
          y_im[f][k] <= '0;
        end
    end else begin
      out_valid <= r_valid && !razor_error;
      if (r_valid && !razor_error) begin
        err_detected <= detected_c;
        err_fft      <= fft_err_c;
        check_err    <= check_err_c;
        y_re         <= cy_re;
        y_im         <= cy_im;
      end
    end
  end

  // ------------------------------------------------------------ protocol rules
  // a set captured with a Razor error is never passed on in the next cycle
  a_razor_no_output: assert property (
    @(posedge clk) disable iff (!rst_n) razor_error |=> !out_valid);
  // Razor recovery takes one cycle: no error two cycles running
  a_razor_single: assert property (
    @(posedge clk) disable iff (!rst_n) razor_error |=> !razor_error);
  // at most one FFT is corrected, and never together with a check fault
  a_one_fft: assert property (
    @(posedge clk) disable iff (!rst_n) out_valid |-> $onehot0(err_fft));
  a_check_excl: assert property (
    @(posedge clk) disable iff (!rst_n) out_valid && check_err |-> err_fft == '0);
endmodule
