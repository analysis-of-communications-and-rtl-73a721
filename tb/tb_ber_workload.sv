// Bit error rate workload for the carrier synchronization core at its default size
// (N = 512, QPSK). It repeats the kind of measurement behind the published BER
// curves: bursts of 300 QPSK symbols, one sample per symbol, with additive white
// Gaussian noise at Es/N0 = 3 dB and 5 dB, a random carrier phase and a random
// frequency offset in 0.01 ... 0.02 cycles per symbol. The SRR runs (D = 2) use the
// two offsets 0.01 and 0.03 of its own evaluation. Each technique gets NBU bursts per
// noise level. The corrected symbols are decided on the nearest axis with Gray
// mapping; the M-fold phase ambiguity, which a back end resolves, is removed by
// taking the rotation with the fewest errors per burst. The peak search is limited to
// the offset range of each point with the spectral window: 0.02 is bin 41 for the
// 512-point FFT, 0.03 with D = 2 is bin 123 (bins +-45 and +-127 are searched). With
// the full search, noise bins win in about one burst of six at 3 dB.
//
// Checks, against the BER of ideal coherent QPSK, Q(sqrt(Es/N0)): at 5 dB REF, INT,
// DD and SRR at 0.01 must stay within 30 % of it. At 3 dB the bound is twice the
// ideal BER: there the M-th power estimator loses the spectral peak to noise in some
// bursts (about 8 % of 300-symbol bursts in a floating-point model of the same
// method, with the window below), and such a burst has about half its bits wrong.
// SRR at 0.03 is only reported: summing D samples of a fast-turning tone loses
// energy, so it degrades there. The statistics are from NBU * 600 bits per point, so
// the bounds are loose on purpose.
// Prints one line per technique and level.
module tb_ber_workload;
  import cs_pkg::*;

  localparam int N = 512, SW = 12, M = 4, L = 300, NBU = 12;
  localparam real PI = 3.14159265358979323846;
  localparam real AMP = 800.0;
  localparam int NPT = 10;  // measurement points

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous reset acts before the first clock
  always #5 clk = ~clk;

  logic in_valid, in_sof, in_last, in_ready;
  tech_e in_tech;
  logic signed [SW-1:0] in_re, in_im;
  logic [8:0] cfg_w_u, cfg_w_l;
  logic out_valid, out_sof, out_last;
  logic signed [SW:0] out_re, out_im;
  logic signed [FREQ_W-1:0] used_dphi, dd_dphi, est_dphi;
  logic [PHASE_W-1:0] used_phi, dd_phi, est_phi;
  logic est_take;
  logic [8:0] est_kf;
  logic signed [10:0] est_delta;

  carrier_sync_core dut (.*);

  // The spectral window (Eq. (8) of the method) is set to the offset range known for
  // each measurement point, for the frame that is streaming through the peak search.
  // Frames are counted at their first bin.
  int cb = 0, wb;
  always @(posedge clk) if (dut.f_valid && dut.f_sof) cb++;
  assign wb      = (dut.f_valid && dut.f_sof) ? cb : cb - 1;
  assign cfg_w_u = 9'(p_win[(wb < 0 ? 0 : wb) / NBU]);
  assign cfg_w_l = 9'(N - p_win[(wb < 0 ? 0 : wb) / NBU]);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1000000)) + 1.0) / 1000002.0;
    u2 = real'($urandom_range(1000000)) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  // Q function via the complementary error function (Abramowitz-Stegun 7.1.26).
  function automatic real qfunc(input real x);
    real t, y, z;
    z = x / $sqrt(2.0);
    t = 1.0 / (1.0 + 0.3275911 * z);
    y = t * (0.254829592 + t * (-0.284496736 + t * (1.421413741 + t * (-1.453152027 + t * 1.061405429))));
    return 0.5 * y * $exp(-z * z);
  endfunction

  // measurement points: technique, Es/N0 in dB, fixed offset (0: random 0.01..0.02)
  tech_e p_tech [NPT] = '{TECH_REF, TECH_INT, TECH_DD, TECH_SRR, TECH_SRR,
                          TECH_REF, TECH_INT, TECH_DD, TECH_SRR, TECH_SRR};
  real   p_esn0 [NPT] = '{3.0, 3.0, 3.0, 3.0, 3.0, 5.0, 5.0, 5.0, 5.0, 5.0};
  real   p_foff [NPT] = '{0.0, 0.0, 0.0, 0.01, 0.03, 0.0, 0.0, 0.0, 0.01, 0.03};
  bit    p_chk  [NPT] = '{1, 1, 1, 1, 0, 1, 1, 1, 1, 0};
  // window half width in bins: largest offset times M*N (times D for SRR), plus 4
  int    p_win  [NPT] = '{45, 45, 45, 45, 127, 45, 45, 45, 45, 127};

  localparam int NB = NPT * NBU;
  int sym [NB][L];
  int bit_err [NPT];
  int n_lost [NPT];
  int gray [4] = '{0, 1, 3, 2};   // axis symbol 0..3 (angle k*90 degrees) to bit pair

  function automatic int popc2(input int v);
    return (v & 1) + ((v >> 1) & 1);
  endfunction

  // ---- stimulus ----
  initial begin
    in_valid = 0; in_sof = 0; in_last = 0; in_tech = TECH_REF; in_re = '0; in_im = '0;
    for (int b = 0; b < NB; b++)
      for (int l = 0; l < L; l++) sym[b][l] = int'($urandom_range(3));
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    for (int b = 0; b < NB; b++) begin
      int  p;
      real f, phi, sigma;
      p     = b / NBU;
      f     = (p_foff[p] != 0.0) ? p_foff[p] : 0.01 + 0.01 * real'($urandom_range(1000)) / 1000.0;
      if ($urandom_range(1) == 1) f = -f;
      phi   = 2.0 * PI * real'($urandom_range(1000)) / 1000.0;
      sigma = AMP / $sqrt(2.0 * $pow(10.0, p_esn0[p] / 10.0));
      for (int l = 0; l < L; l++) begin
        real a, sr, si;
        a  = 2.0 * PI * f * real'(l) + phi + PI / 2.0 * real'(sym[b][l]);
        sr = AMP * $cos(a) + sigma * gauss();
        si = AMP * $sin(a) + sigma * gauss();
        if (sr > 2047.0) sr = 2047.0;
        if (sr < -2048.0) sr = -2048.0;
        if (si > 2047.0) si = 2047.0;
        if (si < -2048.0) si = -2048.0;
        in_valid <= 1'b1;
        in_sof   <= (l == 0);
        in_last  <= (l == L - 1);
        in_tech  <= p_tech[p];
        in_re    <= SW'($rtoi(sr));
        in_im    <= SW'($rtoi(si));
        forever begin
          bit rdy;
          @(negedge clk);
          rdy = in_ready;
          @(posedge clk);
          if (rdy) break;
        end
      end
    end
    in_valid <= 1'b0;
    in_sof   <= 1'b0;
    in_last  <= 1'b0;
  end

  // ---- output monitor ----
  int ob = 0, ol = 0;
  int dec [L];
  always @(posedge clk) if (out_valid) begin
    int dsym;
    if (rabs(real'(out_re)) >= rabs(real'(out_im))) dsym = (out_re >= 0) ? 0 : 2;
    else                                            dsym = (out_im >= 0) ? 1 : 3;
    if (out_sof) ol = 0;
    dec[ol] = dsym;
    ol++;
    if (out_last) begin
      int best;
      check(ol == L, $sformatf("burst %0d length %0d", ob, ol));
      best = 2 * L;
      for (int amb = 0; amb < 4; amb++) begin
        int e;
        e = 0;
        for (int l = 0; l < L; l++)
          e += popc2(gray[dec[l]] ^ gray[(sym[ob][l] + amb) % 4]);
        if (e < best) best = e;
      end
      bit_err[ob / NBU] += best;
      if (best > L / 4) begin
        n_lost[ob / NBU]++;
        $display("burst %0d: %0d bit errors, applied f %f, peak bin %0d (peak lost)", ob, best,
                 real'(used_dphi) / real'(1 << FREQ_W), est_kf);
      end
      ob++;
      if (ob == NB) finish_test();
    end
  end

  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  task automatic finish_test();
    string tn [4] = '{"REF", "SRR", "INT", "DD"};
    for (int p = 0; p < NPT; p++) begin
      real ber, ideal, bound;
      ber   = real'(bit_err[p]) / real'(NBU * 2 * L);
      ideal = qfunc($sqrt($pow(10.0, p_esn0[p] / 10.0)));
      bound = (p_esn0[p] < 4.0) ? 2.0 : 1.3;
      $display("%-3s Es/N0 = %.1f dB offset %s: BER %.4f, ideal %.4f (%0d bit errors, %0d of %0d bursts lost the peak)",
               tn[p_tech[p]], p_esn0[p], (p_foff[p] != 0.0) ? $sformatf("%.2f", p_foff[p]) : "0.01..0.02",
               ber, ideal, bit_err[p], n_lost[p], NBU);
      if (p_chk[p])
        check(ber <= bound * ideal, $sformatf("%s at %.1f dB: BER %.4f above %.1f x ideal %.4f",
                                              tn[p_tech[p]], p_esn0[p], ber, bound, ideal));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (NB * 1500 + 5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d bursts out", ob);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
