// Test of the spectral analysis at N = 64, M = 4, D = 2. For each case the testbench
// computes the N bins of a zero-padded complex exponential (40 samples, frequency nu
// bins, start phase th) in floating point and streams them in bit-reversed order,
// as the FFT delivers them. It then computes, on its own, the windowed peak bin, the
// interpolation Delta of Eq. (14), the virtual bin of Eq. (15), the frequency
// (k_f + Delta)/(M*N*D') and the phase arg(X)/M (minus pi*f*(D-1) for SRR) and
// compares them with the block's outputs. Cases: REF, INT towards either neighbour,
// SRR, and a window that excludes the true peak. The estimate is held back for a
// while by est_ready to check that est_valid stays up.
module tb_spectral_analysis;
  import cs_pkg::*;
  localparam int N = 64, DW = 18, M = 4, D = 2, DFB = 10, LOGN = 6, NC = 5;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous reset acts before the first clock
  always #5 clk = ~clk;

  logic bin_valid = 1'b0;
  logic [LOGN-1:0] bin_k = '0, w_u, w_l;
  logic signed [DW-1:0] bin_re = '0, bin_im = '0;
  tech_e tech;
  logic est_valid, est_ready = 1'b0;
  logic signed [FREQ_W-1:0] est_dphi;
  logic [PHASE_W-1:0] est_phi;
  logic [LOGN-1:0] est_kf;
  logic signed [DFB:0] est_delta;

  spectral_analysis #(.N(N), .DW(DW), .M(M), .D(D), .DFB(DFB)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real wrap(input real x);  // to [-0.5, 0.5)
    while (x >= 0.5) x -= 1.0;
    while (x < -0.5) x += 1.0;
    return x;
  endfunction

  tech_e c_tech [NC] = '{TECH_REF, TECH_INT, TECH_INT, TECH_SRR, TECH_REF};
  real   c_nu   [NC] = '{10.3, 10.3, -7.6, 5.2, 10.3};
  real   c_th   [NC] = '{0.4, -1.0, 2.0, 0.7, 0.1};
  int    c_wu   [NC] = '{31, 31, 31, 31, 3};

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int c = 0; c < NC; c++) begin
      real xr [N], xi [N], e [N];
      int kf, kl, kr, ks, wait_cyc;
      real el, ec, er, dl, vr, vi, fexp, phexp, fgot, phgot;
      tech = c_tech[c];
      w_u = LOGN'(c_wu[c]);
      w_l = LOGN'(N - 1 - c_wu[c]);
      if (c_wu[c] == 31) w_l = LOGN'(32);
      for (int k = 0; k < N; k++) begin
        xr[k] = 0.0; xi[k] = 0.0;
        for (int n = 0; n < 40; n++) begin
          real a;
          a = 2.0 * PI * (c_nu[c] - real'(k)) * real'(n) / real'(N) + c_th[c];
          xr[k] += 100.0 * $cos(a);
          xi[k] += 100.0 * $sin(a);
        end
        xr[k] = real'($rtoi(xr[k])); xi[k] = real'($rtoi(xi[k]));
        e[k] = xr[k] * xr[k] + xi[k] * xi[k];
      end
      // reference estimate
      kf = -1;
      for (int k = 0; k < N; k++)
        if ((k <= int'(w_u) || k >= int'(w_l)) && (kf < 0 || e[k] > e[kf])) kf = k;
      kl = (kf + N - 1) % N; kr = (kf + 1) % N;
      el = e[kl]; ec = e[kf]; er = e[kr];
      dl = 0.0;
      if (tech == TECH_INT) begin
        dl = 0.5 * (er - el) / (2.0 * ec - er - el);
        if (dl > 0.5) dl = 0.5;
        if (dl < -0.5) dl = -0.5;
      end
      if (dl >= 0.0) begin vr = xr[kf] + dl * (xr[kr] - xr[kf]); vi = xi[kf] + dl * (xi[kr] - xi[kf]); end
      else begin vr = xr[kf] - dl * (xr[kl] - xr[kf]); vi = xi[kf] - dl * (xi[kl] - xi[kf]); end
      ks = (kf >= N / 2) ? kf - N : kf;
      fexp = (real'(ks) + dl) / real'(M * N * ((tech == TECH_SRR) ? D : 1));
      phexp = $atan2(vi, vr) / (2.0 * PI) / real'(M);
      if (tech == TECH_SRR) phexp -= fexp * real'(D - 1) / 2.0;
      // stream the bins in bit-reversed order
      for (int p = 0; p < N; p++) begin
        int k;
        k = int'(bitrev(32'(p), LOGN));
        bin_valid <= 1'b1; bin_k <= LOGN'(k);
        bin_re <= DW'($rtoi(xr[k])); bin_im <= DW'($rtoi(xi[k]));
        @(posedge clk);
      end
      bin_valid <= 1'b0;
      wait_cyc = 0;
      while (!est_valid) begin @(posedge clk); wait_cyc++; end
      repeat (5) @(posedge clk);
      check(est_valid, $sformatf("case %0d: est_valid dropped before est_ready", c));
      fgot  = real'(est_dphi) / real'(1 << FREQ_W);
      phgot = real'(est_phi) / 65536.0;
      check(int'(est_kf) == kf, $sformatf("case %0d: kf %0d vs %0d", c, est_kf, kf));
      check(wrap(fgot - fexp) * real'(M * N) < 0.004 && wrap(fgot - fexp) * real'(M * N) > -0.004,
            $sformatf("case %0d: f %f vs %f", c, fgot, fexp));
      check(wrap(phgot - phexp) * 65536.0 < 12.0 && wrap(phgot - phexp) * 65536.0 > -12.0,
            $sformatf("case %0d: phase %f vs %f turns", c, phgot, phexp));
      check(wait_cyc < 120, $sformatf("case %0d: estimate took %0d clocks", c, wait_cyc));
      $display("case %0d: kf=%0d delta=%0d f=%f (%f) phi=%f (%f)", c, est_kf, est_delta,
               fgot, fexp, phgot, phexp);
      est_ready <= 1'b1;
      @(posedge clk);
      est_ready <= 1'b0;
      @(posedge clk);
      check(!est_valid, $sformatf("case %0d: est_valid stayed after est_ready", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NC * 300 + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
