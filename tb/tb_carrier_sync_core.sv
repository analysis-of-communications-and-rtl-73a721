// End-to-end test of the carrier synchronization core at its default size
// (N = 512, QPSK, D = 2). Bursts of axis-aligned QPSK symbols with a known frequency
// and phase offset are sent back to back, one per technique and a few extra cases
// (worst case between two bins, negative offset, interpolation towards either side,
// a restricted spectral window, noise). For each corrected burst the testbench
// checks, against the offsets it generated itself:
//  - the applied frequency, within a technique-dependent tolerance in FFT bins,
//  - the symbols after correction (up to the M-fold phase ambiguity, found from the
//    first symbol): no decision errors,
//  - the largest residual phase error over the burst,
//  - the time from the burst's last input to its last output,
//  - the spacing of bursts that follow a REF or INT burst: the core must take a
//    new burst about every N clocks (N plus the modulation removal pipeline) as
//    long as a buffer bank is free.
// It also counts the mechanisms of the design and fails if one never happened:
// each technique, input back-pressure, waiting for a buffer bank, positive and negative interpolation, a
// window that excluded the true bin, a non-zero DD correction.
module tb_carrier_sync_core;
  import cs_pkg::*;

  localparam int N = 512, SW = 12, M = 4, D = 2, LMAX = 1024;
  localparam int NB = 10;
  localparam real PI = 3.14159265358979323846;

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

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- burst plan ----
  tech_e b_tech [NB];
  real   b_f    [NB];
  real   b_phi  [NB];
  int    b_len  [NB];
  real   b_ftol [NB];   // frequency tolerance in bins of 1/(M*N)
  real   b_ptol [NB];   // largest residual phase, degrees
  int    b_wu   [NB], b_wl [NB];
  int    b_noise[NB];
  int    sym    [NB][LMAX];
  int    t_last [NB];
  int    t_first [NB];

  initial begin
    // tech       f                      phi   L    ftol  ptol  w_u  w_l  noise
    b_tech[0]=TECH_REF; b_f[0]= 0.0100;          b_phi[0]= 0.30; b_len[0]=300; b_ftol[0]=0.52; b_ptol[0]=20;
    b_tech[1]=TECH_REF; b_f[1]= 10.5/(M*N);      b_phi[1]=-0.50; b_len[1]=300; b_ftol[1]=0.52; b_ptol[1]=20;
    b_tech[2]=TECH_INT; b_f[2]= 10.5/(M*N);      b_phi[2]= 0.10; b_len[2]=300; b_ftol[2]=0.15; b_ptol[2]=8;
    b_tech[3]=TECH_INT; b_f[3]=-33.3/(M*N);      b_phi[3]= 0.70; b_len[3]=300; b_ftol[3]=0.15; b_ptol[3]=8;
    b_tech[4]=TECH_INT; b_f[4]= 40.3/(M*N);      b_phi[4]=-0.20; b_len[4]=300; b_ftol[4]=0.15; b_ptol[4]=8;
    b_tech[5]=TECH_DD;  b_f[5]= 10.5/(M*N);      b_phi[5]= 0.40; b_len[5]=300; b_ftol[5]=0.05; b_ptol[5]=5;
    b_tech[6]=TECH_SRR; b_f[6]= 0.0100;          b_phi[6]=-0.60; b_len[6]=300; b_ftol[6]=0.26; b_ptol[6]=12;
    b_tech[7]=TECH_DD;  b_f[7]=-0.0171;          b_phi[7]= 0.05; b_len[7]=256; b_ftol[7]=0.06; b_ptol[7]=8;
    b_tech[8]=TECH_REF; b_f[8]= 0.0150;          b_phi[8]= 0.20; b_len[8]=300; b_ftol[8]=0.52; b_ptol[8]=20;
    b_tech[9]=TECH_REF; b_f[9]= 0.0150;          b_phi[9]= 0.20; b_len[9]=300; b_ftol[9]=0.52; b_ptol[9]=20;
    for (int b = 0; b < NB; b++) begin
      b_wu[b] = N/2 - 1; b_wl[b] = N/2; b_noise[b] = 0;
      for (int l = 0; l < b_len[b]; l++) sym[b][l] = int'($urandom_range(3));
    end
    b_noise[8] = 60;   // mild noise, Es/N0 about 25 dB
    b_wu[9] = 20; b_wl[9] = N - 20;  // true bin 30.7 lies outside the window
  end

  // ---- mechanism counters ----
  int n_tech [4];
  int n_backpressure = 0, n_delta_pos = 0, n_delta_neg = 0, n_window = 0, n_dd_nonzero = 0;
  int n_fullrate = 0, n_bufstall = 0;
  bit buf_stall;

  // ---- stimulus ----
  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1000000)) + 1.0) / 1000002.0;
    u2 = real'($urandom_range(1000000)) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  localparam real AMP = 1400.0;

  initial begin
    in_valid = 0; in_sof = 0; in_last = 0; in_tech = TECH_REF; in_re = '0; in_im = '0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    for (int b = 0; b < NB; b++) begin
      buf_stall = 1'b0;
      for (int l = 0; l < b_len[b]; l++) begin
        real a, sr, si;
        a  = 2.0 * PI * (b_f[b] * real'(l)) + b_phi[b] + PI / 2.0 * real'(sym[b][l]);
        sr = AMP * $cos(a) + real'(b_noise[b]) * gauss();
        si = AMP * $sin(a) + real'(b_noise[b]) * gauss();
        in_valid <= 1'b1;
        in_sof   <= (l == 0);
        in_last  <= (l == b_len[b] - 1);
        in_tech  <= b_tech[b];
        in_re    <= SW'($rtoi(sr));
        in_im    <= SW'($rtoi(si));
        // the sample is taken at the first rising edge with in_ready high
        forever begin
          bit rdy;
          @(negedge clk);
          rdy = in_ready;
          @(posedge clk);
          if (rdy) break;
          n_backpressure++;
          if (dut.mr_ready && !dut.wr_free) buf_stall = 1'b1;  // waiting only for a bank
        end
        if (l == 0) t_first[b] = cyc;
      end
      t_last[b] = cyc;
      if (buf_stall) n_bufstall++;
      // Throughput: a burst of L <= N samples after a REF or INT burst must be taken
      // within N clocks plus the modulation removal pipeline of the one before it,
      // unless it had to wait for a free buffer bank.
      if (b > 0 && b_len[b - 1] <= N && b_tech[b - 1] inside {TECH_REF, TECH_INT} && !buf_stall) begin
        check(t_first[b] - t_first[b - 1] <= N + 24,
              $sformatf("burst %0d started %0d clocks after burst %0d", b, t_first[b] - t_first[b - 1], b - 1));
        n_fullrate++;
      end
      if (b > 0) $display("burst %0d: first sample %0d clocks after the previous burst's", b, t_first[b] - t_first[b - 1]);
    end
    in_valid <= 1'b0;
    in_sof   <= 1'b0;
    in_last  <= 1'b0;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;


  // ---- estimate monitor ----
  // The window is quasi-static; it is set for the frame the spectral analysis is
  // collecting, which is the burst after the last one whose estimate was taken.
  int eb = 0;
  assign cfg_w_u = 9'(b_wu[eb < NB ? eb : 0]);
  assign cfg_w_l = 9'(b_wl[eb < NB ? eb : 0]);
  always @(posedge clk) if (est_take) begin
    if (b_wu[eb] != N/2 - 1) begin
      check(est_kf <= 9'(b_wu[eb]) || est_kf >= 9'(b_wl[eb]),
            $sformatf("burst %0d: peak bin %0d outside the window", eb, est_kf));
      n_window++;
    end
    if (b_tech[eb] == TECH_INT) begin
      if (est_delta > 0) n_delta_pos++;
      if (est_delta < 0) n_delta_neg++;
    end
    eb++;
  end

  // ---- output monitor ----
  int ob = 0, ol = 0, amb = 0;
  real maxerr = 0.0;
  int sym_err = 0;
  always @(posedge clk) if (out_valid) begin
    real er, ei, ang, ref_a;
    int dsym;
    if (out_sof) begin
      real fe;
      ol = 0; maxerr = 0.0; sym_err = 0;
      fe = real'(used_dphi) / real'(1 << FREQ_W);
      if (b_wu[ob] == N/2 - 1)
      check(rabs(fe - b_f[ob]) * real'(M * N) <= b_ftol[ob],
            $sformatf("burst %0d freq %f expected %f (tol %f bins)", ob, fe, b_f[ob], b_ftol[ob]));
      n_tech[b_tech[ob]]++;
      if (b_tech[ob] == TECH_DD && dd_dphi != 0) n_dd_nonzero++;
    end
    er = real'(out_re); ei = real'(out_im);
    // nearest axis decision
    if (rabs(er) >= rabs(ei)) dsym = (er >= 0) ? 0 : 2;
    else                      dsym = (ei >= 0) ? 1 : 3;
    if (ol == 0) amb = (dsym - sym[ob][0] + 4) % 4;
    if (dsym != (sym[ob][ol] + amb) % 4) sym_err++;
    ref_a = PI / 2.0 * real'(sym[ob][ol] + amb);
    ang = $atan2(ei * $cos(ref_a) - er * $sin(ref_a), er * $cos(ref_a) + ei * $sin(ref_a));
    if (rabs(ang) * 180.0 / PI > maxerr) maxerr = rabs(ang) * 180.0 / PI;
    ol++;
    if (out_last) begin
      check(ol == b_len[ob], $sformatf("burst %0d length %0d", ob, ol));
      if (b_wu[ob] == N/2 - 1) begin  // a window that misses the offset spoils the burst
        check(sym_err == 0, $sformatf("burst %0d: %0d symbol errors", ob, sym_err));
        check(maxerr <= b_ptol[ob], $sformatf("burst %0d: residual phase %f deg", ob, maxerr));
      end
      // latency: N-point frame plus pipeline; DD adds a second pass
      check(cyc - t_last[ob] < 3 * N + 2 * b_len[ob] + 400,
            $sformatf("burst %0d latency %0d", ob, cyc - t_last[ob]));
      $display("burst %0d tech %0d: f=%f est=%f kf=%0d maxerr=%.2f deg latency=%0d",
               ob, b_tech[ob], b_f[ob], real'(used_dphi) / real'(1 << FREQ_W), est_kf,
               maxerr, cyc - t_last[ob]);
      ob++;
      if (ob == NB) finish_test();
    end
  end

  task automatic finish_test();
    check(n_tech[TECH_REF] > 0, "REF never used");
    check(n_tech[TECH_SRR] > 0, "SRR never used");
    check(n_tech[TECH_INT] > 0, "INT never used");
    check(n_tech[TECH_DD]  > 0, "DD never used");
    check(n_backpressure > 0, "input back-pressure never happened");
    check(n_delta_pos > 0, "positive interpolation never happened");
    check(n_delta_neg > 0, "negative interpolation never happened");
    check(n_dd_nonzero > 0, "DD refinement never changed the frequency");
    check(n_window > 0, "restricted window never used");
    check(n_fullrate > 0, "back-to-back bursts at full rate never checked");
    check(n_bufstall > 0, "a burst never waited for a free buffer bank");
    $display("mechanisms: REF=%0d SRR=%0d INT=%0d DD=%0d backpressure=%0d delta+=%0d delta-=%0d dd=%0d window=%0d fullrate=%0d bufstall=%0d",
             n_tech[0], n_tech[1], n_tech[2], n_tech[3], n_backpressure, n_delta_pos,
             n_delta_neg, n_dd_nonzero, n_window, n_fullrate, n_bufstall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d bursts out", ob);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
