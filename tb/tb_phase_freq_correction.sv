// Test of the phase/frequency correction with 64-sample banks, QPSK. The testbench
// models the buffer (one clock read latency, a full flag, release). Case 1 (plain
// correction): random samples and an arbitrary estimate; every output must equal
// r(l)*exp(-j*2*pi*(phi + l*dphi)) computed in floating point (within 2 LSB plus the
// |r|*pi/1024 that the 1024-point table's phase rounding allows), and the first output must follow the estimate hand-over
// within 6 clocks. Case 2 (DD): QPSK symbols with a residual frequency and phase left
// after the given estimate; the residual step found must match the true one within
// 3 %, the corrected symbols must lie within 2 degrees of the axes, and the outputs
// must again match the formula with the parameters the block reports it applied.
module tb_phase_freq_correction;
  import cs_pkg::*;
  localparam int SW = 12, LMAX = 64, M = 4, AW = 6;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous reset acts before the first clock
  always #5 clk = ~clk;

  logic est_valid = 1'b0, est_ready;
  logic signed [FREQ_W-1:0] est_dphi = '0, used_dphi, dd_dphi;
  logic [PHASE_W-1:0] est_phi = '0, used_phi, dd_phi;
  logic bank_full = 1'b0, bank_dd = 1'b0, release_bank;
  logic [AW:0] bank_len = '0;
  logic [AW-1:0] rd_addr;
  logic signed [SW-1:0] rd_re = '0, rd_im = '0;
  logic out_valid, out_sof, out_last;
  logic signed [SW:0] out_re, out_im;

  phase_freq_correction #(.SW(SW), .LMAX(LMAX), .M(M)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int mre [LMAX], mim [LMAX];
  always @(posedge clk) begin  // buffer model
    rd_re <= SW'(mre[rd_addr]);
    rd_im <= SW'(mim[rd_addr]);
  end

  int t_take;
  always @(posedge clk) if (est_ready) t_take = cyc;

  task automatic run_case(input bit dd, input int len, input real f_res, input real ph_res);
    int nout;
    real maxdev;
    nout = 0; maxdev = 0.0;
    for (int l = 0; l < len; l++) begin
      if (dd) begin
        real a;
        a = 2.0 * PI * (real'(est_dphi) / real'(1 << FREQ_W) + f_res) * real'(l)
            + 2.0 * PI * real'(est_phi) / 65536.0 + ph_res + PI / 2.0 * real'($urandom_range(3));
        mre[l] = $rtoi(1000.0 * $cos(a));
        mim[l] = $rtoi(1000.0 * $sin(a));
      end else begin
        mre[l] = int'($urandom_range(4095)) - 2048;
        mim[l] = int'($urandom_range(4095)) - 2048;
      end
    end
    bank_full <= 1'b1; bank_len <= (AW+1)'(len); bank_dd <= dd;
    est_valid <= 1'b1;
    @(posedge clk);
    while (!est_ready) @(posedge clk);
    est_valid <= 1'b0;
    forever begin
      @(posedge clk);
      if (out_valid) begin
        real a, er, ei, dr, di, ang, tol;
        if (out_sof) begin
          check(nout == 0, "sof not on the first sample");
          if (!dd) check(cyc - t_take <= 6, $sformatf("first output %0d clocks after hand-over", cyc - t_take));
        end
        a = 2.0 * PI * (real'(used_phi) / 65536.0 + real'(used_dphi) / real'(1 << FREQ_W) * real'(nout));
        er = real'(mre[nout]) * $cos(a) + real'(mim[nout]) * $sin(a);
        ei = real'(mim[nout]) * $cos(a) - real'(mre[nout]) * $sin(a);
        dr = real'(out_re) - er; di = real'(out_im) - ei;
        // table phase step 1/1024 turn: rounding moves a sample by up to |r|*pi/1024
        tol = 2.0 + $sqrt(er * er + ei * ei) * PI / 1024.0;
        check(dr < tol && dr > -tol && di < tol && di > -tol,
              $sformatf("sample %0d: (%0d,%0d) vs (%f,%f)", nout, out_re, out_im, er, ei));
        if (dd) begin
          ang = $atan2(real'(out_im), real'(out_re)) * 180.0 / PI;
          while (ang > 45.0) ang -= 90.0;
          while (ang < -45.0) ang += 90.0;
          if (ang > maxdev) maxdev = ang;
          if (-ang > maxdev) maxdev = -ang;
        end
        nout++;
        if (out_last) break;
      end
    end
    check(nout == len, $sformatf("%0d outputs", nout));
    @(posedge clk);
    if (dd) begin
      real fr;
      fr = real'(dd_dphi) / real'(1 << FREQ_W);
      check(fr > f_res * 0.97 && fr < f_res * 1.03, $sformatf("DD residual %f vs %f", fr, f_res));
      check(maxdev < 2.0, $sformatf("DD symbols off the axes by %f deg", maxdev));
      $display("DD: residual f %f (true %f), max deviation %.3f deg", fr, f_res, maxdev);
    end
    bank_full <= 1'b0;
    @(posedge clk);
  endtask

  int n_release = 0;
  always @(posedge clk) if (rst_n && release_bank) n_release++;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    est_dphi <= 24'sd123457; est_phi <= 16'd40000;
    @(posedge clk);
    run_case(1'b0, 50, 0.0, 0.0);
    est_dphi <= -24'sd80000; est_phi <= 16'd3000;
    @(posedge clk);
    run_case(1'b1, 64, 0.0012, 0.2);
    check(n_release == 2, $sformatf("%0d bank releases", n_release));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
