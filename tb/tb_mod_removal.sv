// Test of the modulation removal at N = 64, M = 4, D = 2. Three bursts of random
// samples (magnitude 300 and more): a plain burst of 40 samples, an SRR burst of 41
// samples (20 pair sums and one single sample) and a plain burst of 70 samples,
// longer than the FFT. Each frame must hold exactly N samples: the expected
// K*|r|*exp(j*4*arg r) values (or their pair sums), computed in floating point
// (within 20 LSB per summand, the table has 1024 points), then zeros. in_ready must
// be low from the last sample until GAP clocks after the padding (checked through the
// clocks the next burst waits), and the first output must follow its input by
// CORDIC_ITER+3 register stages (one sample more for an SRR pair; the count allows
// two clocks of slack for the testbench's sampling of its clock counter).
module tb_mod_removal;
  localparam int SW = 12, M = 4, D = 2, N = 64, DW = 18, ITER = 14, GAP = 10, NBU = 3;
  localparam real PI = 3.14159265358979323846, K = 1.6467602581;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous reset acts before the first clock
  always #5 clk = ~clk;

  logic in_valid = 1'b0, in_sof = 1'b0, in_last = 1'b0, in_srr = 1'b0, in_ready;
  logic signed [SW-1:0] in_re = '0, in_im = '0;
  logic out_valid, out_sof;
  logic signed [DW-1:0] out_re, out_im;

  mod_removal #(.SW(SW), .M(M), .D(D), .N(N), .DW(DW), .CORDIC_ITER(ITER), .GAP(GAP)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int  blen [NBU] = '{40, 41, 70};
  bit  bsrr [NBU] = '{1'b0, 1'b1, 1'b0};
  real yr [NBU][N], yi [NBU][N];
  int  ny [NBU];
  int  xr [NBU][80], xi [NBU][80];
  int  t_sof [NBU];
  int  n_notready = 0;

  initial begin
    for (int b = 0; b < NBU; b++) begin
      for (int k = 0; k < N; k++) begin yr[b][k] = 0.0; yi[b][k] = 0.0; end
      for (int l = 0; l < blen[b]; l++) begin
        real m, a;
        int k;
        do begin
          xr[b][l] = int'($urandom_range(4000)) - 2000;
          xi[b][l] = int'($urandom_range(4000)) - 2000;
        end while (xr[b][l] * xr[b][l] + xi[b][l] * xi[b][l] < 90000);
        m = K * $sqrt(real'(xr[b][l] * xr[b][l] + xi[b][l] * xi[b][l]));
        a = real'(M) * $atan2(real'(xi[b][l]), real'(xr[b][l]));
        k = bsrr[b] ? l / D : l;
        if (k < N) begin
          yr[b][k] += m * $cos(a);
          yi[b][k] += m * $sin(a);
        end
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int b = 0; b < NBU; b++) begin
      for (int l = 0; l < blen[b]; l++) begin
        in_valid <= 1'b1; in_sof <= (l == 0); in_last <= (l == blen[b] - 1);
        in_srr <= bsrr[b]; in_re <= SW'(xr[b][l]); in_im <= SW'(xi[b][l]);
        forever begin
          bit rdy;
          @(negedge clk);
          rdy = in_ready;
          @(posedge clk);
          if (rdy) break;
          n_notready++;
        end
        if (l == 0) t_sof[b] = cyc;
      end
    end
    in_valid <= 1'b0; in_sof <= 1'b0; in_last <= 1'b0;
  end

  int fo = -1, nk = 0;
  always @(posedge clk) if (out_valid) begin
    real tol;
    if (out_sof) begin
      if (fo >= 0) begin
        checks++;
        if (nk != N) begin failures++; $display("FAIL frame %0d has %0d samples", fo, nk); end
      end
      fo++; nk = 0;
      checks++;
      if (cyc - t_sof[fo] < ITER + 4 || cyc - t_sof[fo] > ITER + 6) begin
        failures++; $display("FAIL frame %0d latency %0d", fo, cyc - t_sof[fo]);
      end
    end
    tol = bsrr[fo] ? 40.0 : 20.0;
    checks += 2;
    if (real'(out_re) - yr[fo][nk] > tol || yr[fo][nk] - real'(out_re) > tol ||
        real'(out_im) - yi[fo][nk] > tol || yi[fo][nk] - real'(out_im) > tol) begin
      failures++;
      $display("FAIL frame %0d sample %0d: (%0d,%0d) vs (%f,%f)", fo, nk, out_re, out_im,
               yr[fo][nk], yi[fo][nk]);
    end
    nk++;
    if (fo == NBU - 1 && nk == N) begin
      checks += 2;
      if (n_notready < (N - 40) + GAP + (N - 21) + GAP) begin
        failures++; $display("FAIL in_ready low only %0d clocks", n_notready);
      end
      repeat (3) @(posedge clk);
      if (out_valid) begin failures++; $display("FAIL extra samples"); end
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
