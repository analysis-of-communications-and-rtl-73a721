// Test of the streaming FFT at N = 64: three frames of random complex samples, the
// first sent contiguously and followed by a pause, the second with random gaps, the
// third directly after the second, then the input goes idle (the FFT must flush on its own). Every bin is
// compared with the DFT of Eq. (4) divided by N, computed in floating point (within
// 6 LSB), each bin index must appear once per frame, and the last bin of a frame
// must leave within N + log2(N) + 4 clocks of the frame's last input.
module tb_fft_r2sdf;
  localparam int N = 64, DW = 18, NF = 3, LOGN = 6;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous reset acts before the first clock
  always #5 clk = ~clk;

  logic in_valid = 1'b0, in_sof = 1'b0, out_valid, out_sof;
  logic signed [DW-1:0] in_re = '0, in_im = '0, out_re, out_im;
  logic [LOGN-1:0] out_k;

  fft_r2sdf #(.N(N), .DW(DW)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int xr [NF][N], xi [NF][N];
  real er [NF][N], ei [NF][N];
  int t_end [NF];
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int f = 0; f < NF; f++) begin
      for (int n = 0; n < N; n++) begin
        xr[f][n] = int'($urandom_range(8000)) - 4000;
        xi[f][n] = int'($urandom_range(8000)) - 4000;
      end
      for (int k = 0; k < N; k++) begin
        er[f][k] = 0.0; ei[f][k] = 0.0;
        for (int n = 0; n < N; n++) begin
          real a;
          a = -2.0 * PI * real'(k * n) / real'(N);
          er[f][k] += real'(xr[f][n]) * $cos(a) - real'(xi[f][n]) * $sin(a);
          ei[f][k] += real'(xr[f][n]) * $sin(a) + real'(xi[f][n]) * $cos(a);
        end
        er[f][k] /= real'(N); ei[f][k] /= real'(N);
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < NF; f++) begin
      for (int n = 0; n < N; n++) begin
        if (f == 1 && $urandom_range(3) == 0) begin
          in_valid <= 1'b0;
          repeat (1 + $urandom_range(3)) @(posedge clk);
        end
        in_valid <= 1'b1; in_sof <= (n == 0);
        in_re <= DW'(xr[f][n]); in_im <= DW'(xi[f][n]);
        @(posedge clk);
      end
      t_end[f] = cyc;
      if (f == 0) begin  // idle between frames 0 and 1
        in_valid <= 1'b0;
        repeat (100) @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    in_sof <= 1'b0;
  end

  int fo = -1, nb = 0;
  bit seen [N];
  always @(posedge clk) if (out_valid) begin
    real dr, di;
    if (out_sof) begin
      fo++; nb = 0;
      for (int k = 0; k < N; k++) seen[k] = 1'b0;
    end
    dr = real'(out_re) - er[fo][out_k];
    di = real'(out_im) - ei[fo][out_k];
    checks += 2;
    if (dr > 6.0 || dr < -6.0 || di > 6.0 || di < -6.0) begin
      failures++;
      $display("FAIL frame %0d bin %0d: (%0d,%0d) vs (%f,%f)", fo, out_k, out_re, out_im,
               er[fo][out_k], ei[fo][out_k]);
    end
    if (seen[out_k]) begin
      failures++; $display("FAIL frame %0d bin %0d twice", fo, out_k);
    end
    seen[out_k] = 1'b1;
    nb++;
    if (nb == N) begin
      checks++;
      if (cyc - t_end[fo] > N + LOGN + 4) begin
        failures++; $display("FAIL frame %0d latency %0d", fo, cyc - t_end[fo]);
      end
      if (fo == NF - 1) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (NF * N * 4 + 500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
