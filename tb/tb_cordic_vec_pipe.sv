// Test of the pipelined vectoring CORDIC: random 12-bit samples (magnitude above 200
// so the input quantisation does not dominate) are fed one per clock; every output is
// compared with K*|r| and atan2 computed in floating point, and the latency is
// checked through the tag, which carries the input's index: ITER+1 register stages,
// ITER+2 in the testbench's count, whose clock counter is read before the input edge.
module tb_cordic_vec_pipe;
  localparam int IW = 12, PW = 16, ITER = 14, MW = IW + 2, NS = 2000;
  localparam real PI = 3.14159265358979323846, K = 1.6467602581;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous reset acts before the first clock
  always #5 clk = ~clk;

  logic in_valid = 1'b0, out_valid;
  logic signed [IW-1:0] in_re = '0, in_im = '0;
  logic [15:0] in_tag = '0, out_tag;
  logic [MW-1:0] out_mag;
  logic [PW-1:0] out_phase;

  cordic_vec_pipe #(.IW(IW), .PW(PW), .ITER(ITER), .TAG_W(16), .MW(MW)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int xr [NS], xi [NS], tin [NS];
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int i = 0; i < NS; i++) begin
      do begin
        xr[i] = int'($urandom_range(4095)) - 2048;
        xi[i] = int'($urandom_range(4095)) - 2048;
      end while (xr[i] * xr[i] + xi[i] * xi[i] < 40000);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < NS; i++) begin
      in_valid <= 1'b1; in_re <= IW'(xr[i]); in_im <= IW'(xi[i]); in_tag <= 16'(i);
      tin[i] = cyc;
      @(posedge clk);
    end
    in_valid <= 1'b0;
  end

  int nout = 0;
  always @(posedge clk) if (out_valid) begin
    int i;
    real m, a, got, d;
    i = int'(out_tag);
    m = K * $sqrt(real'(xr[i] * xr[i] + xi[i] * xi[i]));
    a = $atan2(real'(xi[i]), real'(xr[i])) / (2.0 * PI);
    if (a < 0) a += 1.0;
    got = real'(out_phase) / 65536.0;
    d = got - a;
    if (d > 0.5) d -= 1.0;
    if (d < -0.5) d += 1.0;
    checks += 3;
    if ((real'(out_mag) - m) > 3.0 || (m - real'(out_mag)) > 3.0) begin
      failures++; $display("FAIL mag %0d: %0d vs %f", i, out_mag, m);
    end
    if (d * 65536.0 > 30.0 || d * 65536.0 < -30.0) begin
      failures++; $display("FAIL phase %0d: %0d vs %f", i, out_phase, a * 65536.0);
    end
    if (cyc - tin[i] != ITER + 2) begin
      failures++; $display("FAIL latency %0d", cyc - tin[i]);
    end
    nout++;
    if (nout == NS) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (NS + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
