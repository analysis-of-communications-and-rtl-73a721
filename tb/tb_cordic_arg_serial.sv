// Test of the serial argument CORDIC: random 26-bit vectors of widely varying size
// (magnitude 1000 and more)
// are converted one after the other; each argument is compared with atan2 computed
// in floating point (within 4 LSB of a 16-bit turn) and the time to done with
// ITER+2 clock edges, counting the edge that takes start.
module tb_cordic_arg_serial;
  localparam int IW = 26, PW = 16, ITER = 16, NT = 500;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous reset acts before the first clock
  always #5 clk = ~clk;

  logic start = 1'b0, busy, done;
  logic signed [IW-1:0] in_re = '0, in_im = '0;
  logic [PW-1:0] phase;

  cordic_arg_serial #(.IW(IW), .PW(PW), .ITER(ITER)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < NT; t++) begin
      int xr, xi, sh, lat;
      real a, d;
      do begin
        sh = int'($urandom_range(14));
        xr = (int'($urandom_range(33554431)) - 16777216) >>> sh;
        xi = (int'($urandom_range(33554431)) - 16777216) >>> sh;
      end while (real'(xr) * real'(xr) + real'(xi) * real'(xi) < 1.0e6);
      start <= 1'b1; in_re <= IW'(xr); in_im <= IW'(xi);
      @(posedge clk);
      start <= 1'b0;
      lat = 0;
      do begin @(posedge clk); lat++; end while (!done);
      a = $atan2(real'(xi), real'(xr)) / (2.0 * PI);
      d = real'(phase) / 65536.0 - a;
      while (d > 0.5) d -= 1.0;
      while (d < -0.5) d += 1.0;
      checks += 2;
      if (d * 65536.0 > 4.0 || d * 65536.0 < -4.0) begin
        failures++; $display("FAIL arg (%0d,%0d): %0d vs %f", xr, xi, phase, a * 65536.0);
      end
      if (lat != ITER + 2) begin
        failures++; $display("FAIL latency %0d", lat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NT * (ITER + 4) + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
