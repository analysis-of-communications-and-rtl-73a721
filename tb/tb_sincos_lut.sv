// Test of the sine/cosine table: every entry of a 1024-point table is compared with
// cos and sin computed in floating point (within 1 LSB), and phases between entries
// are checked to round to the nearest entry.
module tb_sincos_lut;
  localparam int PW = 16, AW = 10, CW = 16;
  localparam real PI = 3.14159265358979323846;

  logic [PW-1:0] phase;
  logic signed [CW-1:0] cos_o, sin_o;
  sincos_lut #(.PW(PW), .AW(AW), .CW(CW)) dut (.*);

  int checks = 0, failures = 0;
  real amp = 32767.0;

  initial begin
    for (int i = 0; i < (1 << AW); i++) begin
      // i-th entry, approached from slightly below and slightly above
      for (int off = -31; off <= 31; off += 62) begin
        real a, ec, es;
        phase = PW'(i * 64 + off);
        #1;
        a  = 2.0 * PI * real'(i) / 1024.0;
        ec = amp * $cos(a);
        es = amp * $sin(a);
        checks += 2;
        if (real'(cos_o) - ec > 1.0 || ec - real'(cos_o) > 1.0) begin
          failures++; $display("FAIL cos %0d: %0d vs %f", i, cos_o, ec);
        end
        if (real'(sin_o) - es > 1.0 || es - real'(sin_o) > 1.0) begin
          failures++; $display("FAIL sin %0d: %0d vs %f", i, sin_o, es);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
