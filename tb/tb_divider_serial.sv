// Test of the serial divider: random dividends and divisors (including divisors of
// 1, larger than the dividend and zero) are divided one after the other; the quotient
// is compared with the integer division of the testbench and the time to done with
// NW+2 clock edges, counting the edge that takes start.
module tb_divider_serial;
  localparam int NW = 24, DW = 11, NT = 400;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous reset acts before the first clock
  always #5 clk = ~clk;

  logic start = 1'b0, busy, done;
  logic [NW-1:0] num = '0, quot;
  logic [DW-1:0] den = '0;

  divider_serial #(.NW(NW), .DW(DW)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < NT; t++) begin
      longint n, d, q;
      int lat;
      n = longint'($urandom_range(32'hffffff));
      d = longint'($urandom_range(2047));
      if (t == 0) d = 1;
      if (t == 1) d = 0;
      if (t == 2) begin n = 5; d = 700; end
      start <= 1'b1; num <= NW'(n); den <= DW'(d);
      @(posedge clk);
      start <= 1'b0;
      lat = 0;
      do begin @(posedge clk); lat++; end while (!done);
      q = (d == 0) ? longint'({NW{1'b1}}) : n / d;
      checks += 2;
      if (longint'(quot) != q) begin
        failures++; $display("FAIL %0d/%0d = %0d, expected %0d", n, d, quot, q);
      end
      if (lat != NW + 2) begin
        failures++; $display("FAIL latency %0d", lat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NT * (NW + 4) + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
