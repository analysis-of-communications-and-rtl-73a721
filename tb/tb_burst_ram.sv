// Test of the burst buffer with three 16-sample banks: three bursts fill all banks
// (wr_free must then fall) and each bank's meta word is read back; the first burst
// is read at every address (one clock read latency) with its length and meta word,
// its bank is released and refilled, then the second, so the bank counters wrap; a
// burst longer than a bank has its length clamped. All bursts are read back in order
// and compared with what was written, and the bank indices are checked.
module tb_burst_ram;
  localparam int SW = 12, LMAX = 16, AW = 4, NBANK = 3, BW = 2, NBU = NBANK + 2;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a real falling edge, so the asynchronous reset acts before the first clock
  always #5 clk = ~clk;

  logic wr_valid = 1'b0, wr_sof = 1'b0, wr_last = 1'b0, wr_free;
  logic [BW-1:0] wr_bank, rd_bank, meta_bank = '0;
  logic [1:0] wr_meta = '0, rd_meta, meta_out;
  logic signed [SW-1:0] wr_re = '0, wr_im = '0, rd_re, rd_im;
  logic [AW-1:0] rd_addr = '0;
  logic rd_release = 1'b0, rd_full;
  logic [AW:0] rd_len;

  burst_ram #(.SW(SW), .LMAX(LMAX), .META_W(2), .NBANK(NBANK)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int dre [NBU][20], dim [NBU][20];
  int blen [NBU] = '{10, 16, 20, 7, 12};

  task automatic write_burst(input int b);
    check(int'(wr_bank) == b % NBANK, $sformatf("burst %0d: write bank %0d", b, wr_bank));
    check(wr_free, $sformatf("burst %0d: write bank not free", b));
    if (!wr_free) return;  // writing would break the buffer's rule; the failure is counted
    for (int l = 0; l < blen[b]; l++) begin
      wr_valid <= 1'b1; wr_sof <= (l == 0); wr_last <= (l == blen[b] - 1);
      wr_meta <= 2'(b + 1); wr_re <= SW'(dre[b][l]); wr_im <= SW'(dim[b][l]);
      @(posedge clk);
    end
    wr_valid <= 1'b0; wr_sof <= 1'b0; wr_last <= 1'b0;
    @(posedge clk);
  endtask

  task automatic read_burst(input int b);
    int len;
    len = (blen[b] > LMAX) ? LMAX : blen[b];
    check(rd_full, $sformatf("burst %0d: bank not full", b));
    check(int'(rd_bank) == b % NBANK, $sformatf("burst %0d: read bank %0d", b, rd_bank));
    check(int'(rd_len) == len, $sformatf("burst %0d: length %0d", b, rd_len));
    check(rd_meta == 2'(b + 1), $sformatf("burst %0d: meta %0d", b, rd_meta));
    for (int l = 0; l < len; l++) begin
      rd_addr <= AW'(l);
      @(posedge clk);
      @(negedge clk);
      check(int'(rd_re) == dre[b][l] && int'(rd_im) == dim[b][l],
            $sformatf("burst %0d addr %0d: (%0d,%0d)", b, l, rd_re, rd_im));
      @(posedge clk);
    end
    rd_release <= 1'b1;
    @(posedge clk);
    rd_release <= 1'b0;
    @(posedge clk);
  endtask

  initial begin
    for (int b = 0; b < NBU; b++)
      for (int l = 0; l < 20; l++) begin
        dre[b][l] = int'($urandom_range(4095)) - 2048;
        dim[b][l] = int'($urandom_range(4095)) - 2048;
      end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(!rd_full, "buffer not empty after reset");
    for (int b = 0; b < NBANK; b++) write_burst(b);
    @(negedge clk);
    check(!wr_free, "all banks full but wr_free high");
    for (int b = 0; b < NBANK; b++) begin
      meta_bank = BW'(b);
      @(negedge clk);
      check(meta_out == 2'(b + 1), $sformatf("meta word of bank %0d", b));
    end
    // release the oldest bank and refill it while the others stay full (wrap-around)
    read_burst(0);
    write_burst(NBANK);
    read_burst(1);
    write_burst(NBANK + 1);
    for (int b = 2; b < NBU; b++) read_burst(b);
    check(!rd_full, "buffer not empty at the end");
    check(wr_free, "empty buffer not free");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
