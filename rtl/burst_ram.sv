// Multi-bank burst buffer (the RAM of the core): NBANK banks used in turn, so that
// one burst can be written while earlier ones wait for their estimate or are being
// corrected. With NBANK = 3 a burst is written, the previous one is in the FFT and
// spectral analysis, and the one before that is corrected, all at once.
//
// Write side: samples wr_valid from wr_sof to wr_last go to consecutive addresses
// of bank wr_bank, starting at 0; wr_meta (here the burst's technique) is stored at
// wr_sof and the burst length at wr_last, which also marks the bank full and moves
// the write side to the next bank (modulo NBANK). wr_free tells whether that bank may
// take a new burst (it must not be full). Read side: rd_bank is the oldest full bank;
// rd_full, rd_len and rd_meta describe it; rd_re/rd_im are the sample at rd_addr one
// clock after the address (registered read, block RAM style). rd_release empties the
// bank and moves the read side on. meta_bank/meta_out read the stored meta word of
// any bank.
//
// The document gives the buffer's purpose (hide the FFT latency so that a new burst
// can be processed while the previous one is corrected); the bank count, the
// round-robin organisation, the length and meta words are this design's choice.
module burst_ram #(
  parameter int SW     = 12,
  parameter int LMAX   = 1024,
  parameter int META_W = 2,
  parameter int NBANK  = 3,
  localparam int BW    = (NBANK > 1) ? $clog2(NBANK) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // write
  input  logic                    wr_valid,
  input  logic                    wr_sof,
  input  logic                    wr_last,
  input  logic [META_W-1:0]       wr_meta,
  input  logic signed [SW-1:0]    wr_re,
  input  logic signed [SW-1:0]    wr_im,
  output logic                    wr_free,
  output logic [BW-1:0]           wr_bank,
  // read
  input  logic [$clog2(LMAX)-1:0] rd_addr,
  input  logic                    rd_release,
  output logic [BW-1:0]           rd_bank,
  output logic                    rd_full,
  output logic [$clog2(LMAX):0]   rd_len,
  output logic [META_W-1:0]       rd_meta,
  output logic signed [SW-1:0]    rd_re,
  output logic signed [SW-1:0]    rd_im,
  // meta word of any bank
  input  logic [BW-1:0]           meta_bank,
  output logic [META_W-1:0]       meta_out
);
  localparam int AW = $clog2(LMAX);

  logic [2*SW-1:0]   mem [NBANK*LMAX];
  logic [AW:0]       waddr;
  logic [NBANK-1:0]  full;
  logic [AW:0]       len  [NBANK];
  logic [META_W-1:0] meta [NBANK];

  function automatic logic [BW-1:0] next_bank(input logic [BW-1:0] b);
    return (b == BW'(NBANK - 1)) ? '0 : b + 1'b1;
  endfunction

  logic [AW:0] wa;
  assign wa = wr_sof ? '0 : waddr;

  always_ff @(posedge clk) begin
    if (wr_valid && wa < (AW+1)'(LMAX)) mem[{wr_bank, wa[AW-1:0]}] <= {wr_re, wr_im};
    {rd_re, rd_im} <= mem[{rd_bank, rd_addr}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waddr   <= '0;
      wr_bank <= '0;
      rd_bank <= '0;
      full    <= '0;
      for (int i = 0; i < NBANK; i++) begin
        len[i]  <= '0;
        meta[i] <= '0;
      end
    end else begin
      if (wr_valid) begin
        waddr <= wa + 1'b1;
        if (wr_sof) meta[wr_bank] <= wr_meta;
        if (wr_last) begin
          len[wr_bank]  <= (wa < (AW+1)'(LMAX)) ? wa + 1'b1 : (AW+1)'(LMAX);
          full[wr_bank] <= 1'b1;
          wr_bank       <= next_bank(wr_bank);
        end
      end
      if (rd_release) begin
        full[rd_bank] <= 1'b0;
        rd_bank       <= next_bank(rd_bank);
      end
    end
  end

  assign wr_free  = !full[wr_bank];
  assign rd_full  = full[rd_bank];
  assign rd_len   = len[rd_bank];
  assign rd_meta  = meta[rd_bank];
  assign meta_out = meta[meta_bank];

  a_write_free: assert property (@(posedge clk) disable iff (!rst_n)
    wr_valid && wr_sof |-> wr_free);

endmodule
