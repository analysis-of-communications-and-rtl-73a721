// N-point streaming FFT, Eq. (4), built as a radix-2 single-path delay-feedback
// pipeline: log2(N) stages with delay lines of N/2, N/4, ... 1 samples. It takes one
// sample per clock and delivers the N bins of each frame in bit-reversed order,
// tagged with their natural bin index k.
//
// A frame is N input samples, the first one marked by in_sof; gaps (in_valid low)
// inside a frame are allowed and stall the pipeline. After the last sample of a frame
// the FFT keeps clocking on its own (feeding zeros marked invalid) until that frame
// has fully left, so a frame never waits for its successor. A new in_sof may arrive
// at any time after the previous frame's last sample; it stops that self-clocking,
// and the new frame's samples push the rest of the previous frame out (so gaps in
// the new frame also delay the previous frame's last bins). Each stage scales by 1/2, so
// X(k) comes out divided by N. Latency from the last input to the last bin is about
// N + log2(N) clocks.
//
// The document uses a vendor pipelined FFT core and only states its function and
// its rate of one sample per cycle; the SDF structure, the scaling and the tagged
// streaming interface are this design's choices.
module fft_r2sdf #(
  parameter int N  = 512,
  parameter int DW = 18
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic                   in_sof,
  input  logic signed [DW-1:0]   in_re,
  input  logic signed [DW-1:0]   in_im,
  output logic                   out_valid,
  output logic                   out_sof,
  output logic [$clog2(N)-1:0]   out_k,
  output logic signed [DW-1:0]   out_re,
  output logic signed [DW-1:0]   out_im
);
  localparam int LOGN  = $clog2(N);
  localparam int FLUSH = N + LOGN + 2;
  localparam int FCW   = $clog2(FLUSH + 1);

  logic [LOGN-1:0] in_cnt;
  logic [FCW-1:0]  flush;
  logic            en, en_d;

  assign en = in_valid || (flush != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_cnt <= '0;
      flush  <= '0;
      en_d   <= 1'b0;
    end else begin
      en_d <= en;
      if (in_valid) begin
        logic [LOGN-1:0] c;
        c = in_sof ? '0 : in_cnt;
        in_cnt <= c + 1'b1;
        if (c == LOGN'(N - 1)) flush <= FCW'(FLUSH);
        else if (in_sof)       flush <= '0;
      end else if (flush != '0) begin
        flush <= flush - 1'b1;
      end
    end
  end

  logic                 sv [LOGN+1];
  logic                 ss [LOGN+1];
  logic signed [DW-1:0] sr [LOGN+1];
  logic signed [DW-1:0] si [LOGN+1];

  assign sv[0] = in_valid;
  assign ss[0] = in_sof;
  assign sr[0] = in_valid ? in_re : '0;
  assign si[0] = in_valid ? in_im : '0;

  for (genvar s = 0; s < LOGN; s++) begin : g_st
    fft_sdf_stage #(.DW(DW), .HALF(N >> (s + 1))) u_st (
      .clk, .rst_n, .en,
      .in_valid(sv[s]), .in_sof(ss[s]), .in_re(sr[s]), .in_im(si[s]),
      .out_valid(sv[s+1]), .out_sof(ss[s+1]), .out_re(sr[s+1]), .out_im(si[s+1])
    );
  end

  // The last stage's register holds a new sample in the clock after en.
  logic [LOGN-1:0] out_cnt, pos;
  assign out_valid = en_d && sv[LOGN];
  assign out_sof   = ss[LOGN];
  assign out_re    = sr[LOGN];
  assign out_im    = si[LOGN];
  assign pos       = out_sof ? '0 : out_cnt;
  assign out_k     = LOGN'(cs_pkg::bitrev(32'(pos), LOGN));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         out_cnt <= '0;
    else if (out_valid) out_cnt <= pos + 1'b1;
  end

endmodule
