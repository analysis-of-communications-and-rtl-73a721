// One radix-2 decimation-in-frequency stage of a single-path delay-feedback (SDF)
// pipeline FFT.
//
// The stage works on blocks of 2*HALF samples. During the first HALF samples of a
// block the inputs go into a HALF-deep delay line while the delay line's head, the
// twiddled differences of the previous block, goes out. During the second HALF
// samples the head a and the input b form a butterfly: (a+b)/2 goes out at once,
// (a-b)/2 * W^n with W = exp(-j*2*pi/(2*HALF)) goes into the delay line. Each sample
// carries a valid and a start-of-frame tag; a start-of-frame input restarts the block
// count, so frames need not be spaced by whole blocks. Everything advances only when
// en is high. The output register is loaded on en and held otherwise, so the next
// stage, driven by the same en, takes it at the following en.
//
// The SDF structure, the scaling by 1/2 per stage and the tags are this design's
// choices; the document only requires a fully pipelined FFT at one sample per cycle.
module fft_sdf_stage #(
  parameter int DW   = 18,
  parameter int HALF = 256,
  parameter int CW   = 16   // twiddle width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 in_valid,
  input  logic                 in_sof,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic                 out_valid,
  output logic                 out_sof,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im
);
  localparam int LB  = $clog2(2 * HALF);         // bits of the block count
  localparam int PTW = (HALF > 1) ? $clog2(HALF) : 1;

  typedef struct packed {
    logic                 valid;
    logic                 sof;
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } smp_t;

  smp_t            dl [HALF];
  logic [PTW-1:0]  ptr;
  logic [LB-1:0]   cnt;
  logic [LB-1:0]   c;
  smp_t            head, push, outs;
  logic            second;

  assign c      = (in_valid && in_sof) ? '0 : cnt;
  assign second = (c >= LB'(HALF));
  assign head   = dl[ptr];

  // Twiddle exp(-j*2*pi*n/(2*HALF)), n = c - HALF.
  logic [LB-1:0]        tw_ph;
  logic signed [CW-1:0] tw_c, tw_s;
  assign tw_ph = LB'(0) - (c - LB'(HALF));
  sincos_lut #(.PW(LB), .AW(LB), .CW(CW)) u_tw (.phase(tw_ph), .cos_o(tw_c), .sin_o(tw_s));

  logic signed [DW:0]      sum_re, sum_im, dif_re, dif_im;
  logic signed [DW+CW:0]   m_re, m_im;
  always_comb begin
    sum_re = (DW+1)'(head.re) + (DW+1)'(in_re);
    sum_im = (DW+1)'(head.im) + (DW+1)'(in_im);
    dif_re = (DW+1)'(head.re) - (DW+1)'(in_re);
    dif_im = (DW+1)'(head.im) - (DW+1)'(in_im);
    // (dif/2) * W, rounded; the /2 is folded into the shift.
    m_re = (DW+CW+1)'(dif_re) * (DW+CW+1)'(tw_c) - (DW+CW+1)'(dif_im) * (DW+CW+1)'(tw_s);
    m_im = (DW+CW+1)'(dif_re) * (DW+CW+1)'(tw_s) + (DW+CW+1)'(dif_im) * (DW+CW+1)'(tw_c);
    m_re = m_re + ((DW+CW+1)'(1) <<< (CW-1));
    m_im = m_im + ((DW+CW+1)'(1) <<< (CW-1));
    if (second) begin
      outs = '{valid: head.valid, sof: head.sof,
               re: DW'(sum_re >>> 1), im: DW'(sum_im >>> 1)};
      push = '{valid: head.valid, sof: 1'b0,
               re: DW'(m_re >>> CW), im: DW'(m_im >>> CW)};
    end else begin
      outs = head;
      push = '{valid: in_valid, sof: in_sof, re: in_re, im: in_im};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
      cnt <= '0;
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else if (en) begin
      ptr       <= (ptr == PTW'(HALF - 1)) ? '0 : ptr + 1'b1;
      cnt       <= c + 1'b1;  // wraps at 2*HALF
      out_valid <= outs.valid;
      out_sof   <= outs.sof;
      out_re    <= outs.re;
      out_im    <= outs.im;
    end
  end

  // Delay line: written at the head position, which is read in the same clock.
  always_ff @(posedge clk) begin
    if (en) dl[ptr] <= push;
  end

  initial begin
    for (int i = 0; i < HALF; i++) dl[i] = '0;
  end

endmodule
