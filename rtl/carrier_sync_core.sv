// FFT based carrier synchronization core for BPSK/QPSK bursts (one sample per
// symbol, timing already recovered, amplitude set by an AGC in front).
//
// Two paths leave the input. The estimation path removes the modulation
// (mod_removal: |r| e^{j M arg r}, optionally summed over D samples), takes an N-point
// FFT (fft_r2sdf) and searches the strongest bin in a window (spectral_analysis),
// which yields the frequency offset, from the bin index, and the phase offset, from
// the bin's argument divided by M. The other path stores the burst in a two-bank
// buffer (burst_ram) so that the next burst can enter while the current one is
// corrected. The correction (phase_freq_correction) rotates the buffered burst by the
// estimate. The technique is chosen per burst with in_tech: TECH_REF (base
// algorithm), TECH_SRR (sample rate reduction by D in the modulation removal),
// TECH_INT (parabolic interpolation between bins in the spectral analysis) or
// TECH_DD (decision directed refinement in the correction).
//
// Interface: a burst is presented as in_valid samples from in_sof to in_last (gaps
// allowed) while in_ready is high; in_tech is sampled with in_sof. in_ready is low
// while the modulation removal pads the previous frame and while all buffer banks
// are taken. Bursts may be at most N samples long (N*D for SRR) for the estimate
// and at most LMAX samples for the buffer. The corrected burst leaves on out_*
// with no back-pressure; used_dphi/used_phi are the frequency (phase step per
// sample, FREQ_W-bit turns) and phase (PHASE_W-bit turns) applied to it, dd_* the DD
// residuals. est_* show each raw estimate when it is handed to the correction. The
// estimated phase keeps the M-fold ambiguity, which a back end must resolve.
// Up to NBANK = 3 bursts are in the core at once: one being written and transformed,
// one in the spectral analysis or waiting with its estimate, one being corrected. A
// burst of L = 300 samples in REF mode needs about 1080 clocks from in_last to its
// last output, and a new burst of up to N samples can start every N + 19 clocks
// (REF, INT, SRR). A DD burst occupies the correction for 2L + about 90 clocks,
// which limits a stream of long DD bursts.
//
// The block structure follows the document's architecture figure; run-time technique
// selection, the handshakes and the flow control are this design's choices.
module carrier_sync_core
  import cs_pkg::*;
#(
  parameter int N    = 512,   // FFT points
  parameter int SW   = 12,    // input sample width
  parameter int M    = 4,     // 2 = BPSK, 4 = QPSK
  parameter int D    = 2,     // SRR factor
  parameter int LMAX = 1024,  // buffer bank depth, longest burst
  parameter int NBANK = 3,    // buffer banks
  parameter int DW   = 18     // FFT data width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // received burst
  input  logic                    in_valid,
  input  logic                    in_sof,
  input  logic                    in_last,
  input  tech_e                   in_tech,
  input  logic signed [SW-1:0]    in_re,
  input  logic signed [SW-1:0]    in_im,
  output logic                    in_ready,
  // spectral window, Eq. (8)
  input  logic [$clog2(N)-1:0]    cfg_w_u,
  input  logic [$clog2(N)-1:0]    cfg_w_l,
  // corrected burst
  output logic                    out_valid,
  output logic                    out_sof,
  output logic                    out_last,
  output logic signed [SW:0]      out_re,
  output logic signed [SW:0]      out_im,
  output logic signed [FREQ_W-1:0] used_dphi,
  output logic [PHASE_W-1:0]      used_phi,
  output logic signed [FREQ_W-1:0] dd_dphi,
  output logic [PHASE_W-1:0]      dd_phi,
  // raw estimate, valid in the clock it is taken by the correction
  output logic                    est_take,
  output logic signed [FREQ_W-1:0] est_dphi,
  output logic [PHASE_W-1:0]      est_phi,
  output logic [$clog2(N)-1:0]    est_kf,
  output logic signed [10:0]      est_delta
);
  localparam int LOGN = $clog2(N);
  localparam int AW   = $clog2(LMAX);

  logic take;
  logic mr_ready, wr_free;
  logic [((NBANK > 1) ? $clog2(NBANK) : 1)-1:0] wr_bank;
  assign in_ready = mr_ready && wr_free;
  assign take     = in_valid && in_ready;

  // ---- estimation path ----
  logic                 m_valid, m_sof;
  logic signed [DW-1:0] m_re, m_im;
  mod_removal #(.SW(SW), .M(M), .D(D), .N(N), .DW(DW)) u_mr (
    .clk, .rst_n,
    .in_valid(take), .in_sof, .in_last, .in_srr(in_tech == TECH_SRR), .in_re, .in_im,
    .in_ready(mr_ready),
    .out_valid(m_valid), .out_sof(m_sof), .out_re(m_re), .out_im(m_im)
  );

  logic                 f_valid, f_sof;
  logic [LOGN-1:0]      f_k;
  logic signed [DW-1:0] f_re, f_im;
  fft_r2sdf #(.N(N), .DW(DW)) u_fft (
    .clk, .rst_n,
    .in_valid(m_valid), .in_sof(m_sof), .in_re(m_re), .in_im(m_im),
    .out_valid(f_valid), .out_sof(f_sof), .out_k(f_k), .out_re(f_re), .out_im(f_im)
  );

  localparam int BW = (NBANK > 1) ? $clog2(NBANK) : 1;
  logic [BW-1:0] sa_bank;   // bank of the burst whose frame the spectral analysis evaluates next
  logic [1:0] sa_meta;
  logic est_valid, est_ready;
  spectral_analysis #(.N(N), .DW(DW), .M(M), .D(D), .DFB(10)) u_sa (
    .clk, .rst_n,
    .bin_valid(f_valid), .bin_k(f_k), .bin_re(f_re), .bin_im(f_im),
    .tech(tech_e'(sa_meta)), .w_u(cfg_w_u), .w_l(cfg_w_l),
    .est_valid, .est_ready, .est_dphi, .est_phi, .est_kf, .est_delta
  );

  assign est_take = est_valid && est_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sa_bank <= '0;
    else if (est_take) sa_bank <= (sa_bank == BW'(NBANK - 1)) ? '0 : sa_bank + 1'b1;
  end

  // ---- buffer ----
  logic [AW-1:0]        rd_addr;
  logic                 rd_release, rd_full;
  logic [BW-1:0]        rd_bank;
  logic [AW:0]          rd_len;
  logic [1:0]           rd_meta;
  logic signed [SW-1:0] rd_re, rd_im;
  burst_ram #(.SW(SW), .LMAX(LMAX), .META_W(2), .NBANK(NBANK)) u_ram (
    .clk, .rst_n,
    .wr_valid(take), .wr_sof(in_sof), .wr_last(in_last), .wr_meta(in_tech),
    .wr_re(in_re), .wr_im(in_im), .wr_free, .wr_bank,
    .rd_addr, .rd_release, .rd_bank, .rd_full, .rd_len, .rd_meta, .rd_re, .rd_im,
    .meta_bank(sa_bank), .meta_out(sa_meta)
  );

  // ---- correction ----
  phase_freq_correction #(.SW(SW), .LMAX(LMAX), .M(M)) u_corr (
    .clk, .rst_n,
    .est_valid, .est_ready, .est_dphi, .est_phi,
    .bank_full(rd_full), .bank_len(rd_len), .bank_dd(rd_meta == TECH_DD),
    .rd_addr, .rd_re, .rd_im, .release_bank(rd_release),
    .out_valid, .out_sof, .out_last, .out_re, .out_im,
    .used_dphi, .used_phi, .dd_dphi, .dd_phi
  );

endmodule
