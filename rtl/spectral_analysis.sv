// Spectral analysis: frequency and phase offset estimation from the FFT bins,
// Eq. (5)-(9), with the SRR re-interpretation of Eq. (12)-(13) and the parabolic
// interpolation of Eq. (14)-(15).
//
// While the bins of a frame stream in (any order, each tagged with its natural index
// k) they are written into a bin memory, and a running maximum of the energy
// |X(k)|^2 = re^2 + im^2 is kept over the window k <= w_u or k >= w_l (Eq. (8); with
// w_u = N/2-1 and w_l = N/2 the search covers all bins). Afterwards the controller
// reads the peak bin C and its neighbours L and R (cyclically), and for the INT
// technique divides to get Delta = (E_R - E_L) / (2 (2 E_C - E_R - E_L)), limited to
// +-1/2, and forms the virtual bin X(C) + |Delta| (X(R or L) - X(C)). A serial
// CORDIC takes the argument of that bin (or of X(C)), which divided by M is the phase
// estimate. The frequency estimate is the signed bin index k_f (k_f - N for
// k_f >= N/2, Eq. (6)) plus Delta, over M*N (times D for SRR, Eq. (12)). For SRR the
// phase is corrected by the half-group delay of the summation.
//
// Outputs, as phase increments in turns: est_dphi is the frequency offset as an
// FREQ_W-bit per-sample phase step (signed), est_phi the phase offset in PHASE_W bits.
// est_valid rises when the estimate is ready and stays until est_ready. The bin
// memory has two banks: the next frame is collected while one is evaluated, and a
// collected frame waits while an estimate is still untaken; a third frame may not
// complete before the waiting one starts (asserted). tech is sampled when the
// evaluation of a frame starts. The estimate follows the last bin by about 10
// clocks, plus NUMW+2 for the division (INT) and 18 for the CORDIC.
//
// Own choices: the two-bank bin memory (the document stores only the two neighbours,
// here all bins are kept because they arrive in bit-reversed order), Delta with DFB
// fractional bits, Delta < 0 handled by interpolating towards L (the document gives
// only Delta > 0), and the SRR phase term pi*f*(D-1), which equals the document's
// Eq. (13) for its D = 2 when f is taken per reduced sample.
module spectral_analysis
  import cs_pkg::*;
#(
  parameter int N   = 512,
  parameter int DW  = 18,
  parameter int M   = 4,
  parameter int D   = 2,
  parameter int DFB = 10   // fractional bits of Delta
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // FFT bins
  input  logic                    bin_valid,
  input  logic [$clog2(N)-1:0]    bin_k,
  input  logic signed [DW-1:0]    bin_re,
  input  logic signed [DW-1:0]    bin_im,
  // configuration
  input  tech_e                   tech,      // technique of the frame, held while it runs
  input  logic [$clog2(N)-1:0]    w_u,
  input  logic [$clog2(N)-1:0]    w_l,
  // estimate
  output logic                    est_valid,
  input  logic                    est_ready,
  output logic signed [FREQ_W-1:0] est_dphi,
  output logic [PHASE_W-1:0]      est_phi,
  output logic [$clog2(N)-1:0]    est_kf,
  output logic signed [DFB:0]     est_delta
);
  localparam int LOGN = $clog2(N);
  localparam int LOGM = $clog2(M);
  localparam int LOGD = $clog2(D);
  localparam int EW   = 2 * DW + 1;           // energy width
  localparam int NUMW = EW + DFB;             // divider dividend
  localparam int DENW = EW + 2;               // divider divisor
  localparam int SH0  = FREQ_W - DFB - LOGN - LOGM;  // k_f to phase-step shift
  localparam int CIW  = 26;

  typedef enum logic [2:0] {S_IDLE, S_READ, S_ENERGY, S_DIV, S_INTERP, S_ARG, S_FINAL, S_OUT} state_e;
  state_e state;

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  cplx_t bin_mem [2*N];   // two banks: one collects while the other is evaluated

  function automatic logic [EW-1:0] energy(input cplx_t x);
    return EW'(x.re * x.re) + EW'(x.im * x.im);
  endfunction

  // ---- collection of one frame ----
  logic [LOGN:0]   nbins;
  logic [EW-1:0]   best_e, e_in;
  logic [LOGN-1:0] kf, kf_c, kf_p;
  logic            have_best, in_win, better, last_bin;
  logic            cbank, pbank, bank_q;   // collecting, pending and evaluated bank
  logic            pend, pend_take;        // a collected frame waits for evaluation
  tech_e           tech_q;

  assign e_in     = EW'(bin_re * bin_re) + EW'(bin_im * bin_im);
  assign in_win   = (bin_k <= w_u) || (bin_k >= w_l);
  assign better   = in_win && (!have_best || e_in > best_e);
  assign last_bin = bin_valid && nbins == (LOGN+1)'(N - 1);
  assign pend_take = pend && state == S_IDLE;

  always_ff @(posedge clk) begin
    if (bin_valid) bin_mem[{cbank, bin_k}] <= '{re: bin_re, im: bin_im};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nbins <= '0; best_e <= '0; kf_c <= '0; have_best <= 1'b0;
      cbank <= 1'b0; pbank <= 1'b0; kf_p <= '0; pend <= 1'b0;
    end else begin
      if (pend_take) pend <= 1'b0;
      if (bin_valid) begin
        if (better) begin
          best_e    <= e_in;
          kf_c      <= bin_k;
          have_best <= 1'b1;
        end
        if (last_bin) begin
          nbins     <= '0;
          have_best <= 1'b0;
          kf_p      <= better ? bin_k : kf_c;
          pbank     <= cbank;
          cbank     <= !cbank;
          pend      <= 1'b1;
        end else begin
          nbins <= nbins + 1'b1;
        end
      end
    end
  end

  // ---- post-processing ----
  cplx_t           xc, xl, xr, xv;
  logic [EW-1:0]   ec, el, er;
  logic            div_start, div_busy, div_done;
  logic [NUMW-1:0] div_num, div_q;
  logic [DENW-1:0] div_den;
  logic            arg_start, arg_busy, arg_done;
  logic [PHASE_W-1:0] arg_ph;
  logic signed [DFB:0] delta;   // signed, |delta| <= 2^(DFB-1)
  logic signed [DW+1:0] dif_re, dif_im;
  logic signed [DW+DFB+2:0] ip_re, ip_im;
  logic signed [DENW:0] den_s;

  divider_serial #(.NW(NUMW), .DW(DENW)) u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den(div_den),
    .busy(div_busy), .done(div_done), .quot(div_q)
  );

  cordic_arg_serial #(.IW(CIW), .PW(PHASE_W), .ITER(16)) u_arg (
    .clk, .rst_n, .start(arg_start), .in_re(CIW'(xv.re)), .in_im(CIW'(xv.im)),
    .busy(arg_busy), .done(arg_done), .phase(arg_ph)
  );

  assign den_s   = (DENW+1)'(2 * ec) - (DENW+1)'(er) - (DENW+1)'(el);
  assign div_num = NUMW'((er >= el) ? (er - el) : (el - er)) << DFB;
  assign div_den = DENW'(den_s) << 1;

  // Interpolation towards the neighbour on the side of Delta.
  always_comb begin
    cplx_t nb;
    nb     = delta[DFB] ? xl : xr;
    dif_re = (DW+2)'(nb.re) - (DW+2)'(xc.re);
    dif_im = (DW+2)'(nb.im) - (DW+2)'(xc.im);
    ip_re  = (DW+DFB+3)'(dif_re) * (DW+DFB+3)'(delta[DFB] ? -delta : delta);
    ip_im  = (DW+DFB+3)'(dif_im) * (DW+DFB+3)'(delta[DFB] ? -delta : delta);
  end

  logic signed [LOGN:0]             ks;
  logic signed [FREQ_W-1:0]         kv;
  logic signed [FREQ_W-1:0]         dphi_n;
  logic signed [PHASE_W-1:0]        phi_n, srr_corr;
  assign ks     = (kf >= LOGN'(N / 2)) ? $signed({1'b0, kf}) - (LOGN+1)'(N) : $signed({1'b0, kf});
  assign kv     = (FREQ_W'(ks) <<< DFB) + FREQ_W'(delta);
  assign dphi_n = (tech_q == TECH_SRR) ? (kv <<< (SH0 - LOGD)) : (kv <<< SH0);
  // SRR: the sum of D samples sits (D-1)/2 samples late: subtract pi*f*(D-1).
  assign srr_corr = PHASE_W'((dphi_n * (D - 1)) >>> (FREQ_W - PHASE_W + 1));
  logic signed [PHASE_W-1:0]        arg_div_m;
  assign arg_div_m = $signed(arg_ph) >>> LOGM;
  assign phi_n     = (tech_q == TECH_SRR) ? arg_div_m - srr_corr : arg_div_m;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      kf <= '0; bank_q <= 1'b0; tech_q <= TECH_REF;
      xc <= '0; xl <= '0; xr <= '0; xv <= '0; ec <= '0; el <= '0; er <= '0;
      delta <= '0; div_start <= 1'b0; arg_start <= 1'b0;
      est_valid <= 1'b0; est_dphi <= '0; est_phi <= '0; est_kf <= '0; est_delta <= '0;
    end else begin
      div_start <= 1'b0;
      arg_start <= 1'b0;
      case (state)
        S_IDLE: if (pend_take) begin
          kf     <= kf_p;
          bank_q <= pbank;
          tech_q <= tech;
          state  <= S_READ;
        end
        S_READ: begin
          xc <= bin_mem[{bank_q, kf}];
          xl <= bin_mem[{bank_q, kf - 1'b1}];
          xr <= bin_mem[{bank_q, kf + 1'b1}];
          state <= S_ENERGY;
        end
        S_ENERGY: begin
          ec <= energy(xc);
          el <= energy(xl);
          er <= energy(xr);
          delta <= '0;
          if (tech_q == TECH_INT) begin
            div_start <= 1'b1;
            state     <= S_DIV;
          end else begin
            state     <= S_INTERP;
          end
        end
        S_DIV: if (div_done) begin
          // A window edge can make a neighbour larger than C: limit to 1/2.
          logic [NUMW-1:0] mag;
          mag = (den_s <= 0 || div_q > NUMW'(1 << (DFB - 1))) ? NUMW'(1 << (DFB - 1)) : div_q;
          if (den_s <= 0 && er == el) mag = '0;
          delta <= (er >= el) ? (DFB+1)'(mag) : -(DFB+1)'(mag);
          state <= S_INTERP;
        end
        S_INTERP: begin
          xv.re <= DW'((DW+DFB+3)'(xc.re) + (ip_re >>> DFB));
          xv.im <= DW'((DW+DFB+3)'(xc.im) + (ip_im >>> DFB));
          arg_start <= 1'b1;
          state <= S_ARG;
        end
        S_ARG: if (arg_done) state <= S_FINAL;
        S_FINAL: begin
          est_dphi  <= dphi_n;
          est_phi   <= phi_n;
          est_kf    <= kf;
          est_delta <= delta;
          est_valid <= 1'b1;
          state     <= S_OUT;
        end
        S_OUT: if (est_ready) begin
          est_valid <= 1'b0;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A frame may complete only when the one before it has left the pending slot.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    last_bin |-> !pend || pend_take);

endmodule
