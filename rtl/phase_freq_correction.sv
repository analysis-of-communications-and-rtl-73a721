// Phase and frequency correction, Eq. (10), with the decision directed (DD)
// refinement of Eq. (16)-(19).
//
// When an estimate (per-sample phase step dphi and phase phi, in turns) and a full
// buffer bank are both present, the burst is read from the buffer and every sample
// r(l) is rotated by exp(-j*theta(l)), theta(l) = phi + l*dphi, accumulated in an
// FREQ_W-bit phase register; cos and sin of theta come from a sine/cosine table and
// the rotation takes four multipliers. For a DD burst the buffer is read twice. The
// first pass corrects with the FFT estimate, decides each symbol (BPSK: sign of re;
// QPSK with the constellation {1, j, -1, -j}: the nearest axis), removes it by
// multiplying with the conjugate decision (Eq. (16), a sign change or swap only) and
// sums the first and the second half of the burst into z1 and z2 (Eq. (17)). A serial
// CORDIC then gives arg z1, arg z2 and arg(z1+z2); the residual step is
// (arg z2 - arg z1)/(L/2), formed by a serial divider, and the residual phase is
// arg(z1+z2) (Eq. (19)), moved from the burst centre, where the average sits, back
// to the first sample by subtracting the residual step times (L-1)/2. The second pass corrects with the FFT estimate plus the
// residuals and delivers the output.
//
// Interface: est_valid/est_ready hand over the estimate (est_ready pulses when a
// burst starts), bank_full/bank_len/bank_dd describe the oldest buffer bank,
// rd_addr/rd_re/rd_im read it with one clock latency and release pulses after its last
// sample has been read. out_valid/out_sof/out_last/out_re/out_im carry the corrected
// burst, one sample per clock, with no back-pressure. The output follows a read
// address by 3 clocks; a DD burst costs L + about 90 extra clocks.
//
// Following the document: Eq. (10) with an SCL and multipliers, decisions, data
// aided modulation removal, the half sums and the arg/divider evaluation. Own
// choices: the axis-aligned QPSK constellation, taking arg z2 - arg z1 instead of
// arg(z1 z2*) (the same angle without a wide multiplier), the sign convention of the
// frequency (Eq. (18) is applied as the phase advance per sample, i.e. divided by
// 2*pi*L/2), the move of the residual phase to the first sample, the widths, and the
// two-pass schedule.
module phase_freq_correction
  import cs_pkg::*;
#(
  parameter int SW   = 12,
  parameter int LMAX = 1024,
  parameter int M    = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // estimate from the spectral analysis
  input  logic                      est_valid,
  output logic                      est_ready,
  input  logic signed [FREQ_W-1:0]  est_dphi,
  input  logic [PHASE_W-1:0]        est_phi,
  // buffer
  input  logic                      bank_full,
  input  logic [$clog2(LMAX):0]     bank_len,
  input  logic                      bank_dd,
  output logic [$clog2(LMAX)-1:0]   rd_addr,
  input  logic signed [SW-1:0]      rd_re,
  input  logic signed [SW-1:0]      rd_im,
  output logic                      release_bank,
  // corrected burst
  output logic                      out_valid,
  output logic                      out_sof,
  output logic                      out_last,
  output logic signed [SW:0]        out_re,
  output logic signed [SW:0]        out_im,
  // parameters applied to the current burst (valid from out_sof on)
  output logic signed [FREQ_W-1:0]  used_dphi,
  output logic [PHASE_W-1:0]        used_phi,
  output logic signed [FREQ_W-1:0]  dd_dphi,
  output logic [PHASE_W-1:0]        dd_phi
);
  localparam int AW  = $clog2(LMAX);
  localparam int OW  = SW + 1;
  localparam int CW  = 16;
  localparam int ZW  = OW + AW + 1;
  localparam int CIW = 26;

  typedef enum logic [2:0] {S_IDLE, S_PASS1, S_ARG1, S_ARG2, S_ARG3, S_DIV, S_PASS2} state_e;
  state_e state;

  logic [AW:0]              len, l;
  logic signed [FREQ_W-1:0] dphi;
  logic [PHASE_W-1:0]       phi;
  logic [FREQ_W-1:0]        theta;
  logic                     reading;

  // ---- read and rotation pipeline: address -> b (data, a flags) -> c (rotated) ----
  logic        a_v, a_first, a_last, a_half2;
  logic [FREQ_W-1:0] b_theta;
  logic        c_v, c_first, c_last, c_half2;
  logic signed [OW-1:0] c_re, c_im;

  logic signed [CW-1:0] sc_c, sc_s;
  sincos_lut #(.PW(FREQ_W), .AW(10), .CW(CW)) u_scl (.phase(b_theta), .cos_o(sc_c), .sin_o(sc_s));

  logic signed [SW+CW+1:0] rot_re, rot_im;
  assign rot_re = rd_re * sc_c + rd_im * sc_s + (1 <<< (CW-2));
  assign rot_im = rd_im * sc_c - rd_re * sc_s + (1 <<< (CW-2));

  assign rd_addr = AW'(l);

  // ---- DD: decisions and half sums ----
  logic signed [ZW-1:0] z1_re, z1_im, z2_re, z2_im;
  logic signed [ZW-1:0] dr_re, dr_im;
  always_comb begin
    logic signed [ZW-1:0] xr, xi;
    xr = ZW'(c_re);
    xi = ZW'(c_im);
    if (M == 2) begin
      dr_re = (xr < 0) ? -xr : xr;
      dr_im = (xr < 0) ? -xi : xi;
    end else if (((xr < 0) ? -xr : xr) >= ((xi < 0) ? -xi : xi)) begin
      dr_re = (xr < 0) ? -xr : xr;   // decision +-1
      dr_im = (xr < 0) ? -xi : xi;
    end else if (xi >= 0) begin
      dr_re = xi;                    // decision +j: r * (-j)
      dr_im = -xr;
    end else begin
      dr_re = -xi;                   // decision -j: r * (+j)
      dr_im = xr;
    end
  end

  // ---- CORDIC and divider shared by the DD evaluation ----
  logic               arg_start, arg_busy, arg_done;
  logic [PHASE_W-1:0] arg_ph, a1, a2;
  logic signed [CIW-1:0] arg_re, arg_im;
  cordic_arg_serial #(.IW(CIW), .PW(PHASE_W), .ITER(16)) u_arg (
    .clk, .rst_n, .start(arg_start), .in_re(arg_re), .in_im(arg_im),
    .busy(arg_busy), .done(arg_done), .phase(arg_ph)
  );

  logic                div_start, div_busy, div_done;
  logic [FREQ_W-1:0]   div_q;
  logic signed [PHASE_W-1:0] da;
  assign da = $signed(a2 - a1);
  divider_serial #(.NW(FREQ_W), .DW(AW)) u_div (
    .clk, .rst_n, .start(div_start),
    .num(FREQ_W'((da < 0) ? -da : da) << (FREQ_W - PHASE_W)),
    .den(AW'(len >> 1)),
    .busy(div_busy), .done(div_done), .quot(div_q)
  );

  always_comb begin
    case (state)
      S_ARG1:  begin arg_re = CIW'(z1_re); arg_im = CIW'(z1_im); end
      S_ARG2:  begin arg_re = CIW'(z2_re); arg_im = CIW'(z2_im); end
      default: begin arg_re = CIW'(z1_re + z2_re); arg_im = CIW'(z1_im + z2_im); end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      len <= '0; l <= '0; dphi <= '0; phi <= '0; theta <= '0;
      reading <= 1'b0;
      est_ready <= 1'b0; release_bank <= 1'b0;
      a_v <= 1'b0; a_first <= 1'b0; a_last <= 1'b0; a_half2 <= 1'b0;
      b_theta <= '0;
      c_v <= 1'b0; c_first <= 1'b0; c_last <= 1'b0; c_half2 <= 1'b0; c_re <= '0; c_im <= '0;
      z1_re <= '0; z1_im <= '0; z2_re <= '0; z2_im <= '0;
      arg_start <= 1'b0; div_start <= 1'b0; a1 <= '0; a2 <= '0;
      out_valid <= 1'b0; out_sof <= 1'b0; out_last <= 1'b0; out_re <= '0; out_im <= '0;
      used_dphi <= '0; used_phi <= '0; dd_dphi <= '0; dd_phi <= '0;
    end else begin
      est_ready    <= 1'b0;
      release_bank <= 1'b0;
      arg_start    <= 1'b0;
      div_start    <= 1'b0;
      out_valid    <= 1'b0;
      out_sof      <= 1'b0;
      out_last     <= 1'b0;

      // pipeline stage a: address l and its phase
      a_v <= 1'b0;
      if (reading) begin
        a_v     <= 1'b1;
        a_first <= (l == '0);
        a_last  <= (l == len - 1'b1);
        a_half2 <= (l >= (len >> 1));
        b_theta <= theta;   // phase of the sample whose data arrives next clock
        theta   <= theta + FREQ_W'(dphi);
        if (l == len - 1'b1) reading <= 1'b0;
        else                 l <= l + 1'b1;
      end
      // The a flags describe the sample whose buffer data is present now (stage b);
      // stage c holds the rotated sample.
      c_v <= a_v; c_first <= a_first; c_last <= a_last; c_half2 <= a_half2;
      c_re <= OW'(rot_re >>> (CW-1));
      c_im <= OW'(rot_im >>> (CW-1));

      case (state)
        // The bank state is stale while a release is in flight.
        S_IDLE: if (est_valid && bank_full && !est_ready && !release_bank) begin
          est_ready <= 1'b1;
          len   <= bank_len;
          dphi  <= est_dphi;
          phi   <= est_phi;
          theta <= FREQ_W'(est_phi) << (FREQ_W - PHASE_W);
          l     <= '0;
          reading <= (bank_len != '0);
          z1_re <= '0; z1_im <= '0; z2_re <= '0; z2_im <= '0;
          dd_dphi <= '0; dd_phi <= '0;
          if (bank_dd) begin
            state <= S_PASS1;
          end else begin
            used_dphi <= est_dphi;
            used_phi  <= est_phi;
            state     <= S_PASS2;
          end
        end
        S_PASS1: if (c_v) begin
          if (c_half2) begin
            z2_re <= z2_re + dr_re; z2_im <= z2_im + dr_im;
          end else begin
            z1_re <= z1_re + dr_re; z1_im <= z1_im + dr_im;
          end
          if (c_last) begin
            arg_start <= 1'b1;
            state     <= S_ARG1;
          end
        end
        S_ARG1: if (arg_done) begin a1 <= arg_ph; arg_start <= 1'b1; state <= S_ARG2; end
        S_ARG2: if (arg_done) begin a2 <= arg_ph; arg_start <= 1'b1; state <= S_ARG3; end
        S_ARG3: if (arg_done) begin
          dd_phi    <= arg_ph;
          div_start <= 1'b1;
          state     <= S_DIV;
        end
        S_DIV: if (div_done) begin
          logic signed [FREQ_W-1:0] res;
          logic [PHASE_W-1:0] ph0;
          res = (da < 0) ? -$signed(div_q) : $signed(div_q);
          // arg(z1+z2) is the phase at the burst centre; move it back to l = 0.
          ph0 = dd_phi - PHASE_W'((res * $signed({1'b0, len - 1'b1})) >>> (FREQ_W - PHASE_W + 1));
          dd_dphi   <= res;
          dd_phi    <= ph0;
          dphi      <= dphi + res;
          phi       <= phi + ph0;
          used_dphi <= dphi + res;
          used_phi  <= phi + ph0;
          theta     <= FREQ_W'(phi + ph0) << (FREQ_W - PHASE_W);
          l         <= '0;
          reading   <= 1'b1;
          state     <= S_PASS2;
        end
        S_PASS2: begin
          if (c_v) begin
            out_valid <= 1'b1;
            out_sof   <= c_first;
            out_last  <= c_last;
            out_re    <= c_re;
            out_im    <= c_im;
          end
          if (c_v && c_last) begin
            release_bank <= 1'b1;
            state        <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
