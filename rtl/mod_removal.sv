// Modulation removal, Eq. (3), with the optional sample rate reduction of Eq. (11),
// producing the zero-padded N-sample frame for the FFT.
//
// Each received sample r goes through a pipelined vectoring CORDIC to |r| and arg(r).
// The argument is multiplied by M (a left shift of the turn fraction, modulo one turn)
// and the sample is turned back into Cartesian form, |r|*cos(M arg r) and
// |r|*sin(M arg r), with a sine/cosine table and two multipliers. When the burst is
// marked for sample rate reduction, D consecutive modulation-removed samples are
// summed by two adders into one (a shorter last group is summed as it is). Finally
// the frame is padded with zeros up to N samples; samples beyond the N-th are dropped.
//
// Interface: a burst is in_valid samples from in_sof to in_last; gaps are allowed.
// in_srr is sampled with in_sof. in_ready falls after in_last is taken and rises
// again GAP clocks after the padded frame has left, so one burst is in this block at
// a time and consecutive FFT frames are at least GAP clocks apart (GAP = 0: frames
// may follow back to back, which the FFT and spectral analysis accept).
// Output: out_valid/out_sof with out_re/out_im, the FFT input. Latency through the
// pipeline is CORDIC_ITER + 3 clocks; padding follows the last sample at one zero
// per clock.
//
// Following the document: polar modulation removal with a CORDIC, the SCL plus
// multipliers for the way back, summation of D samples for SRR. The widths, the
// CORDIC length and the ready handshake are this design's choices. The document's
// extra block RAM for SRR is not needed here, because the sums are formed on the fly.
module mod_removal #(
  parameter int SW          = 12,   // input sample width
  parameter int M           = 4,    // 2 = BPSK, 4 = QPSK
  parameter int D           = 2,    // SRR factor
  parameter int N           = 512,  // FFT points
  parameter int DW          = 18,   // FFT data width
  parameter int CORDIC_ITER = 14,
  parameter int GAP         = 0     // extra idle clocks between frames, see below
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_sof,
  input  logic                 in_last,
  input  logic                 in_srr,
  input  logic signed [SW-1:0] in_re,
  input  logic signed [SW-1:0] in_im,
  output logic                 in_ready,
  output logic                 out_valid,
  output logic                 out_sof,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im
);
  localparam int PW   = cs_pkg::PHASE_W;
  localparam int MW   = SW + 2;
  localparam int CW   = 16;
  localparam int LOGM = $clog2(M);
  localparam int NW   = $clog2(N + 1);
  localparam int DCW  = (D > 1) ? $clog2(D) : 1;

  // ---- input side: one burst at a time ----
  logic busy, srr_q, take;
  assign in_ready = !busy;
  assign take     = in_valid && in_ready;

  // ---- CORDIC: |r|, arg(r) ----
  logic          c_valid;
  logic [MW-1:0] c_mag;
  logic [PW-1:0] c_ph;
  logic [1:0]    c_tag;  // {sof, last}
  cordic_vec_pipe #(.IW(SW), .PW(PW), .ITER(CORDIC_ITER), .TAG_W(2), .MW(MW)) u_cordic (
    .clk, .rst_n, .in_valid(take), .in_re, .in_im, .in_tag({in_sof, in_last}),
    .out_valid(c_valid), .out_mag(c_mag), .out_phase(c_ph), .out_tag(c_tag)
  );

  // ---- e^{j M arg r}: register the multiplied phase, then table and multipliers ----
  logic          p_valid;
  logic [1:0]    p_tag;
  logic [MW-1:0] p_mag;
  logic [PW-1:0] p_ph;
  logic signed [CW-1:0] p_cos, p_sin;
  sincos_lut #(.PW(PW), .AW(10), .CW(CW)) u_scl (.phase(p_ph), .cos_o(p_cos), .sin_o(p_sin));

  logic                 x_valid;
  logic [1:0]           x_tag;
  logic signed [DW-1:0] x_re, x_im;
  logic signed [MW+CW:0] prod_re, prod_im;
  assign prod_re = $signed({1'b0, p_mag}) * p_cos + (1 <<< (CW-2));
  assign prod_im = $signed({1'b0, p_mag}) * p_sin + (1 <<< (CW-2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid <= 1'b0; p_tag <= '0; p_mag <= '0; p_ph <= '0;
      x_valid <= 1'b0; x_tag <= '0; x_re <= '0; x_im <= '0;
    end else begin
      p_valid <= c_valid;
      p_tag   <= c_tag;
      p_mag   <= c_mag;
      p_ph    <= c_ph << LOGM;
      x_valid <= p_valid;
      x_tag   <= p_tag;
      x_re    <= DW'(prod_re >>> (CW-1));
      x_im    <= DW'(prod_im >>> (CW-1));
    end
  end

  // ---- SRR: sum D consecutive samples ----
  logic                 s_valid, s_sof, s_last;
  logic signed [DW-1:0] s_re, s_im;
  logic signed [DW-1:0] acc_re, acc_im;
  logic [DCW-1:0]       grp;
  logic                 grp_sof;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_valid <= 1'b0; s_sof <= 1'b0; s_last <= 1'b0; s_re <= '0; s_im <= '0;
      acc_re <= '0; acc_im <= '0; grp <= '0; grp_sof <= 1'b0;
    end else begin
      s_valid <= 1'b0;
      if (x_valid) begin
        if (!srr_q || D == 1) begin
          s_valid <= 1'b1;
          s_sof   <= x_tag[1];
          s_last  <= x_tag[0];
          s_re    <= x_re;
          s_im    <= x_im;
        end else begin
          logic first;
          first = x_tag[1] || (grp == '0);
          if (x_tag[0] || (!x_tag[1] && grp == DCW'(D - 1))) begin
            s_valid <= 1'b1;
            s_sof   <= x_tag[1] || grp_sof;
            s_last  <= x_tag[0];
            s_re    <= first ? x_re : acc_re + x_re;
            s_im    <= first ? x_im : acc_im + x_im;
            grp     <= '0;
            grp_sof <= 1'b0;
          end else begin
            acc_re  <= first ? x_re : acc_re + x_re;
            acc_im  <= first ? x_im : acc_im + x_im;
            grp     <= x_tag[1] ? DCW'(1) : grp + 1'b1;
            grp_sof <= x_tag[1] ? 1'b1 : grp_sof;
          end
        end
      end
    end
  end

  // ---- zero padding to N and output ----
  logic [NW-1:0] n_out;     // samples of the current frame sent so far
  logic          padding;
  logic [NW-1:0] n_cur;
  localparam int GW = $clog2(GAP + 2);
  logic [GW-1:0] gap_cnt;
  logic          keep;
  assign n_cur = s_sof ? '0 : n_out;
  assign keep  = s_valid && (n_cur < NW'(N));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; srr_q <= 1'b0; n_out <= '0; padding <= 1'b0; gap_cnt <= '0;
      out_valid <= 1'b0; out_sof <= 1'b0; out_re <= '0; out_im <= '0;
    end else begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      if (take && in_sof) srr_q <= in_srr;
      if (take && in_last) busy <= 1'b1;
      if (s_valid) begin
        if (keep) begin
          out_valid <= 1'b1;
          out_sof   <= s_sof;
          out_re    <= s_re;
          out_im    <= s_im;
          n_out     <= n_cur + 1'b1;
        end else begin
          n_out     <= n_cur;
        end
        if (s_last) begin
          if (n_cur + NW'(keep) >= NW'(N)) gap_cnt <= GW'(GAP + 1);
          else padding <= 1'b1;
        end
      end else if (padding) begin
        out_valid <= 1'b1;
        out_re    <= '0;
        out_im    <= '0;
        n_out     <= n_out + 1'b1;
        if (n_out == NW'(N - 1)) begin
          padding <= 1'b0;
          gap_cnt <= GW'(GAP + 1);
        end
      end
      if (gap_cnt == GW'(1)) busy <= 1'b0;
      if (gap_cnt != '0) gap_cnt <= gap_cnt - 1'b1;
    end
  end

endmodule
