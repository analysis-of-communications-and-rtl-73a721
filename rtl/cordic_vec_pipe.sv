// Fully pipelined vectoring CORDIC: converts a Cartesian sample to magnitude and
// argument at a rate of one sample per clock.
//
// A first stage folds the left half plane onto the right one (negating the vector and
// starting the angle at half a turn), then ITER micro-rotation stages drive the
// imaginary part to zero while accumulating the rotation angle. The magnitude carries
// the usual CORDIC gain K = 1.6468 (not compensated, the caller scales). The argument
// is a PHASE_W-bit fraction of a turn. An optional tag travels with each sample.
//
// Interface: in_valid/in_re/in_im/in_tag in, out_valid/out_mag/out_phase/out_tag out,
// no back-pressure. Latency is ITER+1 clocks.
//
// The document uses a vendor CORDIC core in this place and gives only its function
// (|r| and arg(r), one sample per cycle); the insides, the widths and the number of
// iterations are this design's choice.
module cordic_vec_pipe #(
  parameter int IW    = 12,            // input width (signed)
  parameter int PW    = cs_pkg::PHASE_W,
  parameter int ITER  = 14,
  parameter int TAG_W = 1,
  parameter int MW    = IW + 2         // magnitude width (unsigned)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_re,
  input  logic signed [IW-1:0] in_im,
  input  logic [TAG_W-1:0]     in_tag,
  output logic                 out_valid,
  output logic [MW-1:0]        out_mag,
  output logic [PW-1:0]        out_phase,
  output logic [TAG_W-1:0]     out_tag
);
  localparam int G  = 2;          // fractional guard bits on x/y
  localparam int XW = IW + 3 + G; // room for sqrt(2)*K growth
  localparam int ZG = 4;          // guard bits on the angle
  localparam int ZW = PW + ZG;

  logic signed [XW-1:0] x   [ITER+1];
  logic signed [XW-1:0] y   [ITER+1];
  logic        [ZW-1:0] z   [ITER+1];
  logic                 v   [ITER+1];
  logic [TAG_W-1:0]     t   [ITER+1];

  // Stage 0: fold into the right half plane.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v[0] <= 1'b0;
      x[0] <= '0; y[0] <= '0; z[0] <= '0; t[0] <= '0;
    end else begin
      v[0] <= in_valid;
      t[0] <= in_tag;
      if (in_re < 0) begin
        x[0] <= -(XW'(in_re) <<< G);
        y[0] <= -(XW'(in_im) <<< G);
        z[0] <= ZW'(1) << (ZW-1);
      end else begin
        x[0] <= XW'(in_re) <<< G;
        y[0] <= XW'(in_im) <<< G;
        z[0] <= '0;
      end
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    localparam logic [ZW-1:0] ATAN = ZW'(cs_pkg::atan_turns32(i) >> (32 - ZW));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v[i+1] <= 1'b0;
        x[i+1] <= '0; y[i+1] <= '0; z[i+1] <= '0; t[i+1] <= '0;
      end else begin
        v[i+1] <= v[i];
        t[i+1] <= t[i];
        if (y[i] >= 0) begin
          x[i+1] <= x[i] + (y[i] >>> i);
          y[i+1] <= y[i] - (x[i] >>> i);
          z[i+1] <= z[i] + ATAN;
        end else begin
          x[i+1] <= x[i] - (y[i] >>> i);
          y[i+1] <= y[i] + (x[i] >>> i);
          z[i+1] <= z[i] - ATAN;
        end
      end
    end
  end

  logic [ZW-1:0] z_round;
  assign z_round   = z[ITER] + ZW'(1 << (ZG-1));
  assign out_valid = v[ITER];
  assign out_tag   = t[ITER];
  assign out_phase = z_round[ZW-1 -: PW];
  // x is non-negative after the first iteration; drop the guard bits.
  assign out_mag   = MW'(x[ITER] >>> G);

endmodule
