// Serial (iterative) vectoring CORDIC that returns only the argument of a complex
// value, one micro-rotation per clock.
//
// On start the vector is folded into the right half plane, then ITER clocks of
// micro-rotations drive the imaginary part to zero while the angle accumulates. The
// result is a PHASE_W-bit fraction of a turn. The magnitude is not produced.
//
// Interface: start (one-clock pulse, ignored while busy) with in_re/in_im; done pulses
// for one clock with phase valid, phase then holds until the next start. done is
// high ITER+2 clocks after the clock that takes start.
//
// The document uses a small serial vendor CORDIC core without |r| here and gives only
// its function; iterations and widths are this design's choice.
module cordic_arg_serial #(
  parameter int IW   = 26,
  parameter int PW   = cs_pkg::PHASE_W,
  parameter int ITER = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [IW-1:0] in_re,
  input  logic signed [IW-1:0] in_im,
  output logic                 busy,
  output logic                 done,
  output logic [PW-1:0]        phase
);
  localparam int G  = 4;          // fractional guard bits on x/y
  localparam int XW = IW + 2 + G;
  localparam int ZG = 4;
  localparam int ZW = PW + ZG;
  localparam int CW = $clog2(ITER + 1);

  logic signed [XW-1:0] x, y;
  logic        [ZW-1:0] z;
  logic        [CW-1:0] it;
  logic        [ZW-1:0] atan_i;
  logic        [ZW-1:0] z_round;

  assign atan_i  = ZW'(cs_pkg::atan_turns32(int'(it)) >> (32 - ZW));
  assign z_round = z + ZW'(1 << (ZG-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      phase <= '0;
      x <= '0; y <= '0; z <= '0; it <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          it   <= '0;
          if (in_re < 0) begin
            x <= -(XW'(in_re) <<< G); y <= -(XW'(in_im) <<< G); z <= ZW'(1) << (ZW-1);
          end else begin
            x <= XW'(in_re) <<< G;    y <= XW'(in_im) <<< G;    z <= '0;
          end
        end
      end else if (it == CW'(ITER)) begin
        busy  <= 1'b0;
        done  <= 1'b1;
        phase <= z_round[ZW-1 -: PW];
      end else begin
        it <= it + 1'b1;
        if (y >= 0) begin
          x <= x + (y >>> it);
          y <= y - (x >>> it);
          z <= z + atan_i;
        end else begin
          x <= x - (y >>> it);
          y <= y + (x >>> it);
          z <= z - atan_i;
        end
      end
    end
  end

endmodule
