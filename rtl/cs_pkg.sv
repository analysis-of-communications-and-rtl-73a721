// Shared types and constants of the FFT based carrier synchronizer.
//
// Phases are unsigned fractions of a full turn: a PHASE_W-bit value p stands for
// 2*pi*p/2^PHASE_W radians, so wrap-around of the adder is the modulo-2*pi of the
// algorithm. Frequencies are phase increments per sample in the same format with
// FREQ_W bits. The four per-burst techniques follow the document: the reference
// algorithm, sample rate reduction (SRR), bin interpolation (INT) and the decision
// directed refinement (DD). Selecting them per burst at run time is a choice of this
// design; the document builds each as a separate core.
package cs_pkg;

  localparam int PHASE_W = 16;  // phase words of CORDIC and sine/cosine table
  localparam int FREQ_W  = 24;  // phase accumulator of the correction

  typedef enum logic [1:0] {
    TECH_REF = 2'd0,  // base algorithm, Eq. (3)-(10)
    TECH_SRR = 2'd1,  // sample rate reduction, Eq. (11)-(13)
    TECH_INT = 2'd2,  // parabolic interpolation, Eq. (14)-(15)
    TECH_DD  = 2'd3   // decision directed refinement, Eq. (16)-(19)
  } tech_e;

  // atan(2^-i)/(2*pi), scaled by 2^32, for the CORDIC micro-rotations.
  function automatic logic [31:0] atan_turns32(input int i);
    case (i)
      0: return 32'd536870912;  1: return 32'd316933406;  2: return 32'd167458907;
      3: return 32'd85004756;   4: return 32'd42667331;   5: return 32'd21354465;
      6: return 32'd10679838;   7: return 32'd5340245;    8: return 32'd2670163;
      9: return 32'd1335087;   10: return 32'd667544;    11: return 32'd333772;
     12: return 32'd166886;    13: return 32'd83443;     14: return 32'd41722;
     15: return 32'd20861;     16: return 32'd10430;     17: return 32'd5215;
     18: return 32'd2608;      19: return 32'd1304;      20: return 32'd652;
     21: return 32'd326;       22: return 32'd163;       23: return 32'd81;
      default: return 32'd0;
    endcase
  endfunction

  // cos and sin of a 32-bit fraction of a turn, scaled by 2^30, computed with
  // integer rotation-mode CORDIC (24 micro-rotations, error a few parts in 2^24).
  // Returns sin when want_sin is set, else cos. Evaluated at elaboration to
  // build the sine/cosine tables.
  function automatic longint cordic_cos_sin(input logic [31:0] turns,
                                            input bit want_sin);
    longint x, y, z, xn, c, s;
    logic [1:0] q;
    q = turns[31:30];
    x = 64'sd652032874;  // 2^30 / K, K = 1.646760258
    y = 0;
    z = longint'({2'b00, turns[29:0]});  // residual angle in [0, 1/4) turn
    for (int i = 0; i < 24; i++) begin
      if (z >= 0) begin
        xn = x - (y >>> i); y = y + (x >>> i); z = z - longint'(atan_turns32(i));
      end else begin
        xn = x + (y >>> i); y = y - (x >>> i); z = z + longint'(atan_turns32(i));
      end
      x = xn;
    end
    case (q)
      2'd0: begin c =  x; s =  y; end
      2'd1: begin c = -y; s =  x; end
      2'd2: begin c = -x; s = -y; end
      default: begin c =  y; s = -x; end
    endcase
    return want_sin ? s : c;
  endfunction

  // Bit reversal of the low n bits of v.
  function automatic logic [31:0] bitrev(input logic [31:0] v, input int n);
    logic [31:0] r;
    r = '0;
    for (int i = 0; i < n; i++) r[i] = v[n-1-i];
    return r;
  endfunction

endpackage
