// Sine/cosine look-up table (SCL): maps a phase to cos and sin.
//
// The table holds 2^AW points of the full circle, cos and sin scaled by 2^(CW-1)-1
// and rounded. The PW-bit phase (fraction of a turn) is rounded to its top AW bits
// to address it. Entry i holds cos(2*pi*i/2^AW) and sin(2*pi*i/2^AW); the table is a
// constant computed at elaboration by a function using the integer CORDIC of the package
// (cs_pkg::cordic_cos_sin), so no data file is needed. The read is
// asynchronous (a distributed ROM), so the caller places the register.
//
// The document uses a vendor look-up-table core and gives only its function; the
// table size and word width are this design's choice.
module sincos_lut #(
  parameter int PW = cs_pkg::PHASE_W,
  parameter int AW = 10,
  parameter int CW = 16
) (
  input  logic [PW-1:0]        phase,
  output logic signed [CW-1:0] cos_o,
  output logic signed [CW-1:0] sin_o
);
  localparam int DEPTH = 1 << AW;

  typedef logic signed [CW-1:0] tbl_t [DEPTH];

  // The table is a constant function of the parameters, evaluated at
  // elaboration; sin_not_cos selects the column.
  function automatic tbl_t make_tbl(input bit sin_not_cos);
    tbl_t t;
    longint v, amp;
    amp = longint'((1 << (CW-1)) - 1);
    for (int i = 0; i < DEPTH; i++) begin
      v = cs_pkg::cordic_cos_sin(32'(longint'(i) << (32 - AW)), sin_not_cos);
      t[i] = CW'((v * amp + (64'sd1 <<< 29)) >>> 30);
    end
    return t;
  endfunction

  localparam tbl_t COS_TBL = make_tbl(1'b0);
  localparam tbl_t SIN_TBL = make_tbl(1'b1);

  logic [AW-1:0] addr;
  if (PW > AW) begin : g_round
    logic [PW-1:0] ph_r;
    assign ph_r = phase + PW'(1 << (PW-AW-1));
    assign addr = ph_r[PW-1 -: AW];
  end else begin : g_exact
    assign addr = AW'(phase) << (AW-PW);
  end

  assign cos_o = COS_TBL[addr];
  assign sin_o = SIN_TBL[addr];

endmodule
