// Serial restoring divider for unsigned integers: quot = floor(num/den), one quotient
// bit per clock, most significant first.
//
// Interface: start (one-clock pulse, ignored while busy) with num and den; done pulses
// for one clock with quot valid, quot then holds. A zero divisor returns all ones.
// done is high NW+2 clocks after the clock that takes start.
//
// The document takes a vendor divider core for Eq. (14) and for the decision directed
// frequency estimate and gives only its function; the serial structure is this
// design's choice (one division per burst needs no more).
module divider_serial #(
  parameter int NW = 24,  // dividend and quotient width
  parameter int DW = 16   // divisor width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quot
);
  localparam int CW = $clog2(NW + 1);

  logic [NW-1:0] q;     // dividend bits shifting out, quotient bits shifting in
  logic [DW:0]   rem;
  logic [DW-1:0] d;
  logic [CW-1:0] cnt;
  logic [DW:0]   trial;

  assign trial = {rem[DW-1:0], q[NW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; quot <= '0;
      q <= '0; rem <= '0; d <= '0; cnt <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          q    <= num;
          rem  <= '0;
          d    <= den;
          cnt  <= '0;
        end
      end else if (cnt == CW'(NW)) begin
        busy <= 1'b0;
        done <= 1'b1;
        quot <= (d == '0) ? '1 : q;
      end else begin
        cnt <= cnt + 1'b1;
        if (trial >= {1'b0, d}) begin
          rem <= trial - {1'b0, d};
          q   <= {q[NW-2:0], 1'b1};
        end else begin
          rem <= trial;
          q   <= {q[NW-2:0], 1'b0};
        end
      end
    end
  end

endmodule
