// Signed fixed-point divider.
//
// q = saturate((num * 2^SHIFT) / den), computed in one combinational step.
// With the defaults a Q3.13 numerator over a Q3.13 denominator gives a Q3.13
// quotient (SHIFT = 13). Wider operands are allowed so that the zero-forcing
// unit can divide by a squared magnitude kept at full precision. The quotient
// is truncated toward zero (the behaviour of integer division). Division by
// zero returns the largest value of the numerator's sign and raises ovf, as
// does a quotient that does not fit OUT_W bits.
//
// The design names a fixed-point divider as one of its basic circuits and
// notes it is the slowest path of the coefficient solver; the single-cycle
// array form used here is this design's choice.
module fx_div #(
  parameter int unsigned NUM_W = 16,
  parameter int unsigned DEN_W = 16,
  parameter int unsigned SHIFT = 13,
  parameter int unsigned OUT_W = 16
) (
  input  logic signed [NUM_W-1:0] num,
  input  logic signed [DEN_W-1:0] den,
  output logic signed [OUT_W-1:0] q,
  output logic                    ovf
);
  localparam int unsigned QW = NUM_W + SHIFT;
  localparam logic signed [QW-1:0] QMAX = QW'((64'sd1 <<< (OUT_W-1)) - 1);
  localparam logic signed [QW-1:0] QMIN = QW'(-(64'sd1 <<< (OUT_W-1)));

  logic signed [QW-1:0] dividend, quotient;

  always_comb begin
    dividend = QW'(num) <<< SHIFT;
    quotient = '0;
    ovf      = 1'b0;
    if (den == '0) begin
      ovf      = 1'b1;
      quotient = num[NUM_W-1] ? QMIN : QMAX;
    end else begin
      quotient = dividend / QW'(den);
      if (quotient > QMAX) begin
        quotient = QMAX;
        ovf      = 1'b1;
      end else if (quotient < QMIN) begin
        quotient = QMIN;
        ovf      = 1'b1;
      end
    end
    q = OUT_W'(quotient);
  end
endmodule
