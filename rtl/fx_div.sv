// fx_div: division arithmetic unit of the Householder pipeline.
//
// Returns q = a / b for signed fixed-point operands (WD bits, FR fractional), in the same
// format. Magnitudes are divided by restoring long division, one quotient bit per loop step,
// then the sign is applied; the unit is combinational. A quotient that does not fit is
// saturated to the largest magnitude, and b = 0 gives q = 0, so that a zero Householder vector
// leaves its column unchanged downstream. The design description lists division units among
// its arithmetic units without their insides; the method, the saturation and the
// divide-by-zero rule are this design's choices.
module fx_div #(
  parameter int WD = qrd_pkg::WD,
  parameter int FR = qrd_pkg::FR
) (
  input  logic signed [WD-1:0] a,
  input  logic signed [WD-1:0] b,
  output logic signed [WD-1:0] q
);
  localparam int NW = WD + FR;  // dividend width after scaling

  logic [NW-1:0] num;
  logic [WD-1:0] den;
  logic [WD:0]   rem;
  logic [NW-1:0] quo;
  logic          neg;
  logic [WD-1:0] mag;

  always_comb begin
    neg = a[WD-1] ^ b[WD-1];
    num = NW'(a[WD-1] ? unsigned'(-a) : unsigned'(a)) << FR;
    den = b[WD-1] ? unsigned'(-b) : unsigned'(b);
    rem = '0;
    quo = '0;
    for (int i = NW - 1; i >= 0; i--) begin
      rem = {rem[WD-1:0], num[i]};
      if (rem >= {1'b0, den}) begin
        rem    = rem - {1'b0, den};
        quo[i] = 1'b1;
      end
    end
    // saturate to the largest positive magnitude
    if (quo > NW'({1'b0, {(WD-1){1'b1}}})) mag = {1'b0, {(WD-1){1'b1}}};
    else                                   mag = quo[WD-1:0];
    if (den == '0)  q = '0;
    else if (neg)   q = -signed'(mag);
    else            q = signed'(mag);
  end
endmodule
