// fx_sqrt: square-root arithmetic unit of the Householder pipeline.
//
// Returns q = sqrt(a) for a non-negative fixed-point input a (WD bits, FR fractional), in the
// same format. It computes the integer square root of a * 2^FR with the digit-by-digit
// method, one result bit per loop step, so the unit is purely combinational and
// takes no clock. A negative input gives 0. The design description names a square-root unit
// among its arithmetic units but not how it works; the restoring method is this design's choice.
module fx_sqrt #(
  parameter int WD = qrd_pkg::WD,
  parameter int FR = qrd_pkg::FR
) (
  input  logic signed [WD-1:0] a,
  output logic signed [WD-1:0] q
);
  localparam int RW = WD + FR + (((WD + FR) % 2 != 0) ? 1 : 0);  // radicand width, even
  localparam int QW = RW / 2;                                     // root width

  logic [RW-1:0] op;
  logic [RW-1:0] res;
  logic [RW-1:0] one;

  always_comb begin
    op  = (a[WD-1]) ? '0 : (RW'(unsigned'(a)) << FR);
    res = '0;
    one = RW'(1) << (RW - 2);
    for (int i = 0; i < QW; i++) begin
      if (op >= res + one) begin
        op  = op - (res + one);
        res = (res >> 1) + one;
      end else begin
        res = res >> 1;
      end
      one = one >> 2;
    end
    q = WD'(res);
  end
endmodule
