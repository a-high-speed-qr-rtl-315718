// hh_update: column arithmetic unit of a Householder stage.
//
// Applies the stage's two reflections, one after the other, to one column c of M rows
// (a remaining odd column of the real-valued matrix, or the receive vector y):
//   c'  = c  - v1 * ((v1'c)  * inv_d1)
//   out = c' - v2 * ((v2'c') * inv_d2)
// with inv_dk = 2 / (vk'vk) from hh_pivot. Applying the reflectors to y directly gives Q'y
// without ever forming Q, as in the design description. Dot products are accumulated at full
// product precision and rounded once. Combinational.
module hh_update #(
  parameter int M = 2 * qrd_pkg::N
) (
  input  qrd_pkg::fx_t v1     [M],
  input  qrd_pkg::fx_t v2     [M],
  input  qrd_pkg::fx_t inv_d1,
  input  qrd_pkg::fx_t inv_d2,
  input  qrd_pkg::fx_t c      [M],
  output qrd_pkg::fx_t c_out  [M]
);
  import qrd_pkg::*;

  localparam int AW = 2 * WD + 4;

  logic signed [AW-1:0] acc1, acc2;
  fx_t t1, t2;
  fx_t c1 [M];

  always_comb begin
    acc1 = '0;
    for (int i = 0; i < M; i++) acc1 += AW'(fx_mul_full(v1[i], c[i]));
    t1 = fx_mul(fx_t'(acc1 >>> FR), inv_d1);
    for (int i = 0; i < M; i++) c1[i] = c[i] - fx_mul(v1[i], t1);
    acc2 = '0;
    for (int i = 0; i < M; i++) acc2 += AW'(fx_mul_full(v2[i], c1[i]));
    t2 = fx_mul(fx_t'(acc2 >>> FR), inv_d2);
    for (int i = 0; i < M; i++) c_out[i] = c1[i] - fx_mul(v2[i], t2);
  end
endmodule
