// hh_pivot: Householder vector generation for one column pair of the real-valued matrix.
//
// In the real-valued decomposition each complex entry a+ib becomes the 2x2 block [a -b; b a],
// so the even column of every pair is x2 = J*x1, where J maps each row pair (a, b) to (-b, a).
// x2 is orthogonal to x1 and has the same length. This unit takes the pivot column x1
// (the M rows still being reduced) and produces both reflectors of the pair at once
// (written here for the column after normalisation, see below):
//   alpha  = sign(x1[0]) * ||x1||           (sign(0) taken as +1)
//   v1     = x1 + alpha*e0,   d1 = v1'v1/2 = alpha*(alpha + x1[0])
//   G      = -x1[1] / (alpha + x1[0])
//   z      = x2 - G*v1        (= x2 after the first reflection; z[0] is 0 by construction)
//   v2     = z with z[0] := 0 and z[1] += alpha,   d2 = v2'v2/2 = alpha*(alpha + z[1])
// and the reciprocals inv_d1 = 1/d1, inv_d2 = 1/d2, so that each reflection is
// c -> c - v*((v'c)*inv_d). Both reflections reduce their column to -alpha on the diagonal,
// which is r_diag. Computing v2 from x1 through G, without waiting for the first reflection,
// follows the design description; so does reusing alpha for the second column. The
// description states that v2 has the same squared norm as v1; in general it does not (z[1]
// differs from x1[0]), so d2 is computed from v2's own lead element here.
// A reflector does not change when its column is scaled, so the pivot column is first shifted
// left by sh bits (0..SH_MAX, leading-zero count of its largest entry) until its largest entry
// is at least 0.5; v1, v2 and the reciprocals describe that scaled column and r_diag is shifted
// back. This keeps 1/d1 and 1/d2 inside the word for the small pivot columns of
// ill-conditioned channels. The normalisation shift is this design's own addition.
// Combinational; one square root and three divisions.
module hh_pivot #(
  parameter int M      = 2 * qrd_pkg::N,  // rows still being reduced (even)
  parameter int SH_MAX = 16               // largest normalisation shift
) (
  input  qrd_pkg::fx_t x1     [M],
  output qrd_pkg::fx_t v1     [M],
  output qrd_pkg::fx_t v2     [M],
  output qrd_pkg::fx_t inv_d1,
  output qrd_pkg::fx_t inv_d2,
  output qrd_pkg::fx_t r_diag
);
  import qrd_pkg::*;

  localparam int AW = 2 * WD + 4;

  logic signed [AW-1:0] acc;
  fx_t norm2, nrm, alpha, den_g, num_g, g, d1, d2;
  fx_t z  [M];
  fx_t xs [M];
  logic [WD-1:0] mag_or;
  int unsigned   hb, sh;

  // normalisation: find the highest magnitude bit over the column, shift it up to bit FR-1
  always_comb begin
    mag_or = '0;
    for (int i = 0; i < M; i++) mag_or |= (x1[i][WD-1] ? ~x1[i] : x1[i]);
    hb = 0;
    for (int b = 0; b < WD; b++) if (mag_or[b]) hb = b;
    if (mag_or == '0 || hb >= FR - 1)  sh = 0;
    else if (FR - 1 - hb > SH_MAX)     sh = SH_MAX;
    else                               sh = FR - 1 - hb;
    for (int i = 0; i < M; i++) xs[i] = x1[i] <<< sh;
  end

  always_comb begin
    acc = '0;
    for (int i = 0; i < M; i++) acc += AW'(fx_mul_full(xs[i], xs[i]));
    norm2 = fx_t'(acc >>> FR);
  end

  fx_sqrt u_sqrt (.a(norm2), .q(nrm));

  always_comb begin
    alpha = xs[0][WD-1] ? -nrm : nrm;
    den_g = xs[0] + alpha;
    num_g = -xs[1];
    d1    = fx_mul(alpha, den_g);
    for (int i = 0; i < M; i++) v1[i] = xs[i];
    v1[0] = den_g;
  end

  fx_div u_div_g (.a(num_g), .b(den_g), .q(g));

  always_comb begin
    for (int p = 0; p < M / 2; p++) begin
      // x2 = J*x1, then remove the v1 component
      z[2*p]   = -xs[2*p+1] - fx_mul(g, v1[2*p]);
      z[2*p+1] =  xs[2*p]   - fx_mul(g, v1[2*p+1]);
    end
    for (int i = 0; i < M; i++) v2[i] = z[i];
    v2[0] = '0;
    v2[1] = z[1] + alpha;
    d2    = fx_mul(alpha, v2[1]);
    r_diag = -(alpha >>> sh);
  end

  fx_div u_div_d1 (.a(fx_t'(1) <<< FR), .b(d1), .q(inv_d1));
  fx_div u_div_d2 (.a(fx_t'(1) <<< FR), .b(d2), .q(inv_d2));

endmodule
