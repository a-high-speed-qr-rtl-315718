// qrd_ref_pkg: floating-point reference for the testbenches.
//
// Textbook Householder QR of the 2N x 2N real-valued matrix, column by column, with the usual
// sign rule v = x + sign(x0)*||x||*e0 (sign(0) = +1), applied to [H_R | y]. It knows nothing
// of the column pairing or of the fixed-point format of the design, so it checks both.
package qrd_ref_pkg;

  parameter int MAXR = 8;

  typedef real mat_t [MAXR][MAXR+1];

  // A: rows x (rows+1), last column is y. Runs `steps` Householder steps (all of them for a
  // full QR) and returns R in columns 0..rows-1 and Q'y in column rows.
  function automatic mat_t householder(mat_t a_in, int rows, int steps = MAXR);
    mat_t a;
    real  v [MAXR];
    real  nrm, alpha, vv, dot;
    a = a_in;
    for (int k = 0; k < rows && k < steps; k++) begin
      nrm = 0.0;
      for (int i = k; i < rows; i++) nrm += a[i][k] * a[i][k];
      nrm   = $sqrt(nrm);
      alpha = (a[k][k] < 0.0) ? -nrm : nrm;
      for (int i = 0; i < MAXR; i++) v[i] = 0.0;
      for (int i = k; i < rows; i++) v[i] = a[i][k];
      v[k] += alpha;
      vv = 0.0;
      for (int i = k; i < rows; i++) vv += v[i] * v[i];
      if (vv > 0.0) begin
        for (int c = k; c <= rows; c++) begin
          dot = 0.0;
          for (int i = k; i < rows; i++) dot += v[i] * a[i][c];
          for (int i = k; i < rows; i++) a[i][c] -= 2.0 * v[i] * dot / vv;
        end
      end
    end
    return a;
  endfunction

endpackage
