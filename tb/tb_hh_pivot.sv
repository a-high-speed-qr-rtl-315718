// tb_hh_pivot: checks the Householder vector generation for M = 8 and M = 2 rows.
// For random pivot columns x1 (and for lead elements that are negative, positive or zero) the
// expected alpha, v1, v2 and 2/(v'v) are worked out in floating point the textbook way:
// reflect x2 = J*x1 with the first reflector, then build the second reflector from the
// reflected column. The unit computes v2 without that first reflection, so this checks the
// parallel construction too. The unit may scale its column by a power of two before it works
// (the reflectors do not change), so v1 and v2 are compared after dividing by their length,
// the length ratio must be the same power of two for both and 2^0..2^16, and inv_dk is
// checked through inv_dk * vk'vk / 2 = 1, which does not depend on the scale. Every third
// column is made small to exercise that scaling; r_diag is never scaled.
module tb_hh_pivot;
  import qrd_pkg::*;

  localparam real SCALE = real'(64'(1) << FR);
  localparam real TOL = 2e-4;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  fx_t x8 [8], v1_8 [8], v2_8 [8], i1_8, i2_8, rd_8;
  fx_t x2 [2], v1_2 [2], v2_2 [2], i1_2, i2_2, rd_2;

  hh_pivot #(.M(8)) dut8 (.x1(x8), .v1(v1_8), .v2(v2_8), .inv_d1(i1_8), .inv_d2(i2_8), .r_diag(rd_8));
  hh_pivot #(.M(2)) dut2 (.x1(x2), .v1(v1_2), .v2(v2_2), .inv_d1(i1_2), .inv_d2(i2_2), .r_diag(rd_2));

  function automatic real fr(fx_t v);
    return real'(v) / SCALE;
  endfunction

  task automatic cmp(string what, real got, real want, real tol);
    real e;
    e = got - want;
    if (e < 0.0) e = -e;
    checks++;
    if (e > tol) begin
      failures++;
      if (failures < 20) $display("%s: got %f want %f", what, got, want);
    end
  endtask

  // floating-point expectation for an m-row pivot column
  task automatic expect_check(input real x [8], input int m, input fx_t v1g [8], input fx_t v2g [8],
                              input fx_t i1g, input fx_t i2g, input fx_t rdg);
    real nrm, alpha, x2r [8], v1 [8], v2 [8], vv1, vv2, dot, z [8], a2;
    nrm = 0.0;
    for (int i = 0; i < m; i++) nrm += x[i] * x[i];
    nrm   = $sqrt(nrm);
    alpha = (x[0] < 0.0) ? -nrm : nrm;
    for (int i = 0; i < m; i++) v1[i] = x[i];
    v1[0] += alpha;
    vv1 = 0.0;
    for (int i = 0; i < m; i++) vv1 += v1[i] * v1[i];
    for (int p = 0; p < m / 2; p++) begin
      x2r[2*p] = -x[2*p+1];
      x2r[2*p+1] = x[2*p];
    end
    dot = 0.0;
    for (int i = 0; i < m; i++) dot += v1[i] * x2r[i];
    for (int i = 0; i < m; i++) z[i] = x2r[i] - 2.0 * v1[i] * dot / vv1;
    // second reflector on rows 1..m-1 of the reflected column
    nrm = 0.0;
    for (int i = 1; i < m; i++) nrm += z[i] * z[i];
    nrm = $sqrt(nrm);
    a2  = (z[1] < 0.0) ? -nrm : nrm;
    v2[0] = 0.0;
    for (int i = 1; i < m; i++) v2[i] = z[i];
    v2[1] += a2;
    vv2 = 0.0;
    for (int i = 0; i < m; i++) vv2 += v2[i] * v2[i];
    cmp("r_diag", fr(rdg), -alpha, TOL + 1e-3 * nrm);
    cmp("alpha2", a2, alpha, 1e-9 + 1e-9 * nrm);  // same length, same sign: alpha reused
    begin
      real g1, g2, sc, lg;
      g1 = 0.0;
      g2 = 0.0;
      for (int i = 0; i < m; i++) begin
        g1 += fr(v1g[i]) * fr(v1g[i]);
        g2 += fr(v2g[i]) * fr(v2g[i]);
      end
      sc = $sqrt(g1 / vv1);
      lg = $ln(sc) / $ln(2.0);
      cmp("scale is a power of two", lg, real'($rtoi(lg + 0.5)), 1e-2);
      checks++;
      if (lg < -0.01 || lg > 16.01) begin failures++; $display("scale 2^%f", lg); end
      cmp("v2 scale", $sqrt(g2 / vv2), sc, 1e-3 * sc);
      for (int i = 0; i < m; i++) cmp("v1", fr(v1g[i]) / $sqrt(g1), v1[i] / $sqrt(vv1), 2e-3);
      for (int i = 0; i < m; i++) cmp("v2", fr(v2g[i]) / $sqrt(g2), v2[i] / $sqrt(vv2), 2e-3);
      cmp("inv_d1", fr(i1g) * g1 / 2.0, 1.0, 2e-3);
      cmp("inv_d2", fr(i2g) * g2 / 2.0, 1.0, 2e-3);
    end
  endtask

  initial begin
    real xr [8];
    fx_t pad [8];
    for (int t = 0; t < 600; t++) begin
      for (int i = 0; i < 8; i++) begin
        x8[i] = fx_t'(int'($urandom_range(0, 1 << 22)) - (1 << 21));
        xr[i] = fr(x8[i]);
      end
      if (t % 5 == 1) begin x8[0] = 0; xr[0] = 0.0; end
      if (t % 3 == 2) begin
        int s;
        s = $urandom_range(4, 10);
        for (int i = 0; i < 8; i++) begin
          x8[i] = x8[i] >>> s;
          xr[i] = fr(x8[i]);
        end
      end
      x2[0] = x8[0];
      x2[1] = x8[1];
      #1;
      expect_check(xr, 8, v1_8, v2_8, i1_8, i2_8, rd_8);
      for (int i = 0; i < 8; i++) pad[i] = 0;
      pad[0] = v1_2[0]; pad[1] = v1_2[1];
      begin
        fx_t pad2 [8];
        for (int i = 0; i < 8; i++) pad2[i] = 0;
        pad2[0] = v2_2[0]; pad2[1] = v2_2[1];
        expect_check(xr, 2, pad, pad2, i1_2, i2_2, rd_2);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
