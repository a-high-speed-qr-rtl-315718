// tb_qrd_cond: the processor on ill-conditioned (spatially correlated) 4x4 channels.
//
// For condition numbers 10, 200, 400, 600 and 800 it builds complex channels
// H = U * diag(1, s, s^2, 1/kappa) * W with U, W random complex Householder reflectors
// (unitary), s = kappa^(-1/3), quantizes them to 13-bit samples and runs them through qrd_top
// back to back. The checks need no reference decomposition: with Q orthonormal,
//   R'R = H_R'H_R,   R'(Q'y) = H_R'y   and   ||Q'y|| = ||y||
// must hold, so the largest deviation measures how orthonormal the implied Q is. Each
// deviation must stay below 2e-3 (entries of H are at most 1 in magnitude). The mean squared
// deviation of R'R per condition number is printed.
module tb_qrd_cond;
  import qrd_pkg::*;

  localparam int  R2  = 2 * N;
  localparam int  PER = 40;            // matrices per condition number
  localparam int  NK  = 5;
  localparam int  NT  = PER * NK;
  localparam real TOL = 2e-3;
  localparam real SCALE = real'(64'(1) << FR);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic in_ready;
  in_t  h_re [N][N];
  in_t  h_im [N][N];
  in_t  y_re [N];
  in_t  y_im [N];
  logic out_valid;
  fx_t  r   [R2][R2];
  fx_t  qty [R2];

  qrd_top dut (.*);

  always #5 clk = ~clk;

  int  checks = 0, failures = 0;
  int  s_hre [NT][N][N];
  int  s_him [NT][N][N];
  int  s_yre [NT][N];
  int  s_yim [NT][N];
  int  n_recv = 0;
  real mse [NK];
  int  kappas [NK] = '{10, 200, 400, 600, 800};

  function automatic real rnd_u();
    return (real'($urandom_range(0, 1000000)) / 500000.0) - 1.0;
  endfunction

  // random complex Householder reflector I - 2uu^H/(u^H u), as separate real/imag parts
  task automatic reflector(output real mr [N][N], output real mi [N][N]);
    real ur [N], ui [N], nn;
    nn = 0.0;
    for (int i = 0; i < N; i++) begin
      ur[i] = rnd_u();
      ui[i] = rnd_u();
      nn += ur[i] * ur[i] + ui[i] * ui[i];
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        // u_i * conj(u_j)
        mr[i][j] = ((i == j) ? 1.0 : 0.0) - 2.0 * (ur[i] * ur[j] + ui[i] * ui[j]) / nn;
        mi[i][j] = -2.0 * (ui[i] * ur[j] - ur[i] * ui[j]) / nn;
      end
  endtask

  initial begin
    real ar [N][N], ai [N][N], br [N][N], bi [N][N], s [N], hr, hi, st;
    for (int k = 0; k < NK; k++) begin
      st = $pow(real'(kappas[k]), -1.0 / 3.0);
      s[0] = 1.0; s[1] = st; s[2] = st * st; s[3] = 1.0 / real'(kappas[k]);
      for (int p = 0; p < PER; p++) begin
        int t;
        t = k * PER + p;
        reflector(ar, ai);
        reflector(br, bi);
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) begin
            hr = 0.0;
            hi = 0.0;
            for (int m = 0; m < N; m++) begin
              hr += s[m] * (ar[i][m] * br[m][j] - ai[i][m] * bi[m][j]);
              hi += s[m] * (ar[i][m] * bi[m][j] + ai[i][m] * br[m][j]);
            end
            s_hre[t][i][j] = int'(hr * 4000.0);
            s_him[t][i][j] = int'(hi * 4000.0);
          end
        for (int i = 0; i < N; i++) begin
          s_yre[t][i] = int'(rnd_u() * 4000.0);
          s_yim[t][i] = int'(rnd_u() * 4000.0);
        end
      end
      mse[k] = 0.0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < NT; t++) begin
      @(posedge clk);
      for (int i = 0; i < N; i++) begin
        for (int j = 0; j < N; j++) begin
          h_re[i][j] <= in_t'(s_hre[t][i][j]);
          h_im[i][j] <= in_t'(s_him[t][i][j]);
        end
        y_re[i] <= in_t'(s_yre[t][i]);
        y_im[i] <= in_t'(s_yim[t][i]);
      end
      in_valid <= 1'b1;
    end
    @(posedge clk);
    in_valid <= 1'b0;
  end

  task automatic cmp(int t, string what, real got, real want);
    real e;
    e = got - want;
    if (e < 0.0) e = -e;
    checks++;
    if (e > TOL) begin
      failures++;
      if (failures < 10) $display("t=%0d %s got %f want %f", t, what, got, want);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real hm [R2][R2], yv [R2], rr [R2][R2], qy [R2], g, w, ny, nq;
      int  t;
      t = n_recv;
      for (int i = 0; i < N; i++) begin
        for (int j = 0; j < N; j++) begin
          hm[2*i][2*j]     =  s_hre[t][i][j] / 4096.0;
          hm[2*i+1][2*j]   =  s_him[t][i][j] / 4096.0;
          hm[2*i][2*j+1]   = -s_him[t][i][j] / 4096.0;
          hm[2*i+1][2*j+1] =  s_hre[t][i][j] / 4096.0;
        end
        yv[2*i]   = s_yre[t][i] / 4096.0;
        yv[2*i+1] = s_yim[t][i] / 4096.0;
      end
      for (int i = 0; i < R2; i++) begin
        for (int j = 0; j < R2; j++) rr[i][j] = real'(r[i][j]) / SCALE;
        qy[i] = real'(qty[i]) / SCALE;
      end
      for (int a = 0; a < R2; a++) begin
        for (int b = 0; b < R2; b++) begin
          g = 0.0;
          w = 0.0;
          for (int i = 0; i < R2; i++) begin
            g += rr[i][a] * rr[i][b];
            w += hm[i][a] * hm[i][b];
          end
          cmp(t, "R'R", g, w);
          mse[t / PER] += (g - w) * (g - w) / real'(R2 * R2 * PER);
        end
        g = 0.0;
        w = 0.0;
        for (int i = 0; i < R2; i++) begin
          g += rr[i][a] * qy[i];
          w += hm[i][a] * yv[i];
        end
        cmp(t, "R'Q'y", g, w);
      end
      ny = 0.0;
      nq = 0.0;
      for (int i = 0; i < R2; i++) begin
        ny += yv[i] * yv[i];
        nq += qy[i] * qy[i];
      end
      cmp(t, "||Q'y||^2", nq, ny);
      n_recv++;
    end
  end

  initial begin
    wait (n_recv == NT);
    for (int k = 0; k < NK; k++)
      $display("condition number %0d: mean squared error of R'R %g", kappas[k], mse[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d results", n_recv, NT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
