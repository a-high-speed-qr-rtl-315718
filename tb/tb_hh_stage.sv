// tb_hh_stage: checks one systolic stage (4 column pairs, M = 8 rows) against two steps of a
// floating-point Householder QR of the full real-valued matrix [H_R | y], where H_R carries
// both columns of every pair. Inputs change every cycle; each result must appear exactly one
// cycle later, and out_valid must follow in_valid and be cleared by reset.
// A second instance with FOLD = 3 (two shared column units) gets the same matrices one at a
// time through its in_valid/in_ready handshake; its results must match the same reference,
// arrive FOLD cycles after the edge that took the input, and in_ready must be low while it
// works except in its last fold cycle.
module tb_hh_stage;
  import qrd_pkg::*;
  import qrd_ref_pkg::*;

  localparam int  NC = 4;
  localparam int  M  = 2 * NC;
  localparam real SCALE = real'(64'(1) << FR);
  localparam int  NT = 300;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0, in_valid = 1'b0, in_ready, out_valid;
  fx_t  in_cols [NC][M], out_cols [NC][M];
  fx_t  in_y [M], out_y [M];
  int   checks = 0, failures = 0;
  real  max_e = 0.0;

  hh_stage #(.NC(NC)) dut (.*);

  localparam int F = 3;
  logic f_in_valid = 1'b0, f_in_ready, f_out_valid;
  fx_t  f_in_cols [NC][M], f_out_cols [NC][M];
  fx_t  f_in_y [M], f_out_y [M];
  logic f_done = 1'b0;

  hh_stage #(.NC(NC), .FOLD(F)) dut_f (
    .clk(clk), .rst_n(rst_n), .in_valid(f_in_valid), .in_ready(f_in_ready), .in_cols(f_in_cols),
    .in_y(f_in_y), .out_valid(f_out_valid), .out_cols(f_out_cols), .out_y(f_out_y)
  );

  fx_t  s_cols [NT][NC][M];
  fx_t  s_y    [NT][M];
  logic s_v    [NT];

  function automatic real fr(fx_t v);
    return real'(v) / SCALE;
  endfunction

  function automatic fx_t rnd();
    return fx_t'(int'($urandom_range(0, 1 << (FR + 1))) - (1 << FR));
  endfunction

  task automatic cmp(int t, int i, int c, real got, real want);
    real e;
    e = got - want;
    if (e < 0.0) e = -e;
    if (e > max_e) max_e = e;
    checks++;
    if (e > 1e-3) begin
      failures++;
      if (failures < 10) $display("t=%0d row %0d col %0d got %f want %f", t, i, c, got, want);
    end
  endtask

  task automatic check_against_ref(int t, fx_t oc [NC][M], fx_t oy [M]);
    mat_t a, ref_m;
    for (int i = 0; i < MAXR; i++) for (int c = 0; c <= MAXR; c++) a[i][c] = 0.0;
    for (int j = 0; j < NC; j++)
      for (int p = 0; p < NC; p++) begin
        a[2*p][2*j]     =  fr(s_cols[t][j][2*p]);
        a[2*p+1][2*j]   =  fr(s_cols[t][j][2*p+1]);
        a[2*p][2*j+1]   = -fr(s_cols[t][j][2*p+1]);
        a[2*p+1][2*j+1] =  fr(s_cols[t][j][2*p]);
      end
    for (int i = 0; i < M; i++) a[i][M] = fr(s_y[t][i]);
    ref_m = householder(a, M, 2);
    for (int j = 0; j < NC; j++)
      for (int i = 0; i < M; i++) cmp(t, i, 2 * j, fr(oc[j][i]), ref_m[i][2*j]);
    for (int i = 0; i < M; i++) cmp(t, i, M, fr(oy[i]), ref_m[i][M]);
    // the even column of the pivot pair is reduced too: R[1][1] equals R[0][0]
    cmp(t, 1, 1, fr(oc[0][0]), ref_m[1][1]);
  endtask

  // folded instance: one matrix at a time through the handshake
  initial begin
    int t_take, n_busy;
    wait (rst_n === 1'b1);
    for (int t = 0; t < NT / 4; t++) begin
      @(posedge clk);
      #1;
      f_in_cols  = s_cols[t];
      f_in_y     = s_y[t];
      f_in_valid = 1'b1;
      do @(posedge clk); while (!f_in_ready);
      t_take = $time;
      #1;
      f_in_valid = 1'b0;
      n_busy = 0;
      while (!f_out_valid) begin
        checks++;
        // ready again only in the last fold cycle
        if (f_in_ready !== (n_busy == F - 1)) begin
          failures++;
          $display("folded: in_ready %b in fold cycle %0d", f_in_ready, n_busy);
        end
        n_busy++;
        @(posedge clk);
        #1;
      end
      checks++;
      if (n_busy != F) begin
        failures++;
        $display("folded: result %0d cycles after the input was taken, want %0d", n_busy, F);
      end
      check_against_ref(t, f_out_cols, f_out_y);
    end
    f_done = 1'b1;
  end

  initial begin
    for (int t = 0; t < NT; t++) begin
      for (int j = 0; j < NC; j++) for (int i = 0; i < M; i++) s_cols[t][j][i] = rnd();
      for (int i = 0; i < M; i++) s_y[t][i] = rnd();
      s_v[t] = ($urandom_range(0, 3) != 0);
    end
    // during reset the valid output must stay low
    in_valid = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 1'b0) begin failures++; $display("valid not cleared by reset"); end
    rst_n = 1'b1;
    for (int t = 0; t < NT; t++) begin
      in_cols  = s_cols[t];
      in_y     = s_y[t];
      in_valid = s_v[t];
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== s_v[t]) begin failures++; $display("t=%0d valid wrong", t); end
      check_against_ref(t, out_cols, out_y);
    end
    wait (f_done);
    $display("max error %g", max_e);
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
