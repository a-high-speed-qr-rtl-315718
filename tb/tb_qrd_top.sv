// tb_qrd_top: end-to-end test of the QRD processor at its default size (4x4 complex).
//
// Streams random 13-bit channel matrices and receive vectors into qrd_top, with bursts of
// back-to-back inputs and random idle cycles, and compares every R entry and every Q'y entry
// with a floating-point Householder QR of the real-valued matrix (qrd_ref_pkg). Also checks
// that each result appears exactly N cycles after its input, that back-to-back inputs give
// back-to-back results (one QRD per clock) and that in_ready never drops. Counted mechanisms, each of which must occur:
// back-to-back results, input bubbles, pivots with a positive and with a negative lead element,
// and a pivot column with a zero lead element (sign(0) rule).
module tb_qrd_top;
  import qrd_pkg::*;
  import qrd_ref_pkg::*;

  localparam int NT     = 400;           // matrices
  localparam int FOLD   = qrd_pkg::FOLD;
  localparam int LAT    = (FOLD <= 1) ? 1 : FOLD + 1;   // cycles per stage
  localparam int II     = (FOLD <= 1) ? 1 : FOLD;       // cycles between inputs
  localparam int R2     = 2 * N;
  localparam real TOL_ABS = 0.02;
  localparam real TOL_REL = 0.02;

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

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // stored stimulus
  int  s_hre [NT][N][N];
  int  s_him [NT][N][N];
  int  s_yre [NT][N];
  int  s_yim [NT][N];
  int  t_in  [NT];
  int  n_sent = 0, n_recv = 0;
  int  n_notready = 0;
  always @(posedge clk) if (rst_n && !in_ready) n_notready++;
  int  n_b2b = 0, n_bubble = 0, n_pos = 0, n_neg = 0, n_zero = 0;
  real max_err = 0.0;
  int  last_out_cycle = -10;

  function automatic int rnd13();
    return int'($urandom_range(0, 8191)) - 4096;
  endfunction

  initial begin
    for (int t = 0; t < NT; t++) begin
      for (int i = 0; i < N; i++) begin
        for (int j = 0; j < N; j++) begin
          s_hre[t][i][j] = rnd13();
          s_him[t][i][j] = rnd13();
        end
        s_yre[t][i] = rnd13();
        s_yim[t][i] = rnd13();
      end
      // every 7th matrix has a zero lead element in its first column
      if (t % 7 == 3) s_hre[t][0][0] = 0;
    end
  end

  // driver: an input is taken at an edge where in_valid and in_ready are both high
  int n_held = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) begin
        t_in[n_sent] = cycle;
        n_sent++;
      end else if (in_valid) n_held++;
      // bursts of back-to-back inputs with occasional bubbles
      if (n_sent < NT && (n_sent % 16 < 12 || $urandom_range(0, 1) == 1)) begin
        for (int i = 0; i < N; i++) begin
          for (int j = 0; j < N; j++) begin
            h_re[i][j] <= in_t'(s_hre[n_sent][i][j]);
            h_im[i][j] <= in_t'(s_him[n_sent][i][j]);
          end
          y_re[i] <= in_t'(s_yre[n_sent][i]);
          y_im[i] <= in_t'(s_yim[n_sent][i]);
        end
        in_valid <= 1'b1;
      end else begin
        in_valid <= 1'b0;
        if (n_sent < NT) n_bubble++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
  end

  function automatic real to_r(fx_t v);
    return real'(v) / real'(64'(1) << FR);
  endfunction

  // monitor
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      mat_t a, ref_m;
      real  e, got, want;
      int   t;
      t = n_recv;
      for (int i = 0; i < MAXR; i++) for (int c = 0; c <= MAXR; c++) a[i][c] = 0.0;
      for (int i = 0; i < N; i++) begin
        for (int j = 0; j < N; j++) begin
          a[2*i][2*j]     =  s_hre[t][i][j] / 4096.0;
          a[2*i+1][2*j]   =  s_him[t][i][j] / 4096.0;
          a[2*i][2*j+1]   = -s_him[t][i][j] / 4096.0;
          a[2*i+1][2*j+1] =  s_hre[t][i][j] / 4096.0;
        end
        a[2*i][R2]   = s_yre[t][i] / 4096.0;
        a[2*i+1][R2] = s_yim[t][i] / 4096.0;
      end
      ref_m = householder(a, R2);
      for (int i = 0; i < R2; i++) begin
        for (int c = 0; c <= R2; c++) begin
          got  = (c < R2) ? to_r(r[i][c]) : to_r(qty[i]);
          want = (c < R2 && c < i) ? 0.0 : ref_m[i][c];
          e = (got > want) ? got - want : want - got;
          if (e > max_err) max_err = e;
          checks++;
          if (e > TOL_ABS + TOL_REL * ((want < 0.0) ? -want : want)) begin
            failures++;
            if (failures < 10)
              $display("MISMATCH t=%0d R[%0d][%0d] got %f want %f", t, i, c, got, want);
          end
        end
        if (i % 2 == 0) begin
          if (ref_m[i][i] < 0.0) n_pos++; else n_neg++;
        end
      end
      if (s_hre[t][0][0] == 0) n_zero++;
      // latency: N cycles from input to result
      checks++;
      if (cycle - t_in[t] != N * LAT) begin
        failures++;
        $display("LATENCY t=%0d got %0d want %0d", t, cycle - t_in[t], N * LAT);
      end
      if (t > 0 && t_in[t] == t_in[t-1] + II) begin
        checks++;
        if (cycle != last_out_cycle + II) begin
          failures++;
          $display("THROUGHPUT t=%0d back-to-back inputs did not give back-to-back outputs", t);
        end else n_b2b++;
      end
      last_out_cycle = cycle;
      n_recv++;
    end
  end

  task automatic need(string what, int count);
    checks++;
    $display("mechanism %s: %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("mechanism %s never happened", what);
    end
  endtask

  initial begin
    wait (n_recv == NT);
    repeat (2) @(posedge clk);
    need("back_to_back_results", n_b2b);
    need("input_bubbles", n_bubble);
    need("pivot_positive_lead", n_pos);
    need("pivot_negative_lead", n_neg);
    need("pivot_zero_lead", n_zero);
    checks++;
    if (n_notready != 0) begin failures++; $display("in_ready dropped %0d times", n_notready); end
    $display("max abs error %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000 * II) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d results", n_recv, NT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
