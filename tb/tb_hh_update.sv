// tb_hh_update: checks the column unit against floating-point arithmetic.
// Random vectors v1, v2, c and random scale factors inv_d1, inv_d2 (not necessarily a true
// Householder pair) for M = 8; the expected column is c - v1*(v1'c)*inv_d1 followed by the
// same with v2, in double precision.
module tb_hh_update;
  import qrd_pkg::*;

  localparam int  M = 8;
  localparam real SCALE = real'(64'(1) << FR);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  real max_e = 0.0;

  fx_t v1 [M], v2 [M], c [M], co [M], i1, i2;

  hh_update #(.M(M)) dut (.v1(v1), .v2(v2), .inv_d1(i1), .inv_d2(i2), .c(c), .c_out(co));

  function automatic real fr(fx_t v);
    return real'(v) / SCALE;
  endfunction

  function automatic fx_t rnd(int bits);
    return fx_t'(int'($urandom_range(0, 1 << bits)) - (1 << (bits - 1)));
  endfunction

  initial begin
    real c1 [M], want, dot, e;
    for (int t = 0; t < 1000; t++) begin
      for (int i = 0; i < M; i++) begin
        v1[i] = rnd(FR + 1);
        v2[i] = rnd(FR + 1);
        c[i]  = rnd(FR + 1);
      end
      i1 = rnd(FR);
      i2 = rnd(FR);
      #1;
      dot = 0.0;
      for (int i = 0; i < M; i++) dot += fr(v1[i]) * fr(c[i]);
      for (int i = 0; i < M; i++) c1[i] = fr(c[i]) - fr(v1[i]) * dot * fr(i1);
      dot = 0.0;
      for (int i = 0; i < M; i++) dot += fr(v2[i]) * c1[i];
      for (int i = 0; i < M; i++) begin
        want = c1[i] - fr(v2[i]) * dot * fr(i2);
        e = fr(co[i]) - want;
        if (e < 0.0) e = -e;
        if (e > max_e) max_e = e;
        checks++;
        if (e > 1e-4) begin
          failures++;
          if (failures < 10) $display("t=%0d row %0d got %f want %f", t, i, fr(co[i]), want);
        end
      end
      @(posedge clk);
    end
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
