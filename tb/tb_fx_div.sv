// tb_fx_div: checks the division unit against real-valued division.
// Random signed operands, quotients near and beyond the range (saturation), and division by
// zero (result 0). In range, the quotient magnitude must be the truncated exact one.
module tb_fx_div;
  import qrd_pkg::*;

  fx_t a, b, q;
  int checks = 0, failures = 0, n_sat = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  fx_div dut (.a(a), .b(b), .q(q));

  localparam real SCALE = real'(64'(1) << FR);
  localparam real QMAX  = real'({1'b0, {(WD-1){1'b1}}}) / SCALE;

  task automatic check(fx_t x, fx_t y);
    real want, got, e;
    a = x;
    b = y;
    #1;
    got = real'(q) / SCALE;
    if (y == 0) want = 0.0;
    else begin
      want = (real'(x) / SCALE) / (real'(y) / SCALE);
      if (want > QMAX)  begin want = QMAX;  n_sat++; end
      if (want < -QMAX) begin want = -QMAX; n_sat++; end
    end
    e = got - want;
    if (e < 0.0) e = -e;
    checks++;
    if (e > 1.0 / SCALE + 1e-9 * (want < 0 ? -want : want)) begin
      failures++;
      $display("%f / %f: got %f want %f", real'(x) / SCALE, real'(y) / SCALE, got, want);
    end
  endtask

  initial begin
    check(fx_t'(1) <<< FR, fx_t'(3) <<< FR);
    check(-(fx_t'(1) <<< FR), fx_t'(4) <<< FR);
    check(fx_t'(7) <<< FR, -(fx_t'(2) <<< FR));
    check(fx_t'(5) <<< FR, 0);
    check(fx_t'(1) <<< FR, 1);                     // saturates
    check(-(fx_t'(1) <<< FR), 1);                  // saturates negative
    for (int i = 0; i < 3000; i++)
      check(fx_t'($urandom) >>> $urandom_range(0, 16), fx_t'($urandom) >>> $urandom_range(0, 20));
    $display("saturated cases: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
