// tb_fx_sqrt: checks the square-root unit against the real-valued square root.
// Random non-negative inputs over the whole range plus corner values; the result must be the
// floor of the exact root in the fixed-point grid (within one LSB), and negative inputs give 0.
module tb_fx_sqrt;
  import qrd_pkg::*;

  fx_t a, q;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  fx_sqrt dut (.a(a), .q(q));

  localparam real SCALE = real'(64'(1) << FR);

  task automatic check(fx_t x);
    real want, got;
    a = x;
    #1;
    want = (x < 0) ? 0.0 : $sqrt(real'(x) / SCALE);
    got  = real'(q) / SCALE;
    checks++;
    if (got > want + 1e-9 || got < want - 1.0 / SCALE - 1e-9) begin
      failures++;
      $display("sqrt(%f): got %f want %f", real'(x) / SCALE, got, want);
    end
  endtask

  initial begin
    check(0);
    check(fx_t'(1) <<< FR);           // 1.0
    check(fx_t'(4) <<< FR);           // 4.0
    check(fx_t'(2) <<< FR);           // 2.0
    check(1);                         // smallest positive
    check(fx_t'({1'b0, {(WD-1){1'b1}}}));  // largest
    check(-(fx_t'(3) <<< FR));        // negative
    for (int i = 0; i < 3000; i++) check(fx_t'($urandom) & fx_t'({1'b0, {(WD-1){1'b1}}}));
    for (int i = 0; i < 1000; i++) check(fx_t'($urandom_range(0, 1 << (FR + 4))));
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
