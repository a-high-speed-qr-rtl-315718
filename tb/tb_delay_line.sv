// tb_delay_line: checks that the register-bank chain delays random words by exactly DEPTH
// cycles, for DEPTH = 3 and DEPTH = 0 (wire).
module tb_delay_line;
  localparam int W = 40;
  localparam int D = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [W-1:0] d, q3, q0;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  delay_line #(.WIDTH(W), .DEPTH(D)) dut3 (.clk(clk), .d(d), .q(q3));
  delay_line #(.WIDTH(W), .DEPTH(0)) dut0 (.clk(clk), .d(d), .q(q0));

  initial begin
    d = '0;
    for (int t = 0; t < 500; t++) begin
      d = {$urandom, $urandom};
      #1;
      checks++;
      if (q0 !== d) begin failures++; $display("depth 0 mismatch"); end
      hist.push_back(d);
      @(posedge clk);
      #1;
      if (hist.size() >= D) begin
        logic [W-1:0] want;
        want = hist.pop_front();
        checks++;
        if (q3 !== want) begin
          failures++;
          if (failures < 10) $display("t=%0d got %h want %h", t, q3, want);
        end
      end
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
