// delay_line: chain of register banks that carries a word alongside the systolic pipeline.
//
// Delays d by DEPTH clock cycles (DEPTH = 0 is a plain wire). In the processor, the rows of R
// and of Q'y that an early stage produces travel through such banks so that all of them
// leave the last stage in the same cycle, which is the role of the register banks between
// the stages of the systolic array. Data registers have no reset; the valid flag that
// qualifies them is reset by the stages. With DEPTH = 0 the clock input is unused, which
// lint reports; the port is kept so that every instance has the same interface.
module delay_line #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] bank [DEPTH];
    always_ff @(posedge clk) begin
      bank[0] <= d;
      for (int i = 1; i < DEPTH; i++) bank[i] <= bank[i-1];
    end
    assign q = bank[DEPTH-1];
  end
endmodule
