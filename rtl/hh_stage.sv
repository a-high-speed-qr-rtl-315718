// hh_stage: one stage of the systolic Householder array.
//
// A stage performs two Householder iterations at once, for one column pair of the
// real-valued matrix. It receives the NC odd columns that are still unreduced (the pivot
// column first), each with M = 2*NC rows, and the matching M rows of the receive vector y.
// The even column of each pair is never carried: it is J times the odd one and stays so under
// the stage's combined transform, so only half the columns are processed. Arithmetic units:
// one hh_pivot for the pivot column and one hh_update per remaining column plus one for y,
// so the number of units shrinks by one per stage. A register bank closes the stage.
//
// Outputs (registered, one cycle after the inputs, new inputs every cycle):
//   out_cols[j] : column j after both reflections. Rows 0 and 1 are final rows of R; rows
//                 2..M-1 of columns 1..NC-1 feed the next stage. Column 0 is the reduced pivot
//                 column (-alpha, 0, 0, ...); -alpha is also R's diagonal entry for the
//                 second row of the pair.
//   out_y       : y after both reflections; rows 0 and 1 are final entries of Q'y.
// out_valid follows in_valid with the same delay and is cleared by the synchronous,
// active-low reset.
//
// Folding (FOLD > 1) reuses the column units: the stage then has ceil(NC/FOLD) hh_update
// units, captures its inputs into a hold register (when in_valid and in_ready), and in the
// FOLD following cycles feeds the units the columns (and y) in groups, index f*U + u in fold f.
// out_valid pulses for one cycle after the last fold, FOLD+1 cycles after the inputs were
// presented, and a new input is accepted every FOLD cycles (in_ready). Output columns are
// written group by group, so they are only guaranteed while out_valid is high. With FOLD = 1
// (the default) there is no hold register: all units work in parallel, in_ready is always 1
// and out_valid follows in_valid by one cycle.
//
// Stage structure, unit count and the folding idea follow the design's architecture figure;
// the exact cut (one register bank per stage, combinational units), the hold register and
// the schedule of the folded variant are this design's choices.
module hh_stage #(
  parameter int NC   = qrd_pkg::N,    // unreduced odd columns, pivot included
  parameter int FOLD = qrd_pkg::FOLD  // cycles over which the column units are reused
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  qrd_pkg::fx_t in_cols  [NC][2*NC],
  input  qrd_pkg::fx_t in_y     [2*NC],
  output logic         out_valid,
  output qrd_pkg::fx_t out_cols [NC][2*NC],
  output qrd_pkg::fx_t out_y    [2*NC]
);
  import qrd_pkg::*;

  localparam int M = 2 * NC;

  fx_t v1 [M];
  fx_t v2 [M];
  fx_t inv_d1, inv_d2, diag;

  if (FOLD <= 1) begin : g_unfolded
    fx_t nxt_cols [NC][M];
    fx_t nxt_y    [M];

    hh_pivot #(.M(M)) u_pivot (
      .x1(in_cols[0]), .v1(v1), .v2(v2), .inv_d1(inv_d1), .inv_d2(inv_d2), .r_diag(diag)
    );

    always_comb begin
      for (int i = 0; i < M; i++) nxt_cols[0][i] = '0;
      nxt_cols[0][0] = diag;
    end

    for (genvar j = 1; j < NC; j++) begin : g_col
      hh_update #(.M(M)) u_col (
        .v1(v1), .v2(v2), .inv_d1(inv_d1), .inv_d2(inv_d2), .c(in_cols[j]), .c_out(nxt_cols[j])
      );
    end

    hh_update #(.M(M)) u_y (
      .v1(v1), .v2(v2), .inv_d1(inv_d1), .inv_d2(inv_d2), .c(in_y), .c_out(nxt_y)
    );

    assign in_ready = 1'b1;

    // register bank
    always_ff @(posedge clk) begin
      if (!rst_n) out_valid <= 1'b0;
      else        out_valid <= in_valid;
      out_cols <= nxt_cols;
      out_y    <= nxt_y;
    end
  end else begin : g_folded
    localparam int U  = (NC + FOLD - 1) / FOLD;  // shared column units
    localparam int FW = $clog2(FOLD);

    fx_t  h_cols [NC][M];       // hold register
    fx_t  h_y    [M];
    logic busy;
    logic [FW-1:0] f;
    logic last, take;
    fx_t  u_in  [U][M];
    fx_t  u_out [U][M];

    hh_pivot #(.M(M)) u_pivot (
      .x1(h_cols[0]), .v1(v1), .v2(v2), .inv_d1(inv_d1), .inv_d2(inv_d2), .r_diag(diag)
    );

    // vector index f*U+u: 0..NC-2 are columns 1..NC-1, NC-1 is y
    always_comb begin
      for (int u = 0; u < U; u++) begin
        int idx;
        idx = int'(f) * U + u;
        for (int i = 0; i < M; i++) u_in[u][i] = '0;
        if (idx < NC - 1)       u_in[u] = h_cols[idx+1];
        else if (idx == NC - 1) u_in[u] = h_y;
      end
    end

    for (genvar u = 0; u < U; u++) begin : g_unit
      hh_update #(.M(M)) u_col (
        .v1(v1), .v2(v2), .inv_d1(inv_d1), .inv_d2(inv_d2), .c(u_in[u]), .c_out(u_out[u])
      );
    end

    assign last     = busy && (f == FW'(FOLD - 1));
    assign in_ready = !busy || last;
    assign take     = in_valid && in_ready;

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        busy      <= 1'b0;
        f         <= '0;
        out_valid <= 1'b0;
      end else begin
        out_valid <= last;
        if (take) begin
          busy <= 1'b1;
          f    <= '0;
        end else if (last) begin
          busy <= 1'b0;
          f    <= '0;
        end else if (busy) begin
          f <= f + 1'b1;
        end
      end
      if (take) begin
        h_cols <= in_cols;
        h_y    <= in_y;
      end
      if (busy) begin
        for (int u = 0; u < U; u++) begin
          if (int'(f) * U + u < NC - 1)       out_cols[int'(f) * U + u + 1] <= u_out[u];
          else if (int'(f) * U + u == NC - 1) out_y <= u_out[u];
        end
        if (last) begin
          for (int i = 0; i < M; i++) out_cols[0][i] <= '0;
          out_cols[0][0] <= diag;
        end
      end
    end
  end
endmodule
