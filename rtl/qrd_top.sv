// qrd_top: QR decomposition processor for 4x4 complex MIMO channels, one QRD per clock.
//
// The complex channel H (N x N) and the receive vector y enter as 13-bit samples. The design
// works on the real-valued decomposition of H (each entry a+ib as the block [a -b; b a]) and
// triangularises the 2N x 2N real matrix with Householder reflections. Because the two columns
// of each pair stay J-related throughout, only the N odd columns are carried, and each of the
// N systolic stages (hh_stage) removes one column pair with two reflections computed in
// parallel. The same reflections are applied to y, so the outputs are R and Q'y directly,
// which is what a tree-search detector needs (Q itself is never formed).
//
// Interface: in_valid qualifies h_re/h_im (row, column) and y_re/y_im. After N clock cycles
// out_valid rises with r (the 2N x 2N real upper-triangular R, row-major, zero below the
// diagonal) and qty (Q'y, 2N real entries). A new matrix may be accepted every cycle; rows of
// early stages are carried in delay_line register banks so that a whole result leaves in one
// cycle. Row 2i / 2i+1 of the real model is the real / imaginary part of complex row i. The
// diagonal of R holds -alpha, the negated signed column norm of the Householder step.
// rst_n is synchronous and active low; it clears the valid flags.
// FOLD (default 1, fully unfolded) selects the folded variant: each stage reuses
// ceil(columns/FOLD) column units over FOLD cycles, a matrix is accepted every FOLD cycles
// (in_ready; in_valid while in_ready is low is ignored) and the latency becomes N*(FOLD+1).
// With FOLD = 1, in_ready is always 1.
// The algorithm, the pairing of columns and the stage-per-pair systolic structure follow the
// design description; port format, word widths, latency per stage and reset are own choices.
module qrd_top #(
  parameter int N    = qrd_pkg::N,
  parameter int FOLD = qrd_pkg::FOLD
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  qrd_pkg::in_t  h_re [N][N],
  input  qrd_pkg::in_t  h_im [N][N],
  input  qrd_pkg::in_t  y_re [N],
  input  qrd_pkg::in_t  y_im [N],
  output logic          out_valid,
  output qrd_pkg::fx_t  r    [2*N][2*N],
  output qrd_pkg::fx_t  qty  [2*N]
);
  import qrd_pkg::*;

  localparam int LAT = (FOLD <= 1) ? 1 : FOLD + 1;  // cycles per stage

  // one packed row group per stage: 2 rows x (N-k) odd columns, then 2 entries of Q'y
  for (genvar k = 0; k < N; k++) begin : g_st
    localparam int NC = N - k;
    localparam int M  = 2 * NC;
    localparam int PW = (2 * NC + 2) * WD;

    fx_t  cols_in  [NC][M];
    fx_t  y_in     [M];
    logic valid_in;
    logic ready;
    fx_t  cols_out [NC][M];
    fx_t  y_out    [M];
    logic valid_out;
    logic [PW-1:0] rows_now, rows_late;

    if (k == 0) begin : g_src
      // real-valued decomposition of the input: odd column j = (Re h0j, Im h0j, Re h1j, ...)
      always_comb begin
        for (int j = 0; j < N; j++)
          for (int i = 0; i < N; i++) begin
            cols_in[j][2*i]   = fx_from_in(h_re[i][j]);
            cols_in[j][2*i+1] = fx_from_in(h_im[i][j]);
          end
        for (int i = 0; i < N; i++) begin
          y_in[2*i]   = fx_from_in(y_re[i]);
          y_in[2*i+1] = fx_from_in(y_im[i]);
        end
      end
      assign valid_in = in_valid;
    end else begin : g_chain
      // rows 2.. of the previous stage's columns 1.. and of its y
      always_comb begin
        for (int j = 0; j < NC; j++)
          for (int i = 0; i < M; i++)
            cols_in[j][i] = g_st[k-1].cols_out[j+1][i+2];
        for (int i = 0; i < M; i++) y_in[i] = g_st[k-1].y_out[i+2];
      end
      assign valid_in = g_st[k-1].valid_out;
      // a stage frees itself at the rate its predecessor delivers
      a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) valid_in |-> ready)
        else $error("stage %0d received data while busy", k);
    end

    hh_stage #(.NC(NC), .FOLD(FOLD)) u_stage (
      .clk(clk), .rst_n(rst_n), .in_valid(valid_in), .in_ready(ready), .in_cols(cols_in),
      .in_y(y_in),
      .out_valid(valid_out), .out_cols(cols_out), .out_y(y_out)
    );

    always_comb begin
      for (int j = 0; j < NC; j++) begin
        rows_now[(2*j)*WD +: WD]   = cols_out[j][0];
        rows_now[(2*j+1)*WD +: WD] = cols_out[j][1];
      end
      rows_now[(2*NC)*WD +: WD]   = y_out[0];
      rows_now[(2*NC+1)*WD +: WD] = y_out[1];
    end

    delay_line #(.WIDTH(PW), .DEPTH((N - 1 - k) * LAT)) u_align (
      .clk(clk), .d(rows_now), .q(rows_late)
    );
  end

  assign out_valid = g_st[N-1].valid_out;
  assign in_ready  = g_st[0].ready;

  // assemble R: odd columns from the stages, even columns by the pair rule
  // R[2k][2c+1] = -R[2k+1][2c], R[2k+1][2c+1] = R[2k][2c]
  for (genvar k = 0; k < N; k++) begin : g_out
    localparam int NC = N - k;
    always_comb begin
      for (int c = 0; c < 2 * N; c++) begin
        r[2*k][c]   = '0;
        r[2*k+1][c] = '0;
      end
      for (int j = 0; j < NC; j++) begin
        r[2*k][2*(k+j)]     =  fx_t'(g_st[k].rows_late[(2*j)*WD +: WD]);
        r[2*k+1][2*(k+j)]   =  fx_t'(g_st[k].rows_late[(2*j+1)*WD +: WD]);
        r[2*k][2*(k+j)+1]   = -fx_t'(g_st[k].rows_late[(2*j+1)*WD +: WD]);
        r[2*k+1][2*(k+j)+1] =  fx_t'(g_st[k].rows_late[(2*j)*WD +: WD]);
      end
      qty[2*k]   = fx_t'(g_st[k].rows_late[(2*NC)*WD +: WD]);
      qty[2*k+1] = fx_t'(g_st[k].rows_late[(2*NC+1)*WD +: WD]);
    end
  end
endmodule
