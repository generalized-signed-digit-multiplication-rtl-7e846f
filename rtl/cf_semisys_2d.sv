// cf_semisys_2d: pipelined two-dimensional array for carry-free GSD
// multiplication on the semisystolic (digit-parallel) schedule.
//
// Row k (k = 0..N-1) executes step i = N-1-k of the carry-free algorithm for
// every digit position at once: multiplier digit x_i is broadcast along the
// row, each position j with i <= j <= i+N-1 adds x_i*y_(j-i) ("circle"
// nodes), the others only pass their sum on ("square" nodes), and every node
// produces a transfer t to position j+1 and a remainder w kept at j. A
// register stage sits on every arc between rows: remainders go straight
// down, transfers go down one position to the left (more significant), and
// the operand words follow the rows so that row k sees the operands issued
// k cycles earlier. A last row only adds the final remainders and
// transfers (line 8), and its result is registered.
//
// Interface: x and y are N-digit GSD operands, digit 0 least significant,
// digits in [-ALPHA, BETA]. One multiplication may be issued every cycle
// (in_valid); its product appears on z with out_valid exactly N+1 cycles
// later. z has 2N+1 digit positions in the partial-product digit set
// [WU-R+1-TNEG, WU+TPOS] (see cf_cell); gsd_correct brings it back to the
// operand digit set.
//
// From the source algorithm: the row structure, the arcs and the N+1 cycle
// latency with one result per cycle. This design's own choices: operands enter
// as whole words and are delayed inside the array (the x_i of row k is
// picked from the delayed word), and one guard position above the 2N
// product positions absorbs the transfer that leaves position 2N-1 (without
// it the 2N-digit result is only correct modulo R^(2N)). Reset clears only
// the valid pipeline.
module cf_semisys_2d
  import gsd_pkg::*;
#(
  parameter int N     = 4,
  parameter int LOG2R = 2,
  parameter int ALPHA = 3,
  parameter int BETA  = 3,
  parameter int WU    = 1,
  parameter int GUARD = 1,
  localparam int R    = 1 << LOG2R,
  localparam int NP   = 2 * N + GUARD,
  localparam int TNEG = cdiv(ALPHA * BETA, R - 1),
  localparam int TPOS = cdiv(imax(ALPHA * ALPHA, BETA * BETA), R - 1),
  localparam int WL   = WU - R + 1,
  localparam int XW   = sbits(-ALPHA, BETA),
  localparam int TW   = sbits(-TNEG, TPOS),
  localparam int WW   = sbits(WL, WU),
  localparam int ZW   = sbits(WL - TNEG, WU + TPOS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [N-1:0][XW-1:0]   x,
  input  logic [N-1:0][XW-1:0]   y,
  output logic                   out_valid,
  output logic [NP-1:0][ZW-1:0]  z
);

  // Registers after row k.
  logic [N-1:0][NP-1:0][WW-1:0] w_r;
  logic [N-1:0][NP-1:0][TW-1:0] t_r;
  logic [N-2:0][N-1:0][XW-1:0]  x_r, y_r;
  logic [N-1:0]                 v_r;

  for (genvar k = 0; k < N; k++) begin : g_row
    localparam int I = N - 1 - k;
    logic [N-1:0][XW-1:0] xk, yk;
    logic [NP-1:0][WW-1:0] w_n;
    logic [NP-1:0][TW-1:0] t_n;
    logic                  vk;

    if (k == 0) begin : g_in
      assign xk = x;
      assign yk = y;
      assign vk = in_valid;
    end else begin : g_pipe
      assign xk = x_r[k-1];
      assign yk = y_r[k-1];
      assign vk = v_r[k-1];
    end

    for (genvar j = 0; j < NP; j++) begin : g_pos
      localparam bit CIRCLE = (j >= I) && (j <= I + N - 1);
      logic signed [WW-1:0] wi;
      logic signed [TW-1:0] ti;
      logic signed [XW-1:0] yd;
      logic signed [ZW-1:0] z_unused;

      if (k == 0) begin : g_top
        assign wi = '0;
        assign ti = '0;
      end else begin : g_mid
        assign wi = w_r[k-1][j];
        if (j == 0) begin : g_lsd
          assign ti = '0;
        end else begin : g_t
          assign ti = t_r[k-1][j-1];
        end
      end

      if (CIRCLE) begin : g_circle
        assign yd = yk[j-I];
      end else begin : g_square
        assign yd = '0;
      end

      cf_cell #(.LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .WU(WU)) u_cell (
        .w_in  (wi),
        .t_in  (ti),
        .x     (xk[I]),
        .y     (yd),
        .mul_en(CIRCLE),
        .z     (z_unused),
        .t_out (t_n[j]),
        .w_out (w_n[j])
      );
    end

    logic [NP-1:0][WW-1:0] w_q;
    logic [NP-1:0][TW-1:0] t_q;
    always_ff @(posedge clk) begin
      w_q <= w_n;
      t_q <= t_n;
    end
    assign w_r[k] = w_q;
    assign t_r[k] = t_q;

    // The operand words only travel as far as the last multiplying row.
    if (k < N - 1) begin : g_opnd
      logic [N-1:0][XW-1:0] x_q, y_q;
      always_ff @(posedge clk) begin
        x_q <= xk;
        y_q <= yk;
      end
      assign x_r[k] = x_q;
      assign y_r[k] = y_q;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v_r[k] <= 1'b0;
      else        v_r[k] <= vk;
    end
  end

  // Bottom row: line 8 only.
  logic [NP-1:0][ZW-1:0] z_n;
  for (genvar j = 0; j < NP; j++) begin : g_bot
    logic signed [TW-1:0] ti;
    logic signed [TW-1:0] t_unused;
    logic signed [WW-1:0] w_unused;
    if (j == 0) begin : g_lsd
      assign ti = '0;
    end else begin : g_t
      assign ti = t_r[N-1][j-1];
    end
    cf_cell #(.LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .WU(WU)) u_cell (
      .w_in  (w_r[N-1][j]),
      .t_in  (ti),
      .x     ('0),
      .y     ('0),
      .mul_en(1'b0),
      .z     (z_n[j]),
      .t_out (t_unused),
      .w_out (w_unused)
    );
  end

  always_ff @(posedge clk) z <= z_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v_r[N-1];
  end

endmodule
