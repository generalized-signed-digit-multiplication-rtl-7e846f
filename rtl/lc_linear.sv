// lc_linear: one-dimensional (linear) array for the two limited-carry GSD
// multiplication algorithms (ALG = 0 estimate-transfer, ALG = 1 two-phase
// transfer), obtained by projecting the row-parallel schedule onto its
// digit positions.
//
// There is one cell per digit position of the product. Each step of the
// algorithm takes two cycles in every cell: a "circle" cycle that adds the
// product term x_i*y_(j-i) and a "square" cycle that forms the transfer.
// Each cell holds two values: one that stays at its position (p or w for
// estimate-transfer, w or v for two-phase) and one that its more
// significant neighbour reads in the next cycle (estimate e or transfer t;
// transfer t or u). The node functions are those of et_semisys_2d and
// tp_semisys_2d. The current multiplier digit is broadcast to every cell;
// the multiplicand digits sit in a shift register that moves one cell
// towards the least significant end after every square cycle. After the N
// steps (2N cycles) one more cycle adds the last values (line 8) and the
// product is registered. The product is in the operand digit set.
//
// Interface: start a multiplication with in_valid while in_ready is high;
// x and y are sampled in that cycle. The product z (2N+GUARD positions,
// digits in [-ALPHA, BETA]) appears with out_valid 2N+1 cycles after the
// start. The first circle cycle runs in the start cycle and the final
// addition of one multiplication overlaps the start of the next, so
// in_ready is high again 2N cycles after a start: one product every 2N
// cycles.
//
// From the source: the cell set and the 2N+1 cycle latency ("two-
// dimensional and one-dimensional array processors can be derived from the
// schedule"); the source gives no drawing. This design's own choices: the
// two-cycle step in one cell, the parallel load of the multiplicand, the
// valid/ready handshake, the guard positions, the estimate threshold,
// windows and split bounds (as in the 2-D arrays), and resetting only the
// control state.
module lc_linear
  import gsd_pkg::*;
#(
  parameter int ALG   = 0,
  parameter int N     = 4,
  parameter int LOG2R = 2,
  parameter int ALPHA = 3,
  parameter int BETA  = 3,
  parameter int T     = 0,
  parameter int WL1   = 0,
  parameter int WL2   = -3,
  parameter int WU1   = 1,
  parameter int WU2   = 1,
  parameter int GUARD = (ALG == 0) ? 2 : 1,
  localparam int R    = 1 << LOG2R,
  localparam int NP   = 2 * N + GUARD,
  localparam int XW   = sbits(-ALPHA, BETA),
  localparam int PL   = -ALPHA - ALPHA * BETA,
  localparam int PH   = BETA + imax(ALPHA * ALPHA, BETA * BETA),
  localparam int AW   = sbits(PL, PH),
  localparam int BW   = sbits(fdiv(PL - R + 1, R), fdiv(PH + R - 1, R)),
  localparam int SW   = $clog2(2 * N + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [N-1:0][XW-1:0]   x,
  input  logic [N-1:0][XW-1:0]   y,
  output logic                   out_valid,
  output logic [NP-1:0][XW-1:0]  z
);

  logic [NP-1:0][AW-1:0] a_q, a_n;      // value kept at the position
  logic [NP-1:0][BW-1:0] b_q, b_n;      // value for the next position up
  logic [NP-1:0][XW-1:0] y_q, y_cur;    // multiplicand digit at each cell
  logic [N-1:0][XW-1:0]  x_q;           // multiplier word being consumed
  logic [SW-1:0]         ph_q;          // cycles done so far (even: circle)
  logic                  busy_q;

  logic start, final_step;
  assign final_step = busy_q && (ph_q == SW'(2 * N));
  assign in_ready   = !busy_q || final_step;
  assign start      = in_valid && in_ready;

  logic [SW-1:0]        ph_cur;
  logic signed [XW-1:0] x_cur;
  logic                 square;

  always_comb begin
    // In the start cycle the cells work on the fresh operands with empty state.
    ph_cur = start ? '0 : ph_q;
    square = ph_cur[0];
    x_cur  = '0;
    for (int i = 0; i < N; i++)
      if (N - 1 - i == (int'(ph_cur) >> 1)) x_cur = start ? x[i] : x_q[i];
    for (int j = 0; j < NP; j++) begin
      if (start) y_cur[j] = (j >= N - 1 && j <= 2 * N - 2) ? y[j-N+1] : '0;
      else       y_cur[j] = y_q[j];
    end
  end

  for (genvar j = 0; j < NP; j++) begin : g_cell
    logic signed [AW-1:0] ai;
    logic signed [BW-1:0] bi;
    assign ai = start ? '0 : a_q[j];
    if (j == 0) begin : g_lsd
      assign bi = '0;
    end else begin : g_b
      assign bi = start ? '0 : b_q[j-1];
    end

    always_comb begin
      integer p, t, wl;
      split_t s;
      a_n[j] = '0;
      b_n[j] = '0;
      p      = 0;
      t      = 0;
      wl     = 0;
      s      = '0;
      if (!square) begin
        p = int'(ai) + int'(bi) + int'(x_cur) * int'($signed(y_cur[j]));
        if (ALG == 0) begin
          a_n[j] = AW'(p);
          b_n[j] = BW'((p >= T) ? 1 : 0);
        end else begin
          s      = split_digit(p, LOG2R, WU1);
          a_n[j] = AW'(s.w);
          b_n[j] = BW'(s.t);
        end
      end else begin
        if (ALG == 0) begin
          p      = int'(ai);
          wl     = (bi != '0) ? WL2 : WL1;
          t      = fdiv(p - wl, R);
          a_n[j] = AW'(p - R * t);
          b_n[j] = BW'(t);
        end else begin
          s      = split_digit(int'(ai) + int'(bi), LOG2R, WU2);
          a_n[j] = AW'(s.w);
          b_n[j] = BW'(s.t);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (start || busy_q) begin
      a_q <= a_n;
      b_q <= b_n;
      // After a square cycle the multiplicand moves one cell down.
      for (int j = 0; j < NP; j++)
        y_q[j] <= !square ? y_cur[j] : (j == NP - 1) ? '0 : y_cur[j+1];
    end
    if (start) x_q <= x;
    // Final addition (line 8) of the multiplication that is finishing.
    if (final_step)
      for (int j = 0; j < NP; j++)
        z[j] <= XW'(int'($signed(a_q[j])) + ((j > 0) ? int'($signed(b_q[j-1])) : 0));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q    <= 1'b0;
      ph_q      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= final_step;
      if (start) begin
        busy_q <= 1'b1;
        ph_q   <= SW'(1);
      end else if (final_step) begin
        busy_q <= 1'b0;
        ph_q   <= '0;
      end else if (busy_q) begin
        ph_q <= ph_q + 1'b1;
      end
    end
  end

endmodule
