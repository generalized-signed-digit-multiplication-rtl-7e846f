// et_semisys_2d: pipelined two-dimensional array for estimate-transfer
// (limited-carry) GSD multiplication on the semisystolic schedule, with a
// binary estimate (E = 2).
//
// Each step of the algorithm takes two rows. The "circle" row adds the
// previous step's remainder and transfer (z = w + t, line 8), adds the
// product term x_i*y_(j-i) where it exists (line 4), and compares the
// position sum p with the threshold T to produce the estimate e_(j+1) for
// the transfer it will send (line 7): e = 2 when p >= T, else e = 1. The
// "square" row (line 7a) then knows the estimate e_j that arrives from the
// position below, i.e. which subrange the incoming transfer t_j will lie in,
// and picks its remainder window accordingly: w_j in [WL1, WL1+R-1] when
// e_j = 1 and in [WL2, WL2+R-1] when e_j = 2, with t_(j+1) = (p - w_j)/R.
// That keeps z_j = w_j + t_j inside the operand digit set, so the product
// needs no correction. Registers follow every row; a last row adds the final
// w and t.
//
// Defaults (radix 4, digits [-3,3], the maximally redundant set for which a
// binary estimate suffices): subranges t in [-3,0] for e = 1 and [0,3] for
// e = 2, hence WL1 = 0, WL2 = -3, and threshold T = 0, a multiple of R.
// Position 0 receives no transfer and uses the e = 1 window.
//
// Interface: one multiplication per cycle; product z (2N+GUARD positions,
// digits in [-ALPHA, BETA]) with out_valid 2N+1 cycles after in_valid.
//
// From the source algorithm: the estimate/transfer split over two rows, the
// threshold comparison and the 2N+1 cycle latency. The source does not give
// the thresholds and subranges; the defaults above were derived for this
// design. GUARD = 2 because a transfer of +1 can move up one position per
// step at the top of the word; that value, the operand words carried along
// the rows and resetting only the valid pipeline are also this design's.
module et_semisys_2d
  import gsd_pkg::*;
#(
  parameter int N     = 4,
  parameter int LOG2R = 2,
  parameter int ALPHA = 3,
  parameter int BETA  = 3,
  parameter int T     = 0,
  parameter int WL1   = 0,
  parameter int WL2   = -3,
  parameter int GUARD = 2,
  localparam int R    = 1 << LOG2R,
  localparam int NP   = 2 * N + GUARD,
  localparam int XW   = sbits(-ALPHA, BETA),
  localparam int PL   = -ALPHA - ALPHA * BETA,
  localparam int PH   = BETA + imax(ALPHA * ALPHA, BETA * BETA),
  localparam int PW   = sbits(PL, PH),
  localparam int TL   = fdiv(PL - imax(WL1, WL2), R),
  localparam int TH   = fdiv(PH - ((WL1 < WL2) ? WL1 : WL2), R),
  localparam int TW   = sbits(TL, TH),
  localparam int WW   = sbits((WL1 < WL2) ? WL1 : WL2, imax(WL1, WL2) + R - 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [N-1:0][XW-1:0]   x,
  input  logic [N-1:0][XW-1:0]   y,
  output logic                   out_valid,
  output logic [NP-1:0][XW-1:0]  z
);

  // Registers after the circle row (p, e) and the square row (t, w) of step k.
  logic [N-1:0][NP-1:0][PW-1:0] p_r;
  logic [N-1:0][NP-1:0]         e_r;      // 1: estimate 2 (p >= T), 0: estimate 1
  logic [N-1:0][NP-1:0][TW-1:0] t_r;
  logic [N-1:0][NP-1:0][WW-1:0] w_r;
  logic [N-1:0][N-1:0][XW-1:0]  xa_r, ya_r, xb_r, yb_r;
  logic [2*N-1:0]               val_r;

  for (genvar k = 0; k < N; k++) begin : g_step
    localparam int I = N - 1 - k;
    logic [N-1:0][XW-1:0]  xk, yk;
    logic                  vk;
    logic [NP-1:0][WW-1:0] w_in;
    logic [NP-1:0][TW-1:0] t_in;
    logic [NP-1:0][PW-1:0] p_n;
    logic [NP-1:0]         e_n;
    logic [NP-1:0][TW-1:0] t_n;
    logic [NP-1:0][WW-1:0] w_n;

    if (k == 0) begin : g_in
      assign xk   = x;
      assign yk   = y;
      assign vk   = in_valid;
      assign w_in = '0;
      assign t_in = '0;
    end else begin : g_pipe
      assign xk   = xb_r[k-1];
      assign yk   = yb_r[k-1];
      assign vk   = val_r[2*k-1];
      assign w_in = w_r[k-1];
      assign t_in = t_r[k-1];
    end

    // Circle row: lines 8, 4/5 and 7 (estimate).
    always_comb begin
      for (int j = 0; j < NP; j++) begin
        integer p, m;
        p = int'($signed(w_in[j])) + ((j > 0) ? int'($signed(t_in[j-1])) : 0);
        m = j - I;
        if (m >= 0 && m < N) p = p + int'($signed(xk[I])) * int'($signed(yk[m]));
        p_n[j] = PW'(p);
        e_n[j] = (p >= T);
      end
    end

    // Square row: line 7a, transfer chosen inside the announced subrange.
    always_comb begin
      for (int j = 0; j < NP; j++) begin
        integer p, wl, t;
        p  = int'($signed(p_r[k][j]));
        wl = (j > 0 && e_r[k][j-1]) ? WL2 : WL1;
        t  = fdiv(p - wl, R);
        t_n[j] = TW'(t);
        w_n[j] = WW'(p - R * t);
      end
    end

    logic [NP-1:0][PW-1:0] p_q;
    logic [NP-1:0]         e_q;
    logic [NP-1:0][TW-1:0] t_q;
    logic [NP-1:0][WW-1:0] w_q;
    logic [N-1:0][XW-1:0]  xa_q, ya_q, xb_q, yb_q;
    always_ff @(posedge clk) begin
      p_q  <= p_n;
      e_q  <= e_n;
      t_q  <= t_n;
      w_q  <= w_n;
      xa_q <= xk;
      ya_q <= yk;
      xb_q <= xa_q;
      yb_q <= ya_q;
    end
    assign p_r[k]  = p_q;
    assign e_r[k]  = e_q;
    assign t_r[k]  = t_q;
    assign w_r[k]  = w_q;
    assign xa_r[k] = xa_q;
    assign ya_r[k] = ya_q;
    assign xb_r[k] = xb_q;
    assign yb_r[k] = yb_q;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        val_r[2*k]   <= 1'b0;
        val_r[2*k+1] <= 1'b0;
      end else begin
        val_r[2*k]   <= vk;
        val_r[2*k+1] <= val_r[2*k];
      end
    end
  end

  // Bottom row: line 8 only.
  always_ff @(posedge clk) begin
    for (int j = 0; j < NP; j++)
      z[j] <= XW'(int'($signed(w_r[N-1][j])) + ((j > 0) ? int'($signed(t_r[N-1][j-1])) : 0));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= val_r[2*N-1];
  end

endmodule
