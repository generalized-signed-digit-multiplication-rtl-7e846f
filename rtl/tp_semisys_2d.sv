// tp_semisys_2d: pipelined two-dimensional array for two-phase-transfer GSD
// multiplication on the semisystolic schedule.
//
// Each step of the algorithm takes two rows of the array. The first
// ("circle") row of step i adds the two-phase result of the previous step
// (z = v + u, line 8), adds x_i*y_(j-i) where the product term exists
// (line 4), and splits the sum p = R*t + w (line 7). The second ("square")
// row adds the transfer from the position below (q = w + t, line 7a) and
// splits again, q = R*u + v (line 7b). Because two transfers are absorbed
// per step, the partial product stays in the operand digit set [-ALPHA,
// BETA] and no correction is needed afterwards. Every row is followed by a
// register stage, and a last row does the final z = v + u.
//
// Interface: one multiplication per cycle (in_valid with the N-digit
// operands x, y); the product z, 2N+GUARD positions with digits in
// [-ALPHA, BETA], appears with out_valid 2N+1 cycles later.
//
// From the source algorithm: the two transfer phases, the row pairing and
// the 2N+1 cycle latency. This design's own choices: the remainder bounds
// WU1 and WU2 of the two splits (defaults give t in [-3,3], u in [-1,1]
// and z in [-3,2] for radix 4, digits [-3,3]), the operand words carried
// along the rows, the guard position and resetting only the valid pipeline.
module tp_semisys_2d
  import gsd_pkg::*;
#(
  parameter int N     = 4,
  parameter int LOG2R = 2,
  parameter int ALPHA = 3,
  parameter int BETA  = 3,
  parameter int WU1   = 1,
  parameter int WU2   = 1,
  parameter int GUARD = 1,
  localparam int R    = 1 << LOG2R,
  localparam int NP   = 2 * N + GUARD,
  localparam int XW   = sbits(-ALPHA, BETA),
  localparam int PL   = -ALPHA - ALPHA * BETA,
  localparam int PH   = BETA + imax(ALPHA * ALPHA, BETA * BETA),
  localparam int W1L  = WU1 - R + 1,
  localparam int TL   = fdiv(PL - W1L, R),
  localparam int TH   = fdiv(PH - W1L, R),
  localparam int W2L  = WU2 - R + 1,
  localparam int UL   = fdiv(W1L + TL - W2L, R),
  localparam int UH   = fdiv(WU1 + TH - W2L, R),
  localparam int TW   = sbits(TL, TH),
  localparam int WW   = sbits(W1L, WU1),
  localparam int UW   = sbits(UL, UH),
  localparam int VW   = sbits(W2L, WU2)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [N-1:0][XW-1:0]   x,
  input  logic [N-1:0][XW-1:0]   y,
  output logic                   out_valid,
  output logic [NP-1:0][XW-1:0]  z
);

  if (W2L + UL < -ALPHA || WU2 + UH > BETA) begin : g_check
    $error("tp_semisys_2d: digit set [%0d,%0d] is not closed under these splits",
           -ALPHA, BETA);
  end

  // Registers after the circle row (t, w) and the square row (u, v) of step k.
  logic [N-1:0][NP-1:0][TW-1:0] t_r;
  logic [N-1:0][NP-1:0][WW-1:0] w_r;
  logic [N-1:0][NP-1:0][UW-1:0] u_r;
  logic [N-1:0][NP-1:0][VW-1:0] v_r;
  logic [N-1:0][N-1:0][XW-1:0]  xa_r, ya_r, xb_r, yb_r;
  logic [2*N-1:0]               val_r;

  for (genvar k = 0; k < N; k++) begin : g_step
    localparam int I = N - 1 - k;
    logic [N-1:0][XW-1:0]  xk, yk;
    logic                  vk;
    logic [NP-1:0][TW-1:0] t_n;
    logic [NP-1:0][WW-1:0] w_n;
    logic [NP-1:0][UW-1:0] u_n;
    logic [NP-1:0][VW-1:0] v_n;

    logic [NP-1:0][VW-1:0] v_in;
    logic [NP-1:0][UW-1:0] u_in;

    if (k == 0) begin : g_in
      assign xk   = x;
      assign yk   = y;
      assign vk   = in_valid;
      assign v_in = '0;
      assign u_in = '0;
    end else begin : g_pipe
      assign xk   = xb_r[k-1];
      assign yk   = yb_r[k-1];
      assign vk   = val_r[2*k-1];
      assign v_in = v_r[k-1];
      assign u_in = u_r[k-1];
    end

    // Circle row: lines 8, 4/5 and 7.
    always_comb begin
      for (int j = 0; j < NP; j++) begin
        integer zi, p, m;
        split_t s;
        zi = int'($signed(v_in[j])) + ((j > 0) ? int'($signed(u_in[j-1])) : 0);
        p = zi;
        m = j - I;
        if (m >= 0 && m < N) p = p + int'($signed(xk[I])) * int'($signed(yk[m]));
        s = split_digit(p, LOG2R, WU1);
        t_n[j] = TW'(s.t);
        w_n[j] = WW'(s.w);
      end
    end

    // Square row: lines 7a and 7b.
    always_comb begin
      for (int j = 0; j < NP; j++) begin
        integer q;
        split_t s;
        q = int'($signed(w_r[k][j])) + ((j > 0) ? int'($signed(t_r[k][j-1])) : 0);
        s = split_digit(q, LOG2R, WU2);
        u_n[j] = UW'(s.t);
        v_n[j] = VW'(s.w);
      end
    end

    always_ff @(posedge clk) begin
      t_r[k]  <= t_n;
      w_r[k]  <= w_n;
      u_r[k]  <= u_n;
      v_r[k]  <= v_n;
      xa_r[k] <= xk;
      ya_r[k] <= yk;
      xb_r[k] <= xa_r[k];
      yb_r[k] <= ya_r[k];
    end

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
      z[j] <= XW'(int'($signed(v_r[N-1][j])) + ((j > 0) ? int'($signed(u_r[N-1][j-1])) : 0));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= val_r[2*N-1];
  end

endmodule
