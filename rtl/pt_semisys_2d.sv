// pt_semisys_2d: pipelined two-dimensional array for parallel-transfer GSD
// multiplication on the semisystolic schedule.
//
// One row per step of the algorithm. Every node adds its remainder w_j, the
// transfer u_j of weight R from position j-1 and the transfer t_j of weight
// R^2 from position j-2 (line 8), adds x_i*y_(j-i) where the product term
// exists (line 4), and splits the sum in one go into
// p = R^2*t_(j+2) + R*u_(j+1) + w_j (line 7): the upper, middle and lower
// bit fields of p, with the middle and lower fields compared with their
// bounds UU and WU at the same time and all three adjusted in parallel (the
// middle digit absorbs the lower field's adjustment). Transfers therefore
// travel one and two positions towards the most significant end between
// rows, each through one register stage. A last row does the final line 8.
//
// The partial product lives in [ZL, ZH], which must hold at least 2R+1
// digits; with radix 4, digits [-3,3], WU = UU = 1 it is [-5,4], and
// gsd_correct converts it back to the operand digit set.
//
// Interface: one multiplication per cycle; product z (2N+GUARD positions,
// digits in [ZL, ZH]) with out_valid N+1 cycles after in_valid.
//
// From the source algorithm: the three-field split, the arcs to positions
// j+1 and j+2 and the N+1 cycle latency. This design's own choices: the
// bounds WU and UU and the resulting digit set (found by exhaustive range
// analysis of the split), the operand words carried along the rows, the
// guard position, and resetting only the valid pipeline.
module pt_semisys_2d
  import gsd_pkg::*;
#(
  parameter int N     = 4,
  parameter int LOG2R = 2,
  parameter int ALPHA = 3,
  parameter int BETA  = 3,
  parameter int WU    = 1,
  parameter int UU    = 1,
  parameter int ZL    = -5,
  parameter int ZH    = 4,
  parameter int GUARD = 1,
  localparam int R    = 1 << LOG2R,
  localparam int NP   = 2 * N + GUARD,
  localparam int XW   = sbits(-ALPHA, BETA),
  localparam int PL   = ZL - ALPHA * BETA,
  localparam int PH   = ZH + imax(ALPHA * ALPHA, BETA * BETA),
  localparam int TW   = sbits(fdiv(PL, R * R), fdiv(PH, R * R) + 1),
  localparam int UW   = sbits(UU - R + 1, UU + 1),
  localparam int WW   = sbits(WU - R + 1, WU),
  localparam int ZW   = sbits(ZL, ZH)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [N-1:0][XW-1:0]   x,
  input  logic [N-1:0][XW-1:0]   y,
  output logic                   out_valid,
  output logic [NP-1:0][ZW-1:0]  z
);

  logic [N-1:0][NP-1:0][TW-1:0] t_r;
  logic [N-1:0][NP-1:0][UW-1:0] u_r;
  logic [N-1:0][NP-1:0][WW-1:0] w_r;
  logic [N-1:0][N-1:0][XW-1:0]  x_r, y_r;
  logic [N-1:0]                 val_r;

  // Line 8: remainder plus the transfers from one and two positions below.
  function automatic int line8(input logic [NP-1:0][WW-1:0] w,
                               input logic [NP-1:0][UW-1:0] u,
                               input logic [NP-1:0][TW-1:0] t, input int j);
    integer zi;
    zi = int'($signed(w[j]));
    if (j > 0) zi = zi + int'($signed(u[j-1]));
    if (j > 1) zi = zi + int'($signed(t[j-2]));
    return zi;
  endfunction

  for (genvar k = 0; k < N; k++) begin : g_row
    localparam int I = N - 1 - k;
    logic [N-1:0][XW-1:0]  xk, yk;
    logic                  vk;
    logic [NP-1:0][WW-1:0] w_in;
    logic [NP-1:0][UW-1:0] u_in;
    logic [NP-1:0][TW-1:0] t_in;
    logic [NP-1:0][TW-1:0] t_n;
    logic [NP-1:0][UW-1:0] u_n;
    logic [NP-1:0][WW-1:0] w_n;

    if (k == 0) begin : g_in
      assign xk   = x;
      assign yk   = y;
      assign vk   = in_valid;
      assign w_in = '0;
      assign u_in = '0;
      assign t_in = '0;
    end else begin : g_pipe
      assign xk   = x_r[k-1];
      assign yk   = y_r[k-1];
      assign vk   = val_r[k-1];
      assign w_in = w_r[k-1];
      assign u_in = u_r[k-1];
      assign t_in = t_r[k-1];
    end

    always_comb begin
      for (int j = 0; j < NP; j++) begin
        integer p, m;
        split3_t s;
        p = line8(w_in, u_in, t_in, j);
        m = j - I;
        if (m >= 0 && m < N) p = p + int'($signed(xk[I])) * int'($signed(yk[m]));
        s = split3_digit(p, LOG2R, WU, UU);
        t_n[j] = TW'(s.t);
        u_n[j] = UW'(s.u);
        w_n[j] = WW'(s.w);
      end
    end

    always_ff @(posedge clk) begin
      t_r[k] <= t_n;
      u_r[k] <= u_n;
      w_r[k] <= w_n;
      x_r[k] <= xk;
      y_r[k] <= yk;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) val_r[k] <= 1'b0;
      else        val_r[k] <= vk;
    end
  end

  always_ff @(posedge clk) begin
    for (int j = 0; j < NP; j++) z[j] <= ZW'(line8(w_r[N-1], u_r[N-1], t_r[N-1], j));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= val_r[N-1];
  end

endmodule
