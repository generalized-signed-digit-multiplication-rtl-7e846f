// pt_sparse_semisys_2d: sparse-transfer variant of the parallel-transfer
// GSD multiplier, as a pipelined semisystolic two-dimensional array.
//
// The parallel-transfer array (pt_semisys_2d) has one row per multiplier
// digit: every row adds one product term x_i*y_(j-i) to each position and
// then splits the sum into a remainder w and transfers u (weight R, one
// position up) and t (weight R^2, two positions up). Here each row adds M
// product terms (multiplier digits x_i for M consecutive i) before it
// splits, so an N-digit multiplication takes ceil(N/M) transfer rows
// instead of N. The partial-product digits then need a larger set
// [ZL, ZH]; it is closed for the defaults (radix 4, operand digits [-3,3],
// M = 2, WU = UU = 1: [-5,4], the same set as in
// pt_semisys_2d) and still converts to [-3,3] in one
// gsd_correct step. [ZL, ZH] must be closed under one row (sum of a
// partial-product digit, M product terms, then the split and line 8); it
// is a parameter, not derived, so a new number system needs it recomputed.
// The split bounds must also leave small sums in place: with WU = 0 a sum
// of 1 becomes -3 plus a transfer of 1, which then climbs without end and
// is lost off the top of the word.
//
// Interface: word-parallel, one multiplication per cycle; z (2N+GUARD
// positions, digits in [ZL, ZH]) appears with out_valid ceil(N/M)+1 cycles
// after in_valid.
//
// From the source: performing only ceil(n/m) transfer steps, several
// accumulation steps between them, with the parallel-transfer method. The
// source gives no schedule, array, m or digit set for the radix used here;
// M, the split bounds, [ZL, ZH], the guard position, the interface and the
// reset of only the valid pipeline are this design's choices.
module pt_sparse_semisys_2d
  import gsd_pkg::*;
#(
  parameter int N     = 4,
  parameter int LOG2R = 2,
  parameter int ALPHA = 3,
  parameter int BETA  = 3,
  parameter int M     = 2,
  parameter int WU    = 1,
  parameter int UU    = 1,
  parameter int ZL    = -5,
  parameter int ZH    = 4,
  parameter int GUARD = 1,
  localparam int R    = 1 << LOG2R,
  localparam int NS   = (N + M - 1) / M,              // transfer rows
  localparam int NP   = 2 * N + GUARD,
  localparam int XW   = sbits(-ALPHA, BETA),
  localparam int PL   = ZL - M * ALPHA * BETA,
  localparam int PH   = ZH + M * imax(ALPHA * ALPHA, BETA * BETA),
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

  logic [NS-1:0][NP-1:0][TW-1:0] t_r;
  logic [NS-1:0][NP-1:0][UW-1:0] u_r;
  logic [NS-1:0][NP-1:0][WW-1:0] w_r;
  logic [NS-1:0][N-1:0][XW-1:0]  x_r, y_r;
  logic [NS-1:0]                 val_r;

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

  // Row k adds the terms of multiplier digits x_i, i = N-1-k*M down to
  // N-M-k*M (no lower than 0), most significant group first.
  for (genvar k = 0; k < NS; k++) begin : g_row
    localparam int I = N - 1 - k * M;
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
        for (int q = 0; q < M; q++) begin
          m = j - (I - q);
          if (I - q >= 0 && m >= 0 && m < N)
            p = p + int'($signed(xk[I-q])) * int'($signed(yk[m]));
        end
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
    for (int j = 0; j < NP; j++) z[j] <= ZW'(line8(w_r[NS-1], u_r[NS-1], t_r[NS-1], j));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= val_r[NS-1];
  end

endmodule
