// tp_sparse_semisys_2d: sparse-transfer variant of the two-phase-transfer
// GSD multiplier, as a pipelined semisystolic two-dimensional array.
//
// The array is that of tp_semisys_2d (a circle row that adds product terms
// and splits p = R*t + w, then a square row that adds the transfer from
// below and splits q = w + t = R*u + v), except that each circle row adds
// M product terms (multiplier digits x_i for M consecutive i) instead of
// one. An N-digit multiplication then takes ceil(N/M) two-phase transfer
// stages instead of N. With the defaults (radix 4, digits [-3,3], M = 2,
// WU1 = 1, WU2 = 2) t lies in [-5,5], u in [-2,1], v in [-1,2], and the
// partial product z = v + u stays in [-3,3], so no correction is needed.
// The elaboration check rejects split bounds for which it would not.
//
// Interface: one multiplication per cycle; the product z (2N+GUARD
// positions, digits in [-ALPHA, BETA]) appears with out_valid
// 2*ceil(N/M)+1 cycles after in_valid.
//
// From the source: performing only ceil(n/m) transfer stages, several
// accumulation steps between them, with the two-phase-transfer method. The
// source gives no schedule, array or m for it; M, the split bounds, the
// guard position, the interface and the reset of only the valid pipeline
// are this design's choices.
module tp_sparse_semisys_2d
  import gsd_pkg::*;
#(
  parameter int N     = 4,
  parameter int LOG2R = 2,
  parameter int ALPHA = 3,
  parameter int BETA  = 3,
  parameter int M     = 2,
  parameter int WU1   = 1,
  parameter int WU2   = 2,
  parameter int GUARD = 1,
  localparam int R    = 1 << LOG2R,
  localparam int NS   = (N + M - 1) / M,              // transfer stages
  localparam int NP   = 2 * N + GUARD,
  localparam int XW   = sbits(-ALPHA, BETA),
  localparam int PL   = -ALPHA - M * ALPHA * BETA,
  localparam int PH   = BETA + M * imax(ALPHA * ALPHA, BETA * BETA),
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
    $error("tp_sparse_semisys_2d: digit set [%0d,%0d] is not closed under these splits",
           -ALPHA, BETA);
  end

  // Registers after the circle row (t, w) and the square row (u, v) of step k.
  logic [NS-1:0][NP-1:0][TW-1:0] t_r;
  logic [NS-1:0][NP-1:0][WW-1:0] w_r;
  logic [NS-1:0][NP-1:0][UW-1:0] u_r;
  logic [NS-1:0][NP-1:0][VW-1:0] v_r;
  logic [NS-1:0][N-1:0][XW-1:0] xa_r, ya_r, xb_r, yb_r;
  logic [2*NS-1:0]              val_r;

  // Stage k adds the terms of multiplier digits x_i, i = N-1-k*M down to
  // N-M-k*M (no lower than 0), most significant group first.
  for (genvar k = 0; k < NS; k++) begin : g_step
    localparam int I = N - 1 - k * M;
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
        for (int q = 0; q < M; q++) begin
          m = j - (I - q);
          if (I - q >= 0 && m >= 0 && m < N)
            p = p + int'($signed(xk[I-q])) * int'($signed(yk[m]));
        end
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
      z[j] <= XW'(int'($signed(v_r[NS-1][j])) + ((j > 0) ? int'($signed(u_r[NS-1][j-1])) : 0));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= val_r[2*NS-1];
  end

endmodule
