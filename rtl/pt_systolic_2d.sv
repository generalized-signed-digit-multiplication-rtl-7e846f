// pt_systolic_2d: pipelined two-dimensional array for parallel-transfer GSD
// multiplication on the systolic, most-significant-digit-first schedule.
//
// The node graph is that of pt_semisys_2d: one row per step, every node
// adds its remainder w, the weight-R transfer u from position j-1 and the
// weight-R^2 transfer t from position j-2, adds the product term where it
// exists, and splits the sum into t, u, w in parallel. The transfer to j+2
// forces three cycles between rows instead of two: node (k, j) runs in cycle
// c(k,j) = 3k + (2N-1-j), so that t, produced two positions below, still
// arrives at least one cycle before it is used. x_i passes from node to node
// (no broadcast). Registers per arc follow from the time differences: x 1,
// t 1, u 2, w 3, multiplicand digit 4.
//
// Interface: word-parallel with input skew and output deskew registers; one
// multiplication per cycle; z (2N+1 positions, digits in [ZL, ZH]) appears
// with out_valid 5N cycles after in_valid (lower-left result node in cycle
// 3N, lower-right one 2N-1 cycles later). gsd_correct converts the result
// to the operand digit set.
//
// From the source: the three-cycle row spacing and the 5N latency. The
// register placement follows from the schedule. This design's own choices:
// the split bounds and digit set (as in pt_semisys_2d), the guard position
// computed with position 2N-1, the word-parallel interface, and resetting
// only the valid pipeline.
module pt_systolic_2d
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
  localparam int R    = 1 << LOG2R,
  localparam int NP   = 2 * N + 1,
  localparam int XW   = sbits(-ALPHA, BETA),
  localparam int PL   = ZL - ALPHA * BETA,
  localparam int PH   = ZH + imax(ALPHA * ALPHA, BETA * BETA),
  localparam int TW   = sbits(fdiv(PL, R * R), fdiv(PH, R * R) + 1),
  localparam int UW   = sbits(UU - R + 1, UU + 1),
  localparam int WW   = sbits(WU - R + 1, WU),
  localparam int ZW   = sbits(ZL, ZH),
  localparam int LAT  = 5 * N
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [N-1:0][XW-1:0]   x,
  input  logic [N-1:0][XW-1:0]   y,
  output logic                   out_valid,
  output logic [NP-1:0][ZW-1:0]  z
);

  function automatic int c_of(input int k, input int j);
    return 3 * k + (2 * N - 1 - ((j < 2 * N - 1) ? j : 2 * N - 1));
  endfunction

  logic [N-1:0][NP-1:0][TW-1:0] t_o;
  logic [N-1:0][NP-1:0][UW-1:0] u_o;
  logic [N-1:0][NP-1:0][WW-1:0] w_o;
  logic [N-1:0][NP-1:0][XW-1:0] x_o, y_o;

  // Inputs of node (k, j), k = 0..N (row N is the final addition).
  for (genvar k = 0; k <= N; k++) begin : g_row
    localparam int I = N - 1 - k;
    for (genvar j = 0; j < NP; j++) begin : g_pos
      localparam bit CIRCLE = (k < N) && (j >= I) && (j <= I + N - 1);
      logic signed [WW-1:0] wi;
      logic signed [UW-1:0] ui;
      logic signed [TW-1:0] ti;
      logic signed [XW-1:0] xi, yi;
      integer zi;

      if (k == 0) begin : g_top
        assign wi = '0;
        assign ui = '0;
        assign ti = '0;
      end else begin : g_mid
        gsd_delay #(.W(WW), .D(c_of(k, j) - c_of(k - 1, j) - 1)) u_dw (
          .clk, .d(w_o[k-1][j]), .q(wi));
        if (j >= 1) begin : g_u
          gsd_delay #(.W(UW), .D(c_of(k, j) - c_of(k - 1, j - 1) - 1)) u_du (
            .clk, .d(u_o[k-1][j-1]), .q(ui));
        end else begin : g_nou
          assign ui = '0;
        end
        if (j >= 2) begin : g_t
          gsd_delay #(.W(TW), .D(c_of(k, j) - c_of(k - 1, j - 2) - 1)) u_dt (
            .clk, .d(t_o[k-1][j-2]), .q(ti));
        end else begin : g_not
          assign ti = '0;
        end
      end

      if (CIRCLE) begin : g_circle
        if (j == I + N - 1) begin : g_xin
          gsd_delay #(.W(XW), .D(c_of(k, j))) u_dx (.clk, .d(x[I]), .q(xi));
        end else begin : g_xpass
          assign xi = x_o[k][j+1];
        end
        if (k == 0) begin : g_yin
          gsd_delay #(.W(XW), .D(c_of(0, j))) u_dy (.clk, .d(y[j-I]), .q(yi));
        end else begin : g_ypass
          gsd_delay #(.W(XW), .D(c_of(k, j) - c_of(k - 1, j + 1) - 1)) u_dy (
            .clk, .d(y_o[k-1][j+1]), .q(yi));
        end
      end else begin : g_nomul
        assign xi = '0;
        assign yi = '0;
      end

      assign zi = int'(wi) + int'(ui) + int'(ti);

      if (k < N) begin : g_node
        split3_t s;
        always_comb s = split3_digit(zi + (CIRCLE ? int'(xi) * int'(yi) : 0), LOG2R, WU, UU);
        always_ff @(posedge clk) begin
          t_o[k][j] <= TW'(s.t);
          u_o[k][j] <= UW'(s.u);
          w_o[k][j] <= WW'(s.w);
          x_o[k][j] <= xi;
          y_o[k][j] <= yi;
        end
      end else begin : g_last
        logic signed [ZW-1:0] z_q;
        always_ff @(posedge clk) z_q <= ZW'(zi);
        gsd_delay #(.W(ZW), .D(LAT - 1 - c_of(N, j))) u_dz (.clk, .d(z_q), .q(z[j]));
      end
    end
  end

  logic [LAT-1:0] v_sr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_sr <= '0;
    else        v_sr <= {v_sr[LAT-2:0], in_valid};
  end
  assign out_valid = v_sr[LAT-1];

endmodule
