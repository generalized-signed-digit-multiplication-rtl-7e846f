// lc_systolic_2d: pipelined two-dimensional array for the two limited-carry
// algorithms (ALG = 0 estimate-transfer, ALG = 1 two-phase transfer) on the
// systolic, most-significant-digit-first schedule.
//
// The node graph is that of et_semisys_2d / tp_semisys_2d: 2N rows, a
// "circle" row and a "square" row for each step i = N-1..0, plus a final
// line-8 row. Row r is computed two cycles after row r-1 and, inside a row,
// position j one cycle after position j+1: node (r, j) runs in cycle
// c(r,j) = 2r + (2N-1-j). No row is active all at once, so x_i is passed
// from node to node instead of being broadcast. Each node passes two values
// down: a value that stays at its position (p or w for the estimate-transfer
// algorithm, w or v for the two-phase one) and a value for the next position
// up (estimate e or transfer t; transfer t or u). The registers on each arc
// match the time difference of its two ends: 1 for x along a row, 1 for the
// value to the next position up, 2 for the value straight down, 5 for the
// multiplicand digit, which goes from circle row to circle row.
//
// Node functions (radix 2**LOG2R, operand digits [-ALPHA, BETA]):
//   ALG 0 circle: z = w + t_in, p = z + x*y, e = (p >= T); square: the
//         remainder window chosen by the incoming estimate, t = (p - WL)/R.
//   ALG 1 circle: z = v + u_in, p = z + x*y, split p = R*t + w (WU1);
//         square: q = w + t_in, split q = R*u + v (WU2).
// The product is in the operand digit set; no correction is needed.
//
// Interface: word-parallel with input skew and output deskew registers;
// one multiplication per cycle; z (2N+GUARD positions) appears with
// out_valid 6N cycles after in_valid (the lower-left result node is reached
// in cycle 4N and the lower-right one 2N-1 cycles later).
//
// From the source: the schedule with two cycles between rows, the node
// functions and the 6N latency. The source gives no drawing of this array;
// the register placement follows from the schedule. This design's own
// choices: the guard positions, computed in the same cycle as position 2N-1,
// the word-parallel interface, the estimate threshold and windows and the
// split bounds (defaults for radix 4, digits [-3,3], as in the semisystolic
// arrays), and resetting only the valid pipeline.
module lc_systolic_2d
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
  localparam int NR   = 2 * N,                       // rows before the last
  localparam int XW   = sbits(-ALPHA, BETA),
  localparam int PL   = -ALPHA - ALPHA * BETA,
  localparam int PH   = BETA + imax(ALPHA * ALPHA, BETA * BETA),
  localparam int AW   = sbits(PL, PH),               // wide enough for p, w, q, v
  localparam int BW   = sbits(fdiv(PL - R + 1, R), fdiv(PH + R - 1, R)),  // t, u, e
  localparam int LAT  = 6 * N
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [N-1:0][XW-1:0]   x,
  input  logic [N-1:0][XW-1:0]   y,
  output logic                   out_valid,
  output logic [NP-1:0][XW-1:0]  z
);

  function automatic int c_of(input int r, input int j);
    return 2 * r + (2 * N - 1 - ((j < 2 * N - 1) ? j : 2 * N - 1));
  endfunction

  logic [NR-1:0][NP-1:0][AW-1:0] a_o;   // value kept at the position
  logic [NR-1:0][NP-1:0][BW-1:0] b_o;   // value for position j+1
  logic [NR-1:0][NP-1:0][XW-1:0] x_o, y_o;

  for (genvar r = 0; r < NR; r++) begin : g_row
    localparam int  I      = N - 1 - r / 2;
    localparam bit  SQUARE = (r % 2) == 1;
    for (genvar j = 0; j < NP; j++) begin : g_pos
      localparam bit CIRCLE = !SQUARE && (j >= I) && (j <= I + N - 1);
      logic signed [AW-1:0] ai, a_n;
      logic signed [BW-1:0] bi, b_n;
      logic signed [XW-1:0] xi, yi;

      if (r == 0) begin : g_top
        assign ai = '0;
        assign bi = '0;
      end else begin : g_mid
        gsd_delay #(.W(AW), .D(c_of(r, j) - c_of(r - 1, j) - 1)) u_da (
          .clk, .d(a_o[r-1][j]), .q(ai));
        if (j == 0) begin : g_lsd
          assign bi = '0;
        end else begin : g_b
          gsd_delay #(.W(BW), .D(c_of(r, j) - c_of(r - 1, j - 1) - 1)) u_db (
            .clk, .d(b_o[r-1][j-1]), .q(bi));
        end
      end

      if (CIRCLE) begin : g_circle
        if (j == I + N - 1) begin : g_xin
          gsd_delay #(.W(XW), .D(c_of(r, j))) u_dx (.clk, .d(x[I]), .q(xi));
        end else begin : g_xpass
          assign xi = x_o[r][j+1];
        end
        if (r == 0) begin : g_yin
          gsd_delay #(.W(XW), .D(c_of(0, j))) u_dy (.clk, .d(y[j-I]), .q(yi));
        end else begin : g_ypass
          gsd_delay #(.W(XW), .D(c_of(r, j) - c_of(r - 2, j + 1) - 1)) u_dy (
            .clk, .d(y_o[r-2][j+1]), .q(yi));
        end
      end else begin : g_nomul
        assign xi = '0;
        assign yi = '0;
      end

      always_comb begin
        integer p, t, wl;
        split_t s;
        a_n = '0;
        b_n = '0;
        if (!SQUARE) begin
          p = int'(ai) + int'(bi) + (CIRCLE ? int'(xi) * int'(yi) : 0);
          if (ALG == 0) begin
            a_n = AW'(p);
            b_n = BW'((p >= T) ? 1 : 0);
          end else begin
            s   = split_digit(p, LOG2R, WU1);
            a_n = AW'(s.w);
            b_n = BW'(s.t);
          end
        end else begin
          if (ALG == 0) begin
            p   = int'(ai);
            wl  = (bi != '0) ? WL2 : WL1;
            t   = fdiv(p - wl, R);
            a_n = AW'(p - R * t);
            b_n = BW'(t);
          end else begin
            s   = split_digit(int'(ai) + int'(bi), LOG2R, WU2);
            a_n = AW'(s.w);
            b_n = BW'(s.t);
          end
        end
      end

      always_ff @(posedge clk) begin
        a_o[r][j] <= a_n;
        b_o[r][j] <= b_n;
        x_o[r][j] <= xi;
        y_o[r][j] <= yi;
      end
    end
  end

  // Last row (line 8), then realignment of the result digits.
  for (genvar j = 0; j < NP; j++) begin : g_bot
    logic signed [AW-1:0] ai;
    logic signed [BW-1:0] bi;
    logic signed [XW-1:0] z_q;
    gsd_delay #(.W(AW), .D(c_of(NR, j) - c_of(NR - 1, j) - 1)) u_da (
      .clk, .d(a_o[NR-1][j]), .q(ai));
    if (j == 0) begin : g_lsd
      assign bi = '0;
    end else begin : g_b
      gsd_delay #(.W(BW), .D(c_of(NR, j) - c_of(NR - 1, j - 1) - 1)) u_db (
        .clk, .d(b_o[NR-1][j-1]), .q(bi));
    end
    always_ff @(posedge clk) z_q <= XW'(int'(ai) + int'(bi));
    gsd_delay #(.W(XW), .D(LAT - 1 - c_of(NR, j))) u_dz (.clk, .d(z_q), .q(z[j]));
  end

  logic [LAT-1:0] v_sr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_sr <= '0;
    else        v_sr <= {v_sr[LAT-2:0], in_valid};
  end
  assign out_valid = v_sr[LAT-1];

endmodule
