// cf_systolic_2d: pipelined two-dimensional array for carry-free GSD
// multiplication on the systolic (most-significant-digit-first) schedule.
//
// The node graph is that of the semisystolic array (one row per step i of
// the algorithm, one node per digit position j, plus a final line-8 row),
// but node (k, j) is computed in cycle c(k,j) = 2k + (2N-1-j): rows are two
// cycles apart and, within a row, the more significant positions go first,
// one position per cycle. Nodes of a row are thus never active in the same
// cycle, so the multiplier digit x_i is passed from node to node through a
// register instead of being broadcast. Each arc gets exactly the registers
// its time difference asks for: x to the next less significant node 1,
// transfer t to the next row one position up 1, remainder w straight down 2,
// multiplicand digit y diagonally down and one position less significant 3.
// The lower-left (most significant) result node is reached in cycle 2N and
// the lower-right one 2N-1 cycles later, so the product is complete after 4N
// cycles.
//
// Interface: word-parallel, one multiplication per cycle. The array delays
// each operand digit to the cycle its first node needs it and realigns the
// result digits, so z (2N+1 positions, partial-product digit set as in
// cf_cell) appears with out_valid exactly 4N cycles after in_valid.
//
// From the source: the schedule (two cycles per row, one per position), the
// local-only communication and the 4N cycle latency. The source does not
// draw this array; its register placement follows from the schedule. This
// design's own choices: the guard position 2N is computed in the same cycle
// as position 2N-1 (it carries no product term), the input skew and output
// deskew registers that give a word-parallel interface, and resetting only
// the valid pipeline.
module cf_systolic_2d
  import gsd_pkg::*;
#(
  parameter int N     = 4,
  parameter int LOG2R = 2,
  parameter int ALPHA = 3,
  parameter int BETA  = 3,
  parameter int WU    = 1,
  localparam int R    = 1 << LOG2R,
  localparam int NP   = 2 * N + 1,
  localparam int TNEG = cdiv(ALPHA * BETA, R - 1),
  localparam int TPOS = cdiv(imax(ALPHA * ALPHA, BETA * BETA), R - 1),
  localparam int WL   = WU - R + 1,
  localparam int XW   = sbits(-ALPHA, BETA),
  localparam int TW   = sbits(-TNEG, TPOS),
  localparam int WW   = sbits(WL, WU),
  localparam int ZW   = sbits(WL - TNEG, WU + TPOS),
  localparam int LAT  = 4 * N
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [N-1:0][XW-1:0]   x,
  input  logic [N-1:0][XW-1:0]   y,
  output logic                   out_valid,
  output logic [NP-1:0][ZW-1:0]  z
);

  // Cycle in which node (k, j) is computed.
  function automatic int c_of(input int k, input int j);
    return 2 * k + (2 * N - 1 - ((j < 2 * N - 1) ? j : 2 * N - 1));
  endfunction

  // Registered node outputs.
  logic [N-1:0][NP-1:0][WW-1:0] w_o;
  logic [N-1:0][NP-1:0][TW-1:0] t_o;
  logic [N-1:0][NP-1:0][XW-1:0] x_o, y_o;

  for (genvar k = 0; k < N; k++) begin : g_row
    localparam int I = N - 1 - k;
    for (genvar j = 0; j < NP; j++) begin : g_pos
      localparam bit CIRCLE = (j >= I) && (j <= I + N - 1);
      logic signed [WW-1:0] wi;
      logic signed [TW-1:0] ti;
      logic signed [XW-1:0] xi, yi;
      logic signed [ZW-1:0] z_unused;
      logic signed [TW-1:0] t_n;
      logic signed [WW-1:0] w_n;

      // Remainder from the node above, transfer from the node above-right.
      if (k == 0) begin : g_top
        assign wi = '0;
        assign ti = '0;
      end else begin : g_mid
        gsd_delay #(.W(WW), .D(c_of(k, j) - c_of(k - 1, j) - 1)) u_dw (
          .clk, .d(w_o[k-1][j]), .q(wi));
        if (j == 0) begin : g_lsd
          assign ti = '0;
        end else begin : g_t
          gsd_delay #(.W(TW), .D(c_of(k, j) - c_of(k - 1, j - 1) - 1)) u_dt (
            .clk, .d(t_o[k-1][j-1]), .q(ti));
        end
      end

      if (CIRCLE) begin : g_circle
        // x_i enters the row at its most significant circle node.
        if (j == I + N - 1) begin : g_xin
          gsd_delay #(.W(XW), .D(c_of(k, j))) u_dx (.clk, .d(x[I]), .q(xi));
        end else begin : g_xpass
          assign xi = x_o[k][j+1];
        end
        // y_(j-i) comes from the input (top row) or the node above-left.
        if (k == 0) begin : g_yin
          gsd_delay #(.W(XW), .D(c_of(0, j))) u_dy (.clk, .d(y[j-I]), .q(yi));
        end else begin : g_ypass
          gsd_delay #(.W(XW), .D(c_of(k, j) - c_of(k - 1, j + 1) - 1)) u_dy (
            .clk, .d(y_o[k-1][j+1]), .q(yi));
        end
      end else begin : g_square
        assign xi = '0;
        assign yi = '0;
      end

      cf_cell #(.LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .WU(WU)) u_cell (
        .w_in(wi), .t_in(ti), .x(xi), .y(yi), .mul_en(CIRCLE),
        .z(z_unused), .t_out(t_n), .w_out(w_n)
      );

      logic [WW-1:0] w_q;
      logic [TW-1:0] t_q;
      logic [XW-1:0] x_q, y_q;
      always_ff @(posedge clk) begin
        w_q <= w_n;
        t_q <= t_n;
        x_q <= xi;
        y_q <= yi;
      end
      assign w_o[k][j] = w_q;
      assign t_o[k][j] = t_q;
      assign x_o[k][j] = x_q;
      assign y_o[k][j] = y_q;
    end
  end

  // Bottom row (line 8), then realignment of the result digits.
  for (genvar j = 0; j < NP; j++) begin : g_bot
    logic signed [WW-1:0] wi;
    logic signed [TW-1:0] ti;
    logic signed [ZW-1:0] z_n, z_q;
    logic signed [TW-1:0] t_unused;
    logic signed [WW-1:0] w_unused;
    gsd_delay #(.W(WW), .D(c_of(N, j) - c_of(N - 1, j) - 1)) u_dw (
      .clk, .d(w_o[N-1][j]), .q(wi));
    if (j == 0) begin : g_lsd
      assign ti = '0;
    end else begin : g_t
      gsd_delay #(.W(TW), .D(c_of(N, j) - c_of(N - 1, j - 1) - 1)) u_dt (
        .clk, .d(t_o[N-1][j-1]), .q(ti));
    end
    cf_cell #(.LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .WU(WU)) u_cell (
      .w_in(wi), .t_in(ti), .x('0), .y('0), .mul_en(1'b0),
      .z(z_n), .t_out(t_unused), .w_out(w_unused)
    );
    always_ff @(posedge clk) z_q <= z_n;
    gsd_delay #(.W(ZW), .D(LAT - 1 - c_of(N, j))) u_dz (.clk, .d(z_q), .q(z[j]));
  end

  logic [LAT-1:0] v_sr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_sr <= '0;
    else        v_sr <= {v_sr[LAT-2:0], in_valid};
  end
  assign out_valid = v_sr[LAT-1];

endmodule
