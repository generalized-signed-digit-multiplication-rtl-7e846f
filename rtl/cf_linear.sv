// cf_linear: one-dimensional (linear) array for carry-free GSD
// multiplication, obtained by projecting the semisystolic schedule onto its
// digit positions.
//
// There is one cell per digit position of the product. All cells work on
// the same step of the algorithm in the same cycle: the current multiplier
// digit x_i is broadcast to every cell, the multiplicand digits sit in a
// shift register that moves one cell towards the least significant end per
// step (so cell j always holds y_(j-i)), each cell keeps its own remainder w,
// and each cell's transfer t goes to its more significant neighbour through
// a register. After the N multiply steps one more cycle adds the last
// remainders and transfers, and the product is registered.
//
// Interface: start a multiplication with in_valid while in_ready is high;
// x and y are sampled in that cycle (N digits each, digit 0 least
// significant, digits in [-ALPHA, BETA]). The product z (2N+GUARD positions,
// partial-product digit set as in cf_cell) appears with out_valid N+1
// cycles after the start. The first multiply step runs in the start cycle
// and the final addition cycle of one multiplication can overlap the start
// of the next, so in_ready is high again N cycles after a start: one product
// every N cycles.
//
// From the source algorithm: the cell set, the broadcast of x_i, the y
// shift, the transfer direction and the N+1 cycle latency. This design's own
// choices: the multiplicand is loaded in parallel at the start instead of
// being shifted in digit by digit, the valid/ready handshake, the guard
// position, and resetting only the control state.
module cf_linear
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
  localparam int ZW   = sbits(WL - TNEG, WU + TPOS),
  localparam int SW   = $clog2(N + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [N-1:0][XW-1:0]   x,
  input  logic [N-1:0][XW-1:0]   y,
  output logic                   out_valid,
  output logic [NP-1:0][ZW-1:0]  z
);

  logic [NP-1:0][WW-1:0] w_q, w_n;      // remainder held in each cell
  logic [NP-1:0][TW-1:0] t_q, t_n;      // transfer out of each cell
  logic [NP-1:0][XW-1:0] y_q, y_cur;    // multiplicand digit at each cell
  logic [N-1:0][XW-1:0]  x_q;           // multiplier word being consumed
  logic [SW-1:0]         step_q;        // multiply steps done so far
  logic                  busy_q;
  logic [NP-1:0][ZW-1:0] z_n;

  logic start, final_step;
  assign final_step = busy_q && (step_q == SW'(N));
  assign in_ready   = !busy_q || final_step;
  assign start      = in_valid && in_ready;

  logic signed [XW-1:0] x_cur;
  logic [SW-1:0]        step_cur;

  always_comb begin
    // In the start cycle the cells work on the fresh operands with empty state.
    step_cur = start ? '0 : step_q;
    x_cur    = '0;
    for (int i = 0; i < N; i++)
      if (N - 1 - i == int'(step_cur)) x_cur = start ? x[i] : x_q[i];
    for (int j = 0; j < NP; j++) begin
      if (start) y_cur[j] = (j >= N - 1 && j <= 2 * N - 2) ? y[j-N+1] : '0;
      else       y_cur[j] = y_q[j];
    end
  end

  for (genvar j = 0; j < NP; j++) begin : g_cell
    logic signed [WW-1:0] wi;
    logic signed [TW-1:0] ti, tz;
    logic signed [ZW-1:0] z_unused;
    logic signed [TW-1:0] t_unused;
    logic signed [WW-1:0] w_unused;
    assign wi = start ? '0 : w_q[j];
    if (j == 0) begin : g_lsd
      assign ti = '0;
      assign tz = '0;
    end else begin : g_t
      assign ti = start ? '0 : t_q[j-1];
      assign tz = t_q[j-1];
    end
    // Multiply step of this cell.
    cf_cell #(.LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .WU(WU)) u_step (
      .w_in(wi), .t_in(ti), .x(x_cur), .y(y_cur[j]), .mul_en(1'b1),
      .z(z_unused), .t_out(t_n[j]), .w_out(w_n[j])
    );
    // Final addition (line 8) of the multiplication that is finishing.
    cf_cell #(.LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .WU(WU)) u_last (
      .w_in(w_q[j]), .t_in(tz), .x('0), .y('0), .mul_en(1'b0),
      .z(z_n[j]), .t_out(t_unused), .w_out(w_unused)
    );
  end

  always_ff @(posedge clk) begin
    if (start || busy_q) begin
      w_q <= w_n;
      t_q <= t_n;
      // The multiplicand moves one cell towards the least significant end.
      for (int j = 0; j < NP; j++) y_q[j] <= (j == NP - 1) ? '0 : y_cur[j+1];
    end
    if (start) x_q <= x;
    if (final_step) z <= z_n;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q    <= 1'b0;
      step_q    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= final_step;
      if (start) begin
        busy_q <= 1'b1;
        step_q <= SW'(1);
      end else if (final_step) begin
        busy_q <= 1'b0;
        step_q <= '0;
      end else if (busy_q) begin
        step_q <= step_q + 1'b1;
      end
    end
  end

endmodule
