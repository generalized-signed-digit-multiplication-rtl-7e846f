// gsd_correct: carry-free digit-set conversion applied once to a product.
//
// The carry-free and parallel-transfer multipliers leave their product in a
// partial-product digit set [ZL, ZH] that is larger than the operand digit
// set [-ALPHA, BETA]. This block converts it back in one carry-free step:
// every position splits its digit as z = R*c + s (high bits, low LOG2R bits,
// one compare with CWU and one adjustment, as in the multiplier cells) and
// the output digit is s plus the c of the position below. No information
// travels further than one position, so the delay does not depend on the
// word length.
//
// Interface: NI input digits, NI+1 output digits (the top one takes the
// transfer out of the top position). One conversion per cycle, result
// registered: out_valid follows in_valid by one cycle.
//
// The source only says that a carry-free correction step follows the
// multiplication; the one-step split used here, its CWU bound and the
// registered output are this design's choices. A single step only works when
// the transfer range needed fits the redundancy of the operand set (true
// for the defaults: [-5,4] to [-3,3] in radix 4 with c in [-1,1]); an
// elaboration check rejects parameter sets where it cannot.
module gsd_correct
  import gsd_pkg::*;
#(
  parameter int NI    = 9,
  parameter int LOG2R = 2,
  parameter int ALPHA = 3,
  parameter int BETA  = 3,
  parameter int ZL    = -5,
  parameter int ZH    = 4,
  parameter int CWU   = 1,
  localparam int R    = 1 << LOG2R,
  localparam int ZW   = sbits(ZL, ZH),
  localparam int XW   = sbits(-ALPHA, BETA),
  // transfer range of the split and the resulting output digit range
  localparam int CL   = fdiv(ZL - (CWU - R + 1), R),
  localparam int CH   = fdiv(ZH - (CWU - R + 1), R),
  localparam int CW   = sbits(CL, CH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [NI-1:0][ZW-1:0] z,
  output logic                  out_valid,
  output logic [NI:0][XW-1:0]   s
);

  // Reject digit sets that one carry-free step cannot convert.
  if (CWU - R + 1 + CL < -ALPHA || CWU + CH > BETA) begin : g_check
    $error("gsd_correct: [%0d,%0d] cannot be converted to [%0d,%0d] in one step",
           ZL, ZH, -ALPHA, BETA);
  end

  logic [NI-1:0][CW-1:0] c;
  int                    w [NI];
  logic [NI:0][XW-1:0]   s_n;

  always_comb begin
    for (int j = 0; j < NI; j++) begin
      split_t sp;
      sp   = split_digit(int'($signed(z[j])), LOG2R, CWU);
      c[j] = CW'(sp.t);
      w[j] = sp.w;
    end
    s_n[0] = XW'(w[0]);
    for (int j = 1; j < NI; j++) s_n[j] = XW'(w[j] + int'($signed(c[j-1])));
    s_n[NI] = XW'($signed(c[NI-1]));
  end

  always_ff @(posedge clk) s <= s_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
