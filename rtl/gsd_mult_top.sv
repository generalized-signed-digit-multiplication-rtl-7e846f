// gsd_mult_top: the family of generalized signed-digit (GSD) array
// multipliers side by side, all multiplying N-digit operands in radix
// 2**LOG2R with digits in [-ALPHA, BETA].
//
//   cf   carry-free algorithm, semisystolic 2-D array, then digit-set
//        correction. One product per cycle, latency N+1 (+1 correction).
//   sys  carry-free algorithm, systolic 2-D array (no broadcast), then
//        correction. One product per cycle, latency 4N (+1).
//   lin  carry-free algorithm, linear array, then correction. One product
//        per N cycles, latency N+1 (+1); has its own start/ready handshake.
//   et   estimate-transfer algorithm, semisystolic 2-D array. One product
//        per cycle, latency 2N+1; digits already in [-ALPHA, BETA].
//   tp   two-phase-transfer algorithm, semisystolic 2-D array. One product
//        per cycle, latency 2N+1; digits already in [-ALPHA, BETA].
//   pt   parallel-transfer algorithm, semisystolic 2-D array, then
//        correction. One product per cycle, latency N+1 (+1).
//   ets  estimate-transfer algorithm, systolic 2-D array. One product per
//        cycle, latency 6N.
//   tps  two-phase-transfer algorithm, systolic 2-D array. One product per
//        cycle, latency 6N.
//   pts  parallel-transfer algorithm, systolic 2-D array, then correction.
//        One product per cycle, latency 5N (+1).
//   spt  sparse-transfer variant of the parallel-transfer algorithm, SP_M
//        product terms per transfer row, then correction. One product per
//        cycle, latency ceil(N/SP_M)+1 (+1).
//   tsp  sparse-transfer variant of the two-phase-transfer algorithm, SP_M
//        product terms per transfer stage. One product per cycle, latency
//        2*ceil(N/SP_M)+1.
//   etl, tpl  estimate-transfer and two-phase-transfer linear arrays. One
//        product per 2N cycles, latency 2N+1, sharing one start handshake.
//
// The pipelined arrays share in_valid, x and y; the linear array takes the
// same operands when lin_in_valid and lin_in_ready are both high, and the
// two limited-carry linear arrays when lcl_in_valid and lcl_in_ready are. Every
// result is a little-endian array of digits in [-ALPHA, BETA]; its value
// is sum(d_j * R^j) and equals the integer product x*y. The per-algorithm
// parameters (remainder bounds, estimate threshold and windows, the
// partial-product set of pt, correction bounds) have defaults worked out
// for radix 4 with digits [-3,3] and must be re-derived for other digit
// sets; the sub-blocks reject at elaboration the combinations they can tell
// are invalid.
module gsd_mult_top
  import gsd_pkg::*;
#(
  parameter int N      = 4,
  parameter int LOG2R  = 2,
  parameter int ALPHA  = 3,
  parameter int BETA   = 3,
  parameter int CF_WU  = 1,
  parameter int CF_CWU = 1,
  parameter int TP_WU1 = 1,
  parameter int TP_WU2 = 1,
  parameter int ET_T   = 0,
  parameter int ET_WL1 = 0,
  parameter int ET_WL2 = -3,
  parameter int PT_WU  = 1,
  parameter int PT_UU  = 1,
  parameter int PT_ZL  = -5,
  parameter int PT_ZH  = 4,
  parameter int PT_CWU = 1,
  parameter int SP_M   = 2,
  parameter int TS_WU2 = 2,
  localparam int R     = 1 << LOG2R,
  localparam int XW    = sbits(-ALPHA, BETA),
  localparam int TNEG  = cdiv(ALPHA * BETA, R - 1),
  localparam int TPOS  = cdiv(imax(ALPHA * ALPHA, BETA * BETA), R - 1),
  localparam int CF_ZL = CF_WU - R + 1 - TNEG,
  localparam int CF_ZH = CF_WU + TPOS,
  localparam int CF_ZW = sbits(CF_ZL, CF_ZH),
  localparam int PT_ZW = sbits(PT_ZL, PT_ZH),
  localparam int NP    = 2 * N + 1           // positions of a raw product
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [N-1:0][XW-1:0]  x,
  input  logic [N-1:0][XW-1:0]  y,
  input  logic                  lin_in_valid,
  output logic                  lin_in_ready,
  input  logic                  lcl_in_valid,
  output logic                  lcl_in_ready,
  output logic                  cf_valid,
  output logic [NP:0][XW-1:0]   cf_z,
  output logic                  sys_valid,
  output logic [NP:0][XW-1:0]   sys_z,
  output logic                  lin_valid,
  output logic [NP:0][XW-1:0]   lin_z,
  output logic                  et_valid,
  output logic [NP:0][XW-1:0]   et_z,
  output logic                  tp_valid,
  output logic [NP-1:0][XW-1:0] tp_z,
  output logic                  pt_valid,
  output logic [NP:0][XW-1:0]   pt_z,
  output logic                  ets_valid,
  output logic [NP:0][XW-1:0]   ets_z,
  output logic                  tps_valid,
  output logic [NP-1:0][XW-1:0] tps_z,
  output logic                  pts_valid,
  output logic [NP:0][XW-1:0]   pts_z,
  output logic                  spt_valid,
  output logic [NP:0][XW-1:0]   spt_z,
  output logic                  etl_valid,
  output logic [NP:0][XW-1:0]   etl_z,
  output logic                  tpl_valid,
  output logic [NP-1:0][XW-1:0] tpl_z,
  output logic                  tsp_valid,
  output logic [NP-1:0][XW-1:0] tsp_z
);

  // Carry-free, semisystolic.
  logic                     cf_raw_valid;
  logic [NP-1:0][CF_ZW-1:0] cf_raw;
  cf_semisys_2d #(.N(N), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .WU(CF_WU)) u_cf (
    .clk, .rst_n, .in_valid, .x, .y, .out_valid(cf_raw_valid), .z(cf_raw));
  gsd_correct #(.NI(NP), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .ZL(CF_ZL), .ZH(CF_ZH),
                .CWU(CF_CWU)) u_cf_corr (
    .clk, .rst_n, .in_valid(cf_raw_valid), .z(cf_raw), .out_valid(cf_valid), .s(cf_z));

  // Carry-free, systolic.
  logic                     sys_raw_valid;
  logic [NP-1:0][CF_ZW-1:0] sys_raw;
  cf_systolic_2d #(.N(N), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .WU(CF_WU)) u_sys (
    .clk, .rst_n, .in_valid, .x, .y, .out_valid(sys_raw_valid), .z(sys_raw));
  gsd_correct #(.NI(NP), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .ZL(CF_ZL), .ZH(CF_ZH),
                .CWU(CF_CWU)) u_sys_corr (
    .clk, .rst_n, .in_valid(sys_raw_valid), .z(sys_raw), .out_valid(sys_valid), .s(sys_z));

  // Carry-free, linear array.
  logic                     lin_raw_valid;
  logic [NP-1:0][CF_ZW-1:0] lin_raw;
  cf_linear #(.N(N), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .WU(CF_WU)) u_lin (
    .clk, .rst_n, .in_valid(lin_in_valid), .in_ready(lin_in_ready), .x, .y,
    .out_valid(lin_raw_valid), .z(lin_raw));
  gsd_correct #(.NI(NP), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .ZL(CF_ZL), .ZH(CF_ZH),
                .CWU(CF_CWU)) u_lin_corr (
    .clk, .rst_n, .in_valid(lin_raw_valid), .z(lin_raw), .out_valid(lin_valid), .s(lin_z));

  // Estimate-transfer (two guard positions).
  et_semisys_2d #(.N(N), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .T(ET_T), .WL1(ET_WL1),
                  .WL2(ET_WL2), .GUARD(2)) u_et (
    .clk, .rst_n, .in_valid, .x, .y, .out_valid(et_valid), .z(et_z));

  // Two-phase-transfer.
  tp_semisys_2d #(.N(N), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .WU1(TP_WU1),
                  .WU2(TP_WU2)) u_tp (
    .clk, .rst_n, .in_valid, .x, .y, .out_valid(tp_valid), .z(tp_z));

  // Parallel-transfer.
  logic                     pt_raw_valid;
  logic [NP-1:0][PT_ZW-1:0] pt_raw;
  pt_semisys_2d #(.N(N), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .WU(PT_WU), .UU(PT_UU),
                  .ZL(PT_ZL), .ZH(PT_ZH)) u_pt (
    .clk, .rst_n, .in_valid, .x, .y, .out_valid(pt_raw_valid), .z(pt_raw));
  gsd_correct #(.NI(NP), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .ZL(PT_ZL), .ZH(PT_ZH),
                .CWU(PT_CWU)) u_pt_corr (
    .clk, .rst_n, .in_valid(pt_raw_valid), .z(pt_raw), .out_valid(pt_valid), .s(pt_z));

  // Estimate-transfer and two-phase transfer, systolic.
  lc_systolic_2d #(.ALG(0), .N(N), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .T(ET_T),
                   .WL1(ET_WL1), .WL2(ET_WL2), .GUARD(2)) u_ets (
    .clk, .rst_n, .in_valid, .x, .y, .out_valid(ets_valid), .z(ets_z));
  lc_systolic_2d #(.ALG(1), .N(N), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .WU1(TP_WU1),
                   .WU2(TP_WU2), .GUARD(1)) u_tps (
    .clk, .rst_n, .in_valid, .x, .y, .out_valid(tps_valid), .z(tps_z));

  // Parallel-transfer, systolic.
  logic                     pts_raw_valid;
  logic [NP-1:0][PT_ZW-1:0] pts_raw;
  pt_systolic_2d #(.N(N), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .WU(PT_WU), .UU(PT_UU),
                   .ZL(PT_ZL), .ZH(PT_ZH)) u_pts (
    .clk, .rst_n, .in_valid, .x, .y, .out_valid(pts_raw_valid), .z(pts_raw));
  gsd_correct #(.NI(NP), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .ZL(PT_ZL), .ZH(PT_ZH),
                .CWU(PT_CWU)) u_pts_corr (
    .clk, .rst_n, .in_valid(pts_raw_valid), .z(pts_raw), .out_valid(pts_valid), .s(pts_z));

  // Sparse-transfer parallel-transfer, semisystolic. The default SP_M = 2
  // with the pt split bounds keeps the partial-product set [PT_ZL, PT_ZH].
  logic                     spt_raw_valid;
  logic [NP-1:0][PT_ZW-1:0] spt_raw;
  pt_sparse_semisys_2d #(.N(N), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .M(SP_M), .WU(PT_WU),
                         .UU(PT_UU), .ZL(PT_ZL), .ZH(PT_ZH)) u_spt (
    .clk, .rst_n, .in_valid, .x, .y, .out_valid(spt_raw_valid), .z(spt_raw));
  gsd_correct #(.NI(NP), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .ZL(PT_ZL), .ZH(PT_ZH),
                .CWU(PT_CWU)) u_spt_corr (
    .clk, .rst_n, .in_valid(spt_raw_valid), .z(spt_raw), .out_valid(spt_valid), .s(spt_z));

  // Limited-carry linear arrays. Both take two cycles per step, so they are
  // ready at the same times and share one handshake.
  logic tpl_in_ready;
  lc_linear #(.ALG(0), .N(N), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .T(ET_T),
              .WL1(ET_WL1), .WL2(ET_WL2), .GUARD(2)) u_etl (
    .clk, .rst_n, .in_valid(lcl_in_valid), .in_ready(lcl_in_ready), .x, .y,
    .out_valid(etl_valid), .z(etl_z));
  lc_linear #(.ALG(1), .N(N), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .WU1(TP_WU1),
              .WU2(TP_WU2), .GUARD(1)) u_tpl (
    .clk, .rst_n, .in_valid(lcl_in_valid), .in_ready(tpl_in_ready), .x, .y,
    .out_valid(tpl_valid), .z(tpl_z));

  // Sparse-transfer two-phase, semisystolic. Its second split bound differs
  // from that of tp (TS_WU2 = 2) so that the product stays in [-3,3].
  tp_sparse_semisys_2d #(.N(N), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .M(SP_M),
                         .WU1(TP_WU1), .WU2(TS_WU2)) u_tsp (
    .clk, .rst_n, .in_valid, .x, .y, .out_valid(tsp_valid), .z(tsp_z));

endmodule
