// mult2d_run: drives one pipelined GSD array multiplier with NOPS operand
// pairs (extreme words first, then random digits, issued on most cycles with
// occasional gaps) and checks every product: its value against the integer
// product of the operand values, every digit against the multiplier's
// product digit set, and the latency.
//   KIND 0  cf_semisys_2d   latency N+1
//   KIND 1  tp_semisys_2d   latency 2N+1
//   KIND 2  et_semisys_2d   latency 2N+1
//   KIND 3  pt_semisys_2d   latency N+1
//   KIND 4  cf_systolic_2d  latency 4N
//   KIND 5  lc_systolic_2d, estimate-transfer  latency 6N
//   KIND 6  lc_systolic_2d, two-phase transfer latency 6N
//   KIND 7  pt_systolic_2d  latency 5N
//   KIND 8  pt_sparse_semisys_2d, MS terms per row  latency ceil(N/MS)+1
//   KIND 9  tp_sparse_semisys_2d, MS terms per stage  latency 2*ceil(N/MS)+1
// It also counts products whose top (guard) position is nonzero and, for
// KIND 0, positions whose digit is at the extremes of the digit set.
module mult2d_run #(
  parameter int KIND  = 0,
  parameter int N     = 4,
  parameter int LOG2R = 2,
  parameter int ALPHA = 3,
  parameter int BETA  = 3,
  parameter int WU    = 1,
  parameter int GUARD = (KIND == 2 || KIND == 5) ? 2 : 1,
  parameter int NOPS  = 2000,
  // tp: second split bound; et: threshold and windows; pt: bounds and set
  parameter int WU2   = 1,
  parameter int T     = 0,
  parameter int WL1   = 0,
  parameter int WL2   = -3,
  parameter int UU    = 1,
  parameter int PZL   = -5,
  parameter int PZH   = 4,
  parameter int MS    = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  import gsd_pkg::*;
  localparam int R    = 1 << LOG2R;
  localparam int NP   = 2 * N + GUARD;
  localparam int TNEG = cdiv(ALPHA * BETA, R - 1);
  localparam int TPOS = cdiv(imax(ALPHA * ALPHA, BETA * BETA), R - 1);
  localparam bit OPSET = (KIND == 1 || KIND == 2 || KIND == 5 || KIND == 6 || KIND == 9);
  localparam int ZL   = OPSET ? -ALPHA : (KIND == 3 || KIND == 7 || KIND == 8) ? PZL : WU - R + 1 - TNEG;
  localparam int ZH   = OPSET ? BETA : (KIND == 3 || KIND == 7 || KIND == 8) ? PZH : WU + TPOS;
  localparam int LAT  = (KIND == 1 || KIND == 2) ? 2 * N + 1 : (KIND == 4) ? 4 * N :
                        (KIND == 5 || KIND == 6) ? 6 * N : (KIND == 7) ? 5 * N :
                        (KIND == 8) ? (N + MS - 1) / MS + 1 :
                        (KIND == 9) ? 2 * ((N + MS - 1) / MS) + 1 : N + 1;
  localparam int XW   = sbits(-ALPHA, BETA);
  localparam int ZW   = sbits(ZL, ZH);

  logic                  in_valid, out_valid;
  logic [N-1:0][XW-1:0]  x, y;
  logic [NP-1:0][ZW-1:0] z;

  if (KIND == 0) begin : g_cf
    cf_semisys_2d #(.N(N), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .WU(WU), .GUARD(GUARD))
      dut (.*);
  end else if (KIND == 1) begin : g_tp
    tp_semisys_2d #(.N(N), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .WU1(WU), .WU2(WU2),
                    .GUARD(GUARD)) dut (.*);
  end else if (KIND == 2) begin : g_et
    et_semisys_2d #(.N(N), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .T(T), .WL1(WL1),
                    .WL2(WL2), .GUARD(GUARD)) dut (.*);
  end else if (KIND == 3) begin : g_pt
    pt_semisys_2d #(.N(N), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .WU(WU), .UU(UU),
                    .ZL(PZL), .ZH(PZH), .GUARD(GUARD)) dut (.*);
  end else if (KIND == 4) begin : g_sys
    cf_systolic_2d #(.N(N), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .WU(WU)) dut (.*);
  end else if (KIND == 5 || KIND == 6) begin : g_lc
    lc_systolic_2d #(.ALG(KIND - 5), .N(N), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .T(T),
                     .WL1(WL1), .WL2(WL2), .WU1(WU), .WU2(WU2), .GUARD(GUARD)) dut (.*);
  end else if (KIND == 8) begin : g_sparse
    pt_sparse_semisys_2d #(.N(N), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .M(MS), .WU(WU),
                           .UU(UU), .ZL(PZL), .ZH(PZH), .GUARD(GUARD)) dut (.*);
  end else if (KIND == 9) begin : g_tpsparse
    tp_sparse_semisys_2d #(.N(N), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .M(MS), .WU1(WU),
                           .WU2(WU2), .GUARD(GUARD)) dut (.*);
  end else begin : g_ptsys
    pt_systolic_2d #(.N(N), .LOG2R(LOG2R), .ALPHA(ALPHA), .BETA(BETA), .WU(WU), .UU(UU),
                     .ZL(PZL), .ZH(PZH)) dut (.*);
  end

  int guard_used, extremes;

  longint exp_q[$];
  int     cyc_q[$];
  int     cycle, issued, received;

  function automatic longint word_val(input logic [N-1:0][XW-1:0] d);
    longint v = 0;
    for (int j = N - 1; j >= 0; j--) v = v * R + longint'($signed(d[j]));
    return v;
  endfunction

  function automatic logic [XW-1:0] rnd_digit(input int mode);
    int d;
    case (mode)
      0: d = BETA;
      1: d = -ALPHA;
      default: d = int'($urandom_range(ALPHA + BETA)) - ALPHA;
    endcase
    return XW'(d);
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycle <= 0; issued <= 0; in_valid <= 1'b0;
    end else begin
      cycle <= cycle + 1;
      if (issued < NOPS && ($urandom_range(7) != 0)) begin
        logic [N-1:0][XW-1:0] xn, yn;
        for (int j = 0; j < N; j++) begin
          xn[j] = rnd_digit(issued < 4 ? (issued & 1) : 2);
          yn[j] = rnd_digit(issued < 4 ? (issued >> 1) : 2);
        end
        x <= xn; y <= yn; in_valid <= 1'b1;
        exp_q.push_back(word_val(xn) * word_val(yn));
        cyc_q.push_back(cycle + 1);
        issued <= issued + 1;
      end else begin
        in_valid <= 1'b0;
      end
    end
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      checks <= 0; failures <= 0; received <= 0; guard_used <= 0; extremes <= 0;
    end else if (out_valid) begin
      longint v, e;
      int c, f, lat;
      bit range_ok;
      v = 0; range_ok = 1'b1;
      for (int j = NP - 1; j >= 0; j--) begin
        v = v * R + longint'($signed(z[j]));
        if (int'($signed(z[j])) < ZL || int'($signed(z[j])) > ZH) range_ok = 1'b0;
      end
      c = 0; f = 0;
      if (exp_q.size() == 0) begin
        c++; f++;
        $display("%m: unexpected result");
      end else begin
        e   = exp_q.pop_front();
        lat = cycle - cyc_q.pop_front();
        c += 3;
        if (v != e) begin
          f++;
          if (failures < 5) $display("%m: value %0d expected %0d", v, e);
        end
        if (!range_ok) begin
          f++;
          $display("%m: digit outside [%0d,%0d]", ZL, ZH);
        end
        if (lat != LAT) begin
          f++;
          if (failures < 5) $display("%m: latency %0d expected %0d", lat, LAT);
        end
      end
      checks   <= checks + c;
      failures <= failures + f;
      received <= received + 1;
      if (z[NP-1] != '0) guard_used <= guard_used + 1;
      for (int j = 0; j < NP; j++)
        if (int'($signed(z[j])) == ZL || int'($signed(z[j])) == ZH) extremes <= extremes + 1;
    end
  end

  assign done = (received == NOPS);
endmodule
