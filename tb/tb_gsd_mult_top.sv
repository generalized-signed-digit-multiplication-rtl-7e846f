// tb_gsd_mult_top: end-to-end test of all multipliers at the default sizes
// (N = 4, radix 4, digits [-3,3]).
//
// Operand pairs are issued on random cycles (mostly back to back) to the
// pipelined arrays; the linear arrays are started on the same operands
// whenever they are ready and a start is requested. Every product from every
// array is checked for its value (against the integer product), its digit
// set [-3,3] and its latency: cf and pt N+2, sys 4N+1, et and tp 2N+1,
// lin N+2, ets and tps 6N, pts 5N+1, spt ceil(N/2)+2, tsp 2*ceil(N/2)+1,
// etl and tpl 2N+1 after their start (the correction stage adds one cycle where it is
// used).
//
// It also counts how often each mechanism of the design occurred and
// counts a failure for any that never did: back-to-back issue into the
// pipelines, the linear array refusing a start while busy, a start
// overlapping the linear array's final cycle, a nonzero guard position in
// a raw carry-free product, a nonzero transfer inside the correction,
// both estimate values in the estimate-transfer array, nonzero second-phase
// transfers in the two-phase array, and nonzero weight-R^2 transfers in the
// parallel-transfer array.
module tb_gsd_mult_top;
  localparam int N = 4, R = 4, NP = 2 * N + 1, NOPS = 4000;
  localparam int NSTREAM = 13;  // cf, sys, lin, et, tp, pt, ets, tps, pts, spt, etl, tpl, tsp
  localparam int LAT [NSTREAM] = '{N + 2, 4 * N + 1, N + 2, 2 * N + 1, 2 * N + 1, N + 2,
                                  6 * N, 6 * N, 5 * N + 1, (N + 1) / 2 + 2,
                                  2 * N + 1, 2 * N + 1, 2 * ((N + 1) / 2) + 1};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 in_valid, lin_in_valid, lin_in_ready, lcl_in_valid, lcl_in_ready;
  logic                 etl_valid, tpl_valid, tsp_valid;
  logic [NP:0][2:0]     etl_z;
  logic [NP-1:0][2:0]   tpl_z, tsp_z;
  logic [N-1:0][2:0]    x, y;
  logic                 cf_valid, sys_valid, lin_valid, et_valid, tp_valid, pt_valid;
  logic                 ets_valid, tps_valid, pts_valid, spt_valid;
  logic [NP:0][2:0]     cf_z, sys_z, lin_z, et_z, pt_z, ets_z, pts_z, spt_z;
  logic [NP-1:0][2:0]   tp_z, tps_z;

  gsd_mult_top dut (.*);

  int checks = 0, failures = 0, cycle = 0, issued = 0;
  longint exp_q [NSTREAM][$];
  int     cyc_q [NSTREAM][$];
  int     received [NSTREAM];

  // mechanism counters
  int n_b2b = 0, n_lin_stall = 0, n_lin_overlap = 0, n_guard = 0, n_corr = 0;
  int n_lcl_overlap = 0, n_lcl_mismatch = 0;
  int n_est1 = 0, n_est2 = 0, n_tp_u = 0, n_pt_t = 0;
  logic prev_issue = 1'b0;

  function automatic longint wval(input logic [N-1:0][2:0] d);
    longint v;
    v = 0;
    for (int j = N - 1; j >= 0; j--) v = v * R + longint'($signed(d[j]));
    return v;
  endfunction

  task automatic check_out(input int s, input logic [NP:0][2:0] d, input int nd);
    longint v;
    bit ok;
    v = 0; ok = 1'b1;
    for (int j = nd - 1; j >= 0; j--) begin
      v = v * R + longint'($signed(d[j]));
      if ($signed(d[j]) < -3) ok = 1'b0;
    end
    checks += 3;
    received[s]++;
    if (exp_q[s].size() == 0) begin
      failures++;
      $display("stream %0d: unexpected output", s);
      return;
    end
    if (v != exp_q[s][0]) begin
      failures++;
      if (failures < 10) $display("stream %0d: value %0d expected %0d", s, v, exp_q[s][0]);
    end
    if (cycle - cyc_q[s][0] != LAT[s]) begin
      failures++;
      if (failures < 10) $display("stream %0d: latency %0d", s, cycle - cyc_q[s][0]);
    end
    if (!ok) failures++;
    void'(exp_q[s].pop_front());
    void'(cyc_q[s].pop_front());
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      longint e;
      e = wval(x) * wval(y);
      if (in_valid) begin
        for (int s = 0; s < NSTREAM; s++)
          if (s != 2 && s != 10 && s != 11) begin
            exp_q[s].push_back(e);
            cyc_q[s].push_back(cycle);
          end
        if (prev_issue) n_b2b++;
      end
      prev_issue <= in_valid;
      if (lin_in_valid && lin_in_ready) begin
        exp_q[2].push_back(e);
        cyc_q[2].push_back(cycle);
        if (dut.u_lin.final_step) n_lin_overlap++;
      end
      if (lin_in_valid && !lin_in_ready) n_lin_stall++;
      if (lcl_in_valid && lcl_in_ready) begin
        for (int s = 10; s < 12; s++) begin
          exp_q[s].push_back(e);
          cyc_q[s].push_back(cycle);
        end
        if (dut.u_etl.final_step) n_lcl_overlap++;
      end
      if (cf_valid)  check_out(0, cf_z, NP + 1);
      if (sys_valid) check_out(1, sys_z, NP + 1);
      if (lin_valid) check_out(2, lin_z, NP + 1);
      if (et_valid)  check_out(3, et_z, NP + 1);
      if (tp_valid)  check_out(4, {3'b000, tp_z}, NP);
      if (pt_valid)  check_out(5, pt_z, NP + 1);
      if (ets_valid) check_out(6, ets_z, NP + 1);
      if (tps_valid) check_out(7, {3'b000, tps_z}, NP);
      if (pts_valid) check_out(8, pts_z, NP + 1);
      if (spt_valid) check_out(9, spt_z, NP + 1);
      if (etl_valid) check_out(10, etl_z, NP + 1);
      if (tpl_valid) check_out(11, {3'b000, tpl_z}, NP);
      if (tsp_valid) check_out(12, {3'b000, tsp_z}, NP);
      if (dut.u_tpl.in_ready != lcl_in_ready) n_lcl_mismatch++;
      // mechanisms
      if (dut.cf_raw_valid && dut.cf_raw[NP-1] != '0) n_guard++;
      if (dut.cf_raw_valid && dut.u_cf_corr.c != '0) n_corr++;
      for (int j = 0; j < NP + 1; j++) begin
        if (dut.u_et.val_r[1]) begin
          if (dut.u_et.e_r[0][j]) n_est2++;
          else n_est1++;
        end
      end
      if (dut.u_tp.val_r[1] && dut.u_tp.u_r[0] != '0) n_tp_u++;
      if (dut.u_pt.val_r[0] && dut.u_pt.t_r[0] != '0) n_pt_t++;
    end
  end

  initial begin
    in_valid = 1'b0; lin_in_valid = 1'b0; lcl_in_valid = 1'b0; x = '0; y = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (issued < NOPS) begin
      for (int j = 0; j < N; j++) begin
        x[j] = (issued < 2) ? ((issued == 0) ? 3'd3 : 3'(-3)) : 3'(int'($urandom_range(6)) - 3);
        y[j] = (issued < 2) ? 3'd3 : 3'(int'($urandom_range(6)) - 3);
      end
      in_valid     = ($urandom_range(5) != 0);
      lin_in_valid = ($urandom_range(2) != 0);
      lcl_in_valid = ($urandom_range(2) != 0);
      if (in_valid) issued++;
      @(posedge clk);
      #1;
    end
    in_valid = 1'b0; lin_in_valid = 1'b0; lcl_in_valid = 1'b0;
    repeat (6 * N + 4) @(posedge clk);
    checks += NSTREAM + 11;
    for (int s = 0; s < NSTREAM; s++)
      if (exp_q[s].size() != 0 || received[s] == 0) begin
        failures++;
        $display("stream %0d: %0d outputs missing", s, exp_q[s].size());
      end
    $display("mechanisms: b2b=%0d lin_stall=%0d lin_overlap=%0d guard=%0d corr=%0d est1=%0d est2=%0d tp_u=%0d pt_t=%0d",
             n_b2b, n_lin_stall, n_lin_overlap, n_guard, n_corr, n_est1, n_est2, n_tp_u, n_pt_t);
    if (n_b2b == 0) failures++;
    if (n_lin_stall == 0) failures++;
    if (n_lin_overlap == 0) failures++;
    if (n_guard == 0) failures++;
    if (n_corr == 0) failures++;
    if (n_est1 == 0) failures++;
    if (n_est2 == 0) failures++;
    if (n_tp_u == 0) failures++;
    if (n_pt_t == 0) failures++;
    $display("limited-carry linear arrays: overlapped starts=%0d ready mismatches=%0d",
             n_lcl_overlap, n_lcl_mismatch);
    if (n_lcl_overlap == 0) failures++;
    if (n_lcl_mismatch != 0) failures++;
    $display("products checked: cf=%0d sys=%0d lin=%0d et=%0d tp=%0d pt=%0d ets=%0d tps=%0d pts=%0d spt=%0d etl=%0d tpl=%0d tsp=%0d",
             received[0], received[1], received[2], received[3], received[4], received[5],
             received[6], received[7], received[8], received[9], received[10], received[11], received[12]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NOPS * 3 + 1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
