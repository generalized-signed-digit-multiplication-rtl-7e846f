// lin_run: drives one lc_linear instance (ALG selects the algorithm) at
// the default number system (radix 4, digits [-3,3], N = 4).
// Multiplications are started whenever the array is ready, with random
// pauses; each product is checked for its value, its digit set [-3,3], the
// 2N+1 cycle latency, and in_ready must come back exactly 2N cycles after
// each start.
module lin_run #(parameter int ALG = 0) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int N = 4, R = 4, G = (ALG == 0) ? 2 : 1, NP = 2 * N + G, ZL = -3, ZH = 3;
  localparam int L = 2 * N;
  logic                  in_valid, in_ready, out_valid;
  logic [N-1:0][2:0]     x, y;
  logic [NP-1:0][2:0]    z;
  int cycle = 0, overlaps = 0;
  longint exp_q[$];
  int     cyc_q[$];
  int     last_start = -100;

  lc_linear #(.ALG(ALG)) dut (.*);

  function automatic longint wval(input logic [N-1:0][2:0] d);
    longint v = 0;
    for (int j = N - 1; j >= 0; j--) v = v * R + longint'($signed(d[j]));
    return v;
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (in_valid && in_ready) begin
        exp_q.push_back(wval(x) * wval(y));
        cyc_q.push_back(cycle);
        if (cycle - last_start == L) overlaps++;
        last_start = cycle;
      end
      // ready must be low in the L-1 cycles after a start, high afterwards
      if (cycle - last_start > 0) begin
        checks++;
        if (in_ready != (cycle - last_start >= L)) begin failures++; if (failures < 4) $display("rdy %0d %0d", in_ready, cycle - last_start); end
      end
      if (out_valid) begin
        longint v;
        v = 0;
        for (int j = NP - 1; j >= 0; j--) begin
          v = v * R + longint'($signed(z[j]));
          if (int'($signed(z[j])) < ZL || int'($signed(z[j])) > ZH) failures++;
        end
        checks += 2;
        if (exp_q.size() == 0) failures++;
        else begin
          if (v != exp_q[0]) begin failures++; if (failures < 4) $display("val %0d exp %0d", v, exp_q[0]); end
          void'(exp_q.pop_front());
          if (cycle - cyc_q[0] != L + 1) begin failures++; if (failures < 4) $display("lat %0d", cycle - cyc_q[0]); end
          void'(cyc_q.pop_front());
        end
      end
    end
  end

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    in_valid = 1'b0;
    x = '0; y = '0;
    wait (rst_n);
    for (int n = 0; n < 2000; n++) begin
      for (int j = 0; j < N; j++) begin
        x[j] = (n < 2) ? ((n == 0) ? 3'd3 : 3'(-3)) : 3'(int'($urandom_range(6)) - 3);
        y[j] = (n < 2) ? 3'd3 : 3'(int'($urandom_range(6)) - 3);
      end
      in_valid = 1'b1;
      while (!in_ready) begin
        @(posedge clk);
        #1;
      end
      @(posedge clk);
      #1;
      in_valid = 1'b0;
      if ($urandom_range(3) == 0) repeat ($urandom_range(2 * L)) @(posedge clk);
      #1;
    end
    repeat (L + 3) @(posedge clk);
    checks += 2;
    if (exp_q.size() != 0) failures++;
    if (overlaps == 0) failures++;
    $display("ALG %0d back-to-back starts: %0d", ALG, overlaps);
    done = 1'b1;
  end
endmodule

