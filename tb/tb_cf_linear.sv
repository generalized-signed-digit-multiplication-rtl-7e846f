// tb_cf_linear: self-checking test of the linear carry-free array.
// Default configuration (radix 4, digits [-3,3], N = 4). Multiplications
// are started whenever the array is ready, with random pauses; each product
// is checked for its value, its digit set [-5,4], the N+1 cycle latency, and
// in_ready must come back exactly N cycles after each start.
module tb_cf_linear;
  localparam int N = 4, R = 4, NP = 2 * N + 1, ZL = -5, ZH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                  in_valid, in_ready, out_valid;
  logic [N-1:0][2:0]     x, y;
  logic [NP-1:0][3:0]    z;
  int checks = 0, failures = 0, cycle = 0, overlaps = 0;
  longint exp_q[$];
  int     cyc_q[$];
  int     last_start = -100;

  cf_linear dut (.*);

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
        if (cycle - last_start == N) overlaps++;
        last_start = cycle;
      end
      // ready must be low in the N-1 cycles after a start, high afterwards
      if (cycle - last_start > 0) begin
        checks++;
        if (in_ready != (cycle - last_start >= N)) begin failures++; if (failures < 4) $display("rdy %0d %0d", in_ready, cycle - last_start); end
      end
      if (out_valid) begin
        longint v;
        v = 0;
        for (int j = NP - 1; j >= 0; j--) begin
          v = v * R + longint'($signed(z[j]));
          if ($signed(z[j]) < ZL || $signed(z[j]) > ZH) failures++;
        end
        checks += 2;
        if (exp_q.size() == 0) failures++;
        else begin
          if (v != exp_q[0]) begin failures++; if (failures < 4) $display("val %0d exp %0d", v, exp_q[0]); end
          void'(exp_q.pop_front());
          if (cycle - cyc_q[0] != N + 1) begin failures++; if (failures < 4) $display("lat %0d", cycle - cyc_q[0]); end
          void'(cyc_q.pop_front());
        end
      end
    end
  end

  initial begin
    in_valid = 1'b0;
    x = '0; y = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
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
      if ($urandom_range(3) == 0) repeat ($urandom_range(2 * N)) @(posedge clk);
      #1;
    end
    repeat (N + 3) @(posedge clk);
    checks += 2;
    if (exp_q.size() != 0) failures++;
    if (overlaps == 0) failures++;
    $display("back-to-back starts: %0d", overlaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
