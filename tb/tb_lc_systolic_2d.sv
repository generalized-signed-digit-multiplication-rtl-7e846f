// tb_lc_systolic_2d: self-checking test of lc_systolic_2d, the systolic
// limited-carry array. Estimate-transfer (ALG = 0) and two-phase transfer
// (ALG = 1) are both run at the default configuration (radix 4, digits
// [-3,3], N=4); estimate-transfer also at N=7 and two-phase also in radix 8
// with digits [-5,5] at N=6. Each configuration is issued back to back with
// random gaps; every product is checked for its value, its digit set and the
// 6N cycle latency.
module tb_lc_systolic_2d;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] d;
  int         c [4], f [4];

  mult2d_run #(.KIND(5), .NOPS(3000)) r0 (.clk, .rst_n, .done(d[0]), .checks(c[0]), .failures(f[0]));
  mult2d_run #(.KIND(5), .N(7), .NOPS(1500)) r1 (.clk, .rst_n, .done(d[1]), .checks(c[1]), .failures(f[1]));
  mult2d_run #(.KIND(6), .NOPS(3000)) r2 (.clk, .rst_n, .done(d[2]), .checks(c[2]), .failures(f[2]));
  mult2d_run #(.KIND(6), .N(6), .LOG2R(3), .ALPHA(5), .BETA(5), .WU(3), .WU2(3), .NOPS(1500))
    r3 (.clk, .rst_n, .done(d[3]), .checks(c[3]), .failures(f[3]));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (&d);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum());
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum() + 1);
    $finish;
  end
endmodule
