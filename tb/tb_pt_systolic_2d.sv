// tb_pt_systolic_2d: self-checking test of pt_systolic_2d. Runs the default configuration (radix 4, digits [-3,3], N=4) and the same digit set at N=7.
// Each configuration is issued back to back with random gaps; every product
// is checked for its value, its digit set and its latency.
module tb_pt_systolic_2d;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic d0, d1;
  int   c0, c1, f0, f1;

  mult2d_run #(.KIND(7), .NOPS(3000)) r0 (.clk, .rst_n, .done(d0), .checks(c0), .failures(f0));
  mult2d_run #(.KIND(7), .N(7), .NOPS(2000)) r1 (.clk, .rst_n, .done(d1), .checks(c1), .failures(f1));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d0 && d1);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end
endmodule
