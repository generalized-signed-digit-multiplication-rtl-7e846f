// tb_cf_semisys_2d: self-checking test of the semisystolic carry-free array.
// Runs the default configuration (radix 4, digits [-3,3], N=4), a
// minimally redundant radix-4 set [-2,2] at N=6 and the asymmetric
// radix-8 set [-4,5] at N=5, each with back-to-back issue, checking product value, digit
// set and the N+1 cycle latency.
module tb_cf_semisys_2d;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic d0, d1, d2;
  int   c0, c1, c2, f0, f1, f2;

  mult2d_run #(.KIND(0), .NOPS(3000)) r0 (.clk, .rst_n, .done(d0), .checks(c0), .failures(f0));
  mult2d_run #(.KIND(0), .N(6), .LOG2R(2), .ALPHA(2), .BETA(2), .WU(1), .NOPS(2000))
    r1 (.clk, .rst_n, .done(d1), .checks(c1), .failures(f1));
  mult2d_run #(.KIND(0), .N(5), .LOG2R(3), .ALPHA(4), .BETA(5), .WU(3), .NOPS(2000))
    r2 (.clk, .rst_n, .done(d2), .checks(c2), .failures(f2));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d0 && d1 && d2);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end
endmodule
