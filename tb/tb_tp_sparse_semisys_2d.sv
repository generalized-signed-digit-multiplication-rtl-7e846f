// tb_tp_sparse_semisys_2d: self-checking test of tp_sparse_semisys_2d.
// Runs the default configuration (radix 4, digits [-3,3], N=4, two product
// terms per transfer stage, split bounds WU1=1, WU2=2), the same at N=7,
// where the last stage has a single term, and at N=6.
// Every product is checked for its value, for digits in [-3,3] and for its
// latency.
module tb_tp_sparse_semisys_2d;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic d0, d1, d2;
  int   c0, c1, c2, f0, f1, f2;

  mult2d_run #(.KIND(9), .WU2(2), .NOPS(3000)) r0 (
    .clk, .rst_n, .done(d0), .checks(c0), .failures(f0));
  mult2d_run #(.KIND(9), .N(7), .WU2(2), .NOPS(2000)) r1 (
    .clk, .rst_n, .done(d1), .checks(c1), .failures(f1));
  mult2d_run #(.KIND(9), .N(6), .WU2(2), .NOPS(2000)) r2 (
    .clk, .rst_n, .done(d2), .checks(c2), .failures(f2));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d0 && d1 && d2);
    repeat (2) @(posedge clk);
    $display("guard position used: %0d %0d %0d", r0.guard_used, r1.guard_used, r2.guard_used);
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
