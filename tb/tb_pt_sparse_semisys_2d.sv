// tb_pt_sparse_semisys_2d: self-checking test of pt_sparse_semisys_2d.
// Runs the default configuration (radix 4, digits [-3,3], N=4, two product
// terms per transfer row, partial-product digits [-5,4]), the same at N=7,
// where the last row has a single term, three terms per row at N=6 (split
// bounds WU=1, UU=0, digits [-7,4]), and digits [-2,2] with four terms per
// row at N=8 (WU=1, UU=0, digits [-6,3]).
// Every product is checked for its value, its digit set and its latency.
module tb_pt_sparse_semisys_2d;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic d0, d1, d2, d3;
  int   c0, c1, c2, c3, f0, f1, f2, f3;

  mult2d_run #(.KIND(8), .NOPS(3000)) r0 (
    .clk, .rst_n, .done(d0), .checks(c0), .failures(f0));
  mult2d_run #(.KIND(8), .N(7), .NOPS(2000)) r1 (
    .clk, .rst_n, .done(d1), .checks(c1), .failures(f1));
  mult2d_run #(.KIND(8), .N(6), .MS(3), .UU(0), .PZL(-7), .PZH(4), .NOPS(2000)) r2 (
    .clk, .rst_n, .done(d2), .checks(c2), .failures(f2));
  mult2d_run #(.KIND(8), .N(8), .ALPHA(2), .BETA(2), .MS(4), .UU(0), .PZL(-6), .PZH(3),
               .NOPS(2000)) r3 (
    .clk, .rst_n, .done(d3), .checks(c3), .failures(f3));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d0 && d1 && d2 && d3);
    repeat (2) @(posedge clk);
    $display("guard position used: %0d %0d %0d %0d", r0.guard_used, r1.guard_used,
             r2.guard_used, r3.guard_used);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3 + 1);
    $finish;
  end
endmodule
