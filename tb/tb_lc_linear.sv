// tb_lc_linear: self-checking test of lc_linear, both algorithms at the
// default parameters, run side by side.
module tb_lc_linear;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic d0, d1;
  int   c0, c1, f0, f1;

  lin_run #(.ALG(0)) r0 (.clk, .rst_n, .done(d0), .checks(c0), .failures(f0));
  lin_run #(.ALG(1)) r1 (.clk, .rst_n, .done(d1), .checks(c1), .failures(f1));

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (d0 && d1);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end
endmodule
