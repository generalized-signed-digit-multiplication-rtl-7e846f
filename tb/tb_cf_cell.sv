// tb_cf_cell: exhaustive self-checking test of the carry-free node.
// Every remainder, incoming transfer and operand digit pair of the default
// configuration (radix 4, digits [-3,3], WU = 1) is applied with the product
// enabled and disabled; the node must return z = w + t and split
// p = z + x*y (or z) as p = 4*t' + w' with w' in [-2,1] and t' in [-3,3].
module tb_cf_cell;
  localparam int LOG2R = 2, ALPHA = 3, BETA = 3, WU = 1;
  localparam int R = 1 << LOG2R, TNEG = 3, TPOS = 3, WL = WU - R + 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [2:0] w_in, w_out, x, y, t_in, t_out;
  logic signed [3:0] z;
  logic              mul_en;
  int checks = 0, failures = 0;

  cf_cell dut (.*);   // default parameters, the same values as above

  initial begin
    for (int m = 0; m < 2; m++)
      for (int w = WL; w <= WU; w++)
        for (int t = -TNEG; t <= TPOS; t++)
          for (int a = -ALPHA; a <= BETA; a++)
            for (int b = -ALPHA; b <= BETA; b++) begin
              int p;
              w_in = 3'(w); t_in = 3'(t); x = 3'(a); y = 3'(b); mul_en = m[0];
              @(posedge clk);
              p = w + t + (m ? a * b : 0);
              checks += 4;
              if (int'(z) != w + t) failures++;
              if (R * int'(t_out) + int'(w_out) != p) begin
                failures++;
                if (failures < 5) $display("p=%0d -> t=%0d w=%0d", p, t_out, w_out);
              end
              if (int'(w_out) < WL || int'(w_out) > WU) failures++;
              if (int'(t_out) < -TNEG || int'(t_out) > TPOS) failures++;
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
