// tb_gsd_correct: self-checking test of the digit-set conversion.
// Default configuration: 9 input digits in [-5,4], radix 4, output digits
// in [-3,3]. Words with every digit at one extreme come first, then random
// words; each result must keep the value, have every digit in [-3,3] and
// arrive one cycle after its input.
module tb_gsd_correct;
  localparam int NI = 9, R = 4, ZL = -5, ZH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                in_valid, out_valid;
  logic [NI-1:0][3:0]  z;
  logic [NI:0][2:0]    s;
  int checks = 0, failures = 0;

  gsd_correct dut (.*);

  function automatic longint val_in(input logic [NI-1:0][3:0] d);
    longint v = 0;
    for (int j = NI - 1; j >= 0; j--) v = v * R + longint'($signed(d[j]));
    return v;
  endfunction

  function automatic longint val_out(input logic [NI:0][2:0] d);
    longint v = 0;
    for (int j = NI; j >= 0; j--) v = v * R + longint'($signed(d[j]));
    return v;
  endfunction

  initial begin
    in_valid = 1'b0;
    z = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      longint e;
      for (int j = 0; j < NI; j++)
        case (n)
          0: z[j] = 4'(ZL);
          1: z[j] = 4'(ZH);
          2: z[j] = 4'((j % 2) ? ZL : ZH);
          default: z[j] = 4'(int'($urandom_range(ZH - ZL)) + ZL);
        endcase
      e = val_in(z);
      in_valid = 1'b1;
      @(posedge clk);
      #1;
      in_valid = 1'b0;
      checks += 3;
      if (!out_valid) failures++;
      if (val_out(s) != e) begin
        failures++;
        if (failures < 5) $display("value %0d expected %0d", val_out(s), e);
      end
      for (int j = 0; j <= NI; j++)
        if ($signed(s[j]) < -3 || $signed(s[j]) > 3) begin
          failures++;
          break;
        end
    end
    @(posedge clk);
    #1;
    checks++;
    if (out_valid) failures++;
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
