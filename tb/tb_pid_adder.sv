// tb_pid_adder: exhaustive check of C_P + C_I + (C_D-R) for 4-bit counters
// (W+1 = 5-bit difference) against integer arithmetic, with the sign bit.
module tb_pid_adder;
  logic signed [3:0] cp, ci;
  logic signed [4:0] cdr;
  logic signed [5:0] sum;
  logic neg;
  int checks = 0, failures = 0;

  pid_adder dut (.*);

  initial begin
    for (int a = -8; a < 8; a++)
      for (int b = -8; b < 8; b++)
        for (int c = -16; c < 16; c++) begin
          cp = 4'(a); ci = 4'(b); cdr = 5'(c);
          #1;
          checks++;
          if (int'(sum) != a + b + c || neg != (a + b + c < 0)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d+%0d+%0d = %0d", a, b, c, sum);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
