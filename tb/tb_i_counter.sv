// tb_i_counter: C_I compared every clock against an integer model of the
// integral counter: +1/-1 only at the first error pulse after enabling, then
// continue from the held value at every later pulse, saturate at -8/+7.
// A directed case checks accumulation over three pulses of two ticks each.
module tb_i_counter;
  logic clk = 0, rst_n = 0, clr = 0, err = 0, err_rise = 0, dir = 1, tick = 0;
  logic signed [3:0] ci;
  int checks = 0, failures = 0, model = 0;
  bit started = 0;

  i_counter dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic nerr, input logic ntick);
    err_rise = nerr & ~err;
    err = nerr; tick = ntick;
    if (!clr) begin model = 0; started = 0; end
    else if (err_rise && !started) begin model = dir ? 1 : -1; started = 1; end
    else if (err && tick) begin
      if (dir && model < 7) model++;
      else if (!dir && model > -8) model--;
    end
    @(negedge clk);
    checks++;
    if (int'(ci) != model) begin failures++; $display("FAIL ci=%0d exp=%0d", ci, model); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1; clr = 1;
    // three pulses, two ticks each: 1 + 2 + 2 + 2 = 7
    repeat (3) begin
      step(1, 0); step(1, 1); step(1, 1); step(0, 0); step(0, 1);
    end
    checks++; if (ci != 4'sd7) begin failures++; $display("FAIL directed ci=%0d", ci); end
    dir = 0;
    step(1, 0); step(1, 1); step(0, 0);
    checks++; if (ci != 4'sd6) begin failures++; $display("FAIL directed down ci=%0d", ci); end
    for (int i = 0; i < 4000; i++) begin
      if (!err) dir = (i % 900) < 400;
      if ($urandom_range(0, 399) == 0) clr = ~clr;
      step((i % 40) < $urandom_range(5, 30), $urandom_range(0, 3) == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
