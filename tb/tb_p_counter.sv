// tb_p_counter: random error pulses, directions, rate ticks and enable, with
// C_P compared every clock against an integer model of the proportional
// counter: restart at +1/-1 on every error pulse, count while the error is
// high, hold while it is low, zero while disabled, saturate at -8/+7.
// A directed case checks that a 5-tick pulse gives exactly +6.
module tb_p_counter;
  logic clk = 0, rst_n = 0, clr = 0, err = 0, err_rise = 0, dir = 1, tick = 0;
  logic signed [3:0] cp;
  int checks = 0, failures = 0, model = 0, restarts = 0;

  p_counter dut (.*);
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
    if (!clr) model = 0;
    else if (err_rise) begin model = dir ? 1 : -1; restarts++; end
    else if (err && tick) begin
      if (dir && model < 7) model++;
      else if (!dir && model > -8) model--;
    end
    @(negedge clk);
    checks++;
    if (int'(cp) != model) begin failures++; $display("FAIL cp=%0d exp=%0d", cp, model); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1; clr = 1;
    // directed: 5 ticks during a pulse, dir up
    step(0, 0);
    step(1, 0);
    repeat (5) begin step(1, 1); step(1, 0); end
    step(0, 0);
    checks++; if (cp != 4'sd6) begin failures++; $display("FAIL directed cp=%0d", cp); end
    // holds while low
    repeat (10) step(0, 1);
    checks++; if (cp != 4'sd6) failures++;
    // random
    for (int i = 0; i < 4000; i++) begin
      if (!err) dir = (i % 700) < 350;
      if ($urandom_range(0, 299) == 0) clr = ~clr;
      step((i % 40) < $urandom_range(5, 30), $urandom_range(0, 2) == 0);
    end
    checks++; if (restarts < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
