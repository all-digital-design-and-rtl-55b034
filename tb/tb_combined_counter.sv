// tb_combined_counter: loads C_A with 0 and with adder sums and checks that
// it counts to zero at the f_A ticks, that the PWM output is high for exactly
// |sum| ticks, that the direction follows the sum's sign, that sums beyond the
// 4-bit range are limited to -8/+7, and that a new load interrupts a count.
module tb_combined_counter;
  logic clk = 0, rst_n = 0, load = 0, mux_sel = 0, tick = 0;
  logic signed [5:0] sum = '0;
  logic signed [3:0] ca;
  logic pwm, pwm_dir;
  int checks = 0, failures = 0;

  combined_counter dut (.*);
  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (ca=%0d pwm=%b dir=%b)", what, ca, pwm, pwm_dir); end
  endtask

  task automatic do_load(input logic sel, input int s);
    sum = 6'(s); mux_sel = sel; load = 1;
    @(negedge clk);
    load = 0;
  endtask

  // count ticks (every 3rd clock) while pwm is high; ticks_limit stops early
  task automatic run(input int exp_pwm_ticks, input bit exp_dir, input string what);
    int n = 0;
    check(pwm_dir == exp_dir, {what, " direction"});
    for (int c = 0; c < 200; c++) begin
      tick = (c % 3 == 2);
      @(negedge clk);
      if (tick) n++;
      if (!pwm) break;
    end
    tick = 0;
    check(n == exp_pwm_ticks, $sformatf("%s: %0d ticks, exp %0d", what, n, exp_pwm_ticks));
    check(ca == 0 && !pwm, {what, " ends at zero"});
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    do_load(0, 5);  check(ca == 0 && !pwm, "select 0 loads zero");
    do_load(1, 5);  check(ca == 5 && pwm, "load 5");   run(5, 0, "sum 5");
    do_load(1, -3); check(ca == -3 && pwm, "load -3"); run(3, 1, "sum -3");
    do_load(1, 20); check(ca == 7, "limit +7");        run(7, 0, "sum 20");
    do_load(1, -30); check(ca == -8, "limit -8");      run(8, 1, "sum -30");
    do_load(1, 0);  check(ca == 0 && !pwm, "sum 0 gives no pulse");
    // interruption
    do_load(1, 6);
    repeat (2) begin tick = 1; @(negedge clk); tick = 0; @(negedge clk); end
    check(ca == 4, "counted 6 -> 4");
    do_load(1, -2); check(ca == -2 && pwm_dir, "new load interrupts");
    run(2, 1, "after interrupt");
    // no ticks: holds
    do_load(1, 3); repeat (20) @(negedge clk);
    check(ca == 3, "holds without ticks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
