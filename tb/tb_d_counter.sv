// tb_d_counter: C_D, R and C_D-R compared every clock against an integer
// model of the derivative counter: C_D restarts at +1/-1 on each error pulse
// and counts while high; at the end of the pulse C_D-R = new count minus the
// previous count and R takes the new count. A directed case: pulses giving
// counts 3 then 5 must leave C_D-R = 2, then a pulse of 1 gives -4.
module tb_d_counter;
  logic clk = 0, rst_n = 0, clr = 0, err = 0, err_rise = 0, err_fall = 0, dir = 1, tick = 0;
  logic signed [3:0] cd, r;
  logic signed [4:0] cdr;
  int checks = 0, failures = 0, mcd = 0, mr = 0, mdr = 0;

  d_counter dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic nerr, input logic ntick);
    err_rise = nerr & ~err;
    err_fall = ~nerr & err;
    err = nerr; tick = ntick;
    if (!clr) begin mcd = 0; mr = 0; mdr = 0; end
    else begin
      if (err_fall) begin mdr = mcd - mr; mr = mcd; end
      if (err_rise) mcd = dir ? 1 : -1;
      else if (err && tick) begin
        if (dir && mcd < 7) mcd++;
        else if (!dir && mcd > -8) mcd--;
      end
    end
    @(negedge clk);
    checks++;
    if (int'(cd) != mcd || int'(r) != mr || int'(cdr) != mdr) begin
      failures++;
      $display("FAIL cd=%0d r=%0d cdr=%0d exp %0d %0d %0d", cd, r, cdr, mcd, mr, mdr);
    end
  endtask

  task automatic pulse(input int ticks);
    step(1, 0);
    repeat (ticks) step(1, 1);
    step(0, 0); step(0, 0);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1; clr = 1;
    pulse(2);             // count 3, R was 0 -> cdr = 3
    pulse(4);             // count 5 -> cdr = 2
    checks++; if (cdr != 5'sd2) begin failures++; $display("FAIL directed cdr=%0d", cdr); end
    pulse(0);             // count 1 -> cdr = -4
    checks++; if (cdr != -5'sd4) begin failures++; $display("FAIL directed cdr=%0d", cdr); end
    for (int i = 0; i < 4000; i++) begin
      if (!err) dir = (i % 700) < 350;
      if ($urandom_range(0, 399) == 0) clr = ~clr;
      step((i % 40) < $urandom_range(5, 30), $urandom_range(0, 2) == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
