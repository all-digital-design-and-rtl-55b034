// tb_adpid_closed_loop: the controller at its default parameters closing the
// loop around a behavioural model of the inkjet carriage (1947/(s(s+47.579)),
// 150 encoder pulses per volt) while tracking a 1 V setpoint (150 Hz
// reference) for 350 ms, with the direction taken from the comparator model.
// Reported: output at 40, 80, 160 and 350 ms, peak, and the mean and ripple
// over the last 150 ms. Checked: the output rises from 0 towards the
// setpoint, the loop stays bounded, and the mean over the last 150 ms lies
// within 1 V +/- 0.2 V
// and the ripple stays below +/-0.4 V.
module tb_adpid_closed_loop;
  import adpid_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, stop = 0;
  logic [31:0] ref_fword = 32'(hz_to_fword(150, 1_000_000, 32));
  logic enc_in, dir_cmp, dir_digital = 0;
  logic ref_out, clr, err, dir, pwm, pwm_dir, sum_neg, ca_load;
  logic signed [3:0] cp, ci, cd, r, ca;
  logic signed [4:0] cdr;
  logic signed [5:0] sum;
  ca_state_e ca_state;
  int y_mv;
  int checks = 0, failures = 0;

  adpid_top dut (.*);
  carriage_plant_model plant (.clk, .rst_n, .pwm, .pwm_dir, .enc_out(enc_in), .dir_cmp, .y_mv);

  always #500 clk = ~clk;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int peak = 0, mn = 1 << 30, mx = -(1 << 30), y40 = 0, y80 = 0, y160 = 0;
  longint acc = 0, n = 0;

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    for (int t = 0; t < 350_000; t++) begin
      @(posedge clk);
      if (y_mv > peak) peak = y_mv;
      if (t == 40_000) y40 = y_mv;
      if (t == 80_000) y80 = y_mv;
      if (t == 160_000) y160 = y_mv;
      if (t >= 200_000) begin
        acc += longint'(y_mv); n++;
        if (y_mv < mn) mn = y_mv;
        if (y_mv > mx) mx = y_mv;
      end
    end
    $display("output mV at 40/80/160/350 ms: %0d %0d %0d %0d", y40, y80, y160, y_mv);
    $display("peak %0d mV; last 150 ms: mean %0d mV, min %0d, max %0d",
             peak, int'(acc / n), mn, mx);
    check(y40 > 100 && y80 > y40 && y160 > y80, "output rises towards the setpoint");
    check(peak < 2000, "output stays bounded");
    check(int'(acc / n) > 800 && int'(acc / n) < 1200, "mean output within 1 V +/- 0.2 V");
    check(mx - mn < 800, "ripple below +/-0.4 V");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
