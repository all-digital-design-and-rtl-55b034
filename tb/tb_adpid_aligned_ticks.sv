// tb_adpid_aligned_ticks: the controller with its counting clocks aligned to
// the error (ALIGN_TICKS = 1), next to the same controller with free-running
// counting clocks (the default). Each instance closes the loop around its own
// carriage model and tracks a 1 V setpoint (150 Hz reference) for 350 ms;
// all other parameters are at their defaults (f_P = 15 kHz, f_I = f_D = 10 Hz,
// f_A = 5 kHz, 4-bit counters).
// Checked on the aligned instance, pulse by pulse, from its ports:
//  - C_I moves by exactly one step (+1 or -1 by the direction, saturating)
//    at every error pulse after the first, one clock after the error rises;
//  - C_P, loaded with +/-1 at the error edge, takes its first count one f_P
//    period after that edge: 69 clocks of 1 us measured from the first
//    clock of the error (phase restart, 67 clocks to the carry, then the
//    tick register and the counter register), checked as 68 to 70;
//  - C_D, whose 10 Hz period is far longer than any error pulse, still
//    holds its +/-1 start value when the pulse ends.
// Both loops must stay bounded. Reported: how many error pulses changed C_I
// in each instance, and the output of both loops.
module tb_adpid_aligned_ticks;
  import adpid_pkg::*;

  localparam logic [31:0] REF_FW = 32'(hz_to_fword(150, 1_000_000, 32));

  logic clk = 0, rst_n = 0, start = 0;
  int checks = 0, failures = 0;

  // aligned instance
  logic a_enc, a_dcmp, a_ref, a_clr, a_err, a_dir, a_pwm, a_pdir, a_neg, a_load;
  logic signed [3:0] a_cp, a_ci, a_cd, a_r, a_ca;
  logic signed [4:0] a_cdr;
  logic signed [5:0] a_sum;
  ca_state_e a_st;
  int a_y;

  // free-running instance
  logic f_enc, f_dcmp, f_ref, f_clr, f_err, f_dir, f_pwm, f_pdir, f_neg, f_load;
  logic signed [3:0] f_cp, f_ci, f_cd, f_r, f_ca;
  logic signed [4:0] f_cdr;
  logic signed [5:0] f_sum;
  ca_state_e f_st;
  int f_y;

  adpid_top #(.ALIGN_TICKS(1'b1)) dut_a (
    .clk, .rst_n, .start, .stop(1'b0), .ref_fword(REF_FW), .enc_in(a_enc),
    .dir_cmp(a_dcmp), .dir_digital(1'b0), .ref_out(a_ref), .clr(a_clr),
    .err(a_err), .dir(a_dir), .cp(a_cp), .ci(a_ci), .cd(a_cd), .r(a_r),
    .cdr(a_cdr), .sum(a_sum), .sum_neg(a_neg), .ca_state(a_st),
    .ca_load(a_load), .ca(a_ca), .pwm(a_pwm), .pwm_dir(a_pdir));
  carriage_plant_model plant_a (
    .clk, .rst_n, .pwm(a_pwm), .pwm_dir(a_pdir), .enc_out(a_enc),
    .dir_cmp(a_dcmp), .y_mv(a_y));

  adpid_top dut_f (
    .clk, .rst_n, .start, .stop(1'b0), .ref_fword(REF_FW), .enc_in(f_enc),
    .dir_cmp(f_dcmp), .dir_digital(1'b0), .ref_out(f_ref), .clr(f_clr),
    .err(f_err), .dir(f_dir), .cp(f_cp), .ci(f_ci), .cd(f_cd), .r(f_r),
    .cdr(f_cdr), .sum(f_sum), .sum_neg(f_neg), .ca_state(f_st),
    .ca_load(f_load), .ca(f_ca), .pwm(f_pwm), .pwm_dir(f_pdir));
  carriage_plant_model plant_f (
    .clk, .rst_n, .pwm(f_pwm), .pwm_dir(f_pdir), .enc_out(f_enc),
    .dir_cmp(f_dcmp), .y_mv(f_y));

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

  function automatic logic signed [3:0] sat_step(input logic signed [3:0] v, input logic up);
    if (up) return (v == 4'sd7) ? v : v + 4'sd1;
    else    return (v == -4'sd8) ? v : v - 4'sd1;
  endfunction

  // pulse-by-pulse monitor of the aligned instance (pre-edge values)
  longint cyc = 0;
  logic a_err_q = 0, a_started = 0, ci_pend = 0, cp_wait = 0, cd_pulse = 0;
  logic signed [3:0] ci_exp, ci_exp_prev, cp_load, cd_load;
  longint rise_cyc;
  int a_pulses = 0, a_ci_moves = 0, cp_first_min = 1 << 30, cp_first_max = 0;
  int cp_first_n = 0, cd_hold_n = 0, d;

  always @(posedge clk) begin
    cyc++;
    if (ci_pend) begin
      check(a_ci == ci_exp, $sformatf("C_I step at error edge: %0d, expected %0d", a_ci, ci_exp));
      if (a_ci != ci_exp_prev) a_ci_moves++;
      ci_pend <= 0;
    end
    if (cp_wait && cyc == rise_cyc + 1) cp_load = a_cp;
    if (cd_pulse && cyc == rise_cyc + 1) cd_load = a_cd;
    if (cp_wait && cyc > rise_cyc + 1) begin
      if (!a_err) cp_wait <= 0;
      else if (a_cp != cp_load) begin
        d = int'(cyc - rise_cyc);
        if (d < cp_first_min) cp_first_min = d;
        if (d > cp_first_max) cp_first_max = d;
        cp_first_n++;
        check(d >= 68 && d <= 70, $sformatf("first C_P count %0d clocks after the error edge", d));
        cp_wait <= 0;
      end
    end
    if (cd_pulse && cyc > rise_cyc + 1 && !a_err) begin
      check(a_cd == cd_load && (cd_load == 4'sd1 || cd_load == -4'sd1),
            $sformatf("C_D holds its start value over the pulse: %0d", a_cd));
      cd_hold_n++;
      cd_pulse <= 0;
    end
    if (a_clr && a_err && !a_err_q) begin
      a_pulses++;
      rise_cyc = cyc;
      cp_wait <= 1;
      cd_pulse <= 1;
      if (a_started) begin
        ci_exp      = sat_step(a_ci, a_dir);
        ci_exp_prev = a_ci;
        ci_pend    <= 1;
      end
      a_started <= 1;
    end
    a_err_q <= a_err;
  end

  // count the error pulses that change C_I in the free-running instance
  logic f_err_q = 0, f_in_pulse = 0;
  logic signed [3:0] f_ci_start;
  int f_pulses = 0, f_ci_moves = 0;
  always @(posedge clk) begin
    if (f_clr && f_err && !f_err_q) begin
      f_pulses++;
      f_in_pulse <= 1;
      f_ci_start <= f_ci;
    end
    if (f_in_pulse && !f_err) begin
      if (f_ci != f_ci_start) f_ci_moves++;
      f_in_pulse <= 0;
    end
    f_err_q <= f_err;
  end

  int a_peak = 0, f_peak = 0, a_mn = 1 << 30, a_mx = -(1 << 30), f_mn = 1 << 30, f_mx = -(1 << 30);
  longint a_acc = 0, f_acc = 0, n = 0;

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    for (int t = 0; t < 350_000; t++) begin
      @(posedge clk);
      if (a_y > a_peak) a_peak = a_y;
      if (f_y > f_peak) f_peak = f_y;
      if (t >= 200_000) begin
        a_acc += longint'(a_y); f_acc += longint'(f_y); n++;
        if (a_y < a_mn) a_mn = a_y;
        if (a_y > a_mx) a_mx = a_y;
        if (f_y < f_mn) f_mn = f_y;
        if (f_y > f_mx) f_mx = f_y;
      end
    end
    $display("aligned: %0d error pulses, C_I changed at %0d; first C_P count %0d..%0d clocks (%0d pulses); C_D held in %0d pulses",
             a_pulses, a_ci_moves, cp_first_min, cp_first_max, cp_first_n, cd_hold_n);
    $display("free-running: %0d error pulses, C_I changed during %0d", f_pulses, f_ci_moves);
    $display("aligned output: peak %0d mV, last 150 ms mean %0d mV, min %0d, max %0d",
             a_peak, int'(a_acc / n), a_mn, a_mx);
    $display("free-running output: peak %0d mV, last 150 ms mean %0d mV, min %0d, max %0d",
             f_peak, int'(f_acc / n), f_mn, f_mx);
    check(a_pulses > 20 && cp_first_n > 10 && cd_hold_n > 20, "aligned instance saw enough error pulses");
    check(a_ci_moves > 0, "aligned C_I moved at error edges");
    check(a_peak < 2000 && a_mn > -1000, "aligned loop stays bounded");
    check(f_peak < 2000 && f_mn > -1000, "free-running loop stays bounded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
