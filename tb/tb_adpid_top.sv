// tb_adpid_top: end-to-end test of the all-digital PID controller at its
// default parameters (1 MHz system clock, f_P = 15 kHz, f_I = f_D = 10 Hz,
// f_A = 5 kHz, 4-bit counters) with a 150 Hz generated reference.
//
// The encoder is a pulse train of programmable frequency made in the
// testbench; the analog comparator is modelled as "encoder slower than the
// reference -> count up". The run goes through: a slow and a fast system with
// the comparator, a stop/start of the controller, the digital direction
// detector with a slow and a fast system, and a very fast encoder whose error
// pulses come faster than C_A can count down.
// Every clock, scoreboards check: err = reference XOR encoder three clocks
// earlier; C_P restarts at +/-1 at each error pulse and holds while the error
// is low; C_I steps only on f_I ticks inside error pulses; C_D-R and R update
// at the end of each pulse; C_A loads 0 at the first error and the limited
// adder sum afterwards, then steps toward zero only on f_A ticks; PWM equals
// C_A != 0 and its direction the sign of the loaded sum. The f_I and f_A tick
// times come from phase accumulators in the testbench computed from the same
// frequencies. Each mechanism must be seen at least once.
module tb_adpid_top;
  import adpid_pkg::*;

  localparam longint unsigned CLK_HZ = 1_000_000;
  localparam logic [31:0] FW_REF = 32'(hz_to_fword(150, CLK_HZ, 32));
  localparam logic [31:0] FW_I   = 32'(hz_to_fword(10, CLK_HZ, 32));
  localparam logic [31:0] FW_A   = 32'(hz_to_fword(5000, CLK_HZ, 32));

  logic clk = 0, rst_n = 0, start = 0, stop = 0;
  logic [31:0] ref_fword = FW_REF;
  logic enc_in = 0, dir_cmp = 1, dir_digital = 0;
  logic ref_out, clr, err, dir, pwm, pwm_dir, sum_neg, ca_load;
  logic signed [3:0] cp, ci, cd, r, ca;
  logic signed [4:0] cdr;
  logic signed [5:0] sum;
  ca_state_e ca_state;

  adpid_top dut (.*);

  always #500 clk = ~clk;   // 1 MHz

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // watchdog: 2.5 s of simulated time
  initial begin
    repeat (2_500_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // encoder pulse train
  logic [31:0] enc_acc = '0, enc_fw = '0;
  always @(posedge clk) begin
    enc_acc <= enc_acc + enc_fw;
    enc_in  <= enc_acc[31];
  end

  // mechanism counters
  int n_err_pulse = 0, n_p_restart = 0, n_p_sat = 0, n_i_step = 0, n_i_hold = 0;
  int n_d_pos = 0, n_d_neg = 0, n_ca_init = 0, n_ca_load = 0, n_ca_done = 0;
  int n_ca_interrupt = 0, n_pwm_pos = 0, n_pwm_neg = 0, n_dir_up = 0, n_dir_down = 0;
  int n_dig_dir_change = 0, n_disable = 0, n_sum_limit = 0;

  // scoreboard state (values seen at the previous negedge)
  logic x_hist [0:3];
  logic pp_err = 0, pp_dir = 0, p_err = 0, p_clr = 0, p_load = 0, p_dir = 0, p_ticki = 0, p_ticka = 0, p_dirsel = 0;
  logic signed [3:0] p_cp = 0, p_ci = 0, p_cd = 0, p_r = 0, p_ca = 0;
  logic signed [5:0] p_sum = 0;
  logic [31:0] m_acc_i = 0, m_acc_a = 0;
  logic m_tick_i = 0, m_tick_a = 0;
  bit first_pending = 1, exp_dir_valid = 0, exp_pwm_dir = 0, started = 0;
  int hist_n = 0;

  function automatic int sat4(input int v);
    return v > 7 ? 7 : (v < -8 ? -8 : v);
  endfunction

  always @(negedge clk) if (rst_n) begin
    logic [32:0] t;
    int e;
    // tick models: state after the latest posedge
    t = {1'b0, m_acc_i} + {1'b0, FW_I}; m_acc_i = t[31:0]; m_tick_i = t[32];
    t = {1'b0, m_acc_a} + {1'b0, FW_A}; m_acc_a = t[31:0]; m_tick_a = t[32];

    // error signal: XOR of the inputs three clocks ago
    if (hist_n >= 3) check(err == x_hist[2], "err is reference XOR encoder");
    x_hist[3] = x_hist[2]; x_hist[2] = x_hist[1]; x_hist[1] = x_hist[0];
    x_hist[0] = ref_out ^ enc_in;
    hist_n++;
    if (err && !p_err) n_err_pulse++;

    if (clr && p_clr) begin
      // proportional counter (the restart lands one clock after err rises)
      if (p_err && !pp_err) begin
        check(cp == (pp_dir ? 4'sd1 : -4'sd1), "C_P restarts at +/-1");
        n_p_restart++;
      end else if (!err && !p_err) check(cp == p_cp, "C_P holds while error low");
      if (cp == 7 || cp == -8) n_p_sat++;
      // integral counter
      if (p_err && !pp_err && !started) begin
        check(ci == (pp_dir ? 4'sd1 : -4'sd1), "C_I loads +/-1 at the first error");
        started = 1;
      end else if (started) begin
        e = (p_err && p_ticki) ? sat4(int'(p_ci) + (p_dir ? 1 : -1)) : int'(p_ci);
        check(int'(ci) == e, $sformatf("C_I %0d exp %0d", ci, e));
        if (ci != p_ci) n_i_step++;
        if (p_err && !pp_err && ci == p_ci && ci != 0) n_i_hold++;
      end
    end
    if (!clr) started = 0;

    // combined counter
    if (clr && !p_clr) first_pending = 1;
    if (p_load) begin
      if (first_pending) begin
        check(ca == 0, "first load initialises C_A to 0");
        check(pwm_dir == 1'b0, "first load direction");
        first_pending = 0;
        n_ca_init++;
      end else begin
        check(int'(ca) == sat4(int'(p_sum)), $sformatf("C_A loads sum %0d, got %0d", p_sum, ca));
        check(pwm_dir == (p_sum < 0), "PWM direction is the adder sign");
        if (p_ca != 0) n_ca_interrupt++;
        if (p_sum > 7 || p_sum < -8) n_sum_limit++;
        n_ca_load++;
      end
    end else if (p_ticka && p_ca != 0) begin
      check(int'(ca) == int'(p_ca) + (p_ca < 0 ? 1 : -1), "C_A steps toward zero on f_A");
      if (ca == 0) n_ca_done++;
    end else begin
      check(ca == p_ca, "C_A holds between f_A ticks");
    end
    check(pwm == (ca != 0), "PWM is OR of C_A");
    if (pwm && !pwm_dir) n_pwm_pos++;
    if (pwm && pwm_dir) n_pwm_neg++;
    if (p_clr && !clr) n_disable++;
    if (dir_digital && p_dirsel && dir != p_dir) n_dig_dir_change++;
    if (err && dir) n_dir_up++;
    if (err && !dir) n_dir_down++;

    pp_err = p_err; pp_dir = p_dir;
    p_err = err; p_clr = clr; p_load = ca_load; p_dir = dir; p_dirsel = dir_digital;
    p_ticki = m_tick_i; p_ticka = m_tick_a;
    p_cp = cp; p_ci = ci; p_cd = cd; p_r = r; p_ca = ca; p_sum = sum;
  end

  // derivative scoreboard: at the end of each pulse C_D-R = C_D - R, R = C_D
  logic signed [3:0] q_cd = 0, q_r = 0;
  logic q_err = 0, q_fall = 0;
  always @(negedge clk) if (rst_n) begin
    if (q_fall && clr) begin
      check(int'(cdr) == int'(q_cd) - int'(q_r), $sformatf("C_D-R %0d exp %0d", cdr, q_cd - q_r));
      check(r == q_cd, "R refreshed with C_D");
      if (cdr > 0) n_d_pos++;
      if (cdr < 0) n_d_neg++;
    end
    q_fall = q_err && !err;
    q_err = err; q_cd = cd; q_r = r;
  end

  task automatic run_ms(input int ms, input real enc_hz, input bit cmp_dir);
    enc_fw  = 32'(longint'(enc_hz * 4294.967296));
    dir_cmp = cmp_dir;
    repeat (ms * 1000) @(posedge clk);
  endtask

  task automatic mech(input string name, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", name); end
    else $display("  %-34s %0d", name, n);
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    // comparator direction: slow, then fast system
    run_ms(250, 140.0, 1'b1);
    run_ms(250, 163.0, 1'b0);
    // stop and restart the controller
    @(posedge clk); stop <= 1; @(posedge clk); stop <= 0;
    repeat (3) @(posedge clk);
    check(cp == 0 && ci == 0 && cdr == 0 && !clr, "stop clears the counters");
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    // digital direction detector
    dir_digital = 1;
    run_ms(250, 137.0, 1'b0);
    check(dir == 1'b1, "digital direction: slow encoder counts up");
    run_ms(250, 166.0, 1'b1);
    check(dir == 1'b0, "digital direction: fast encoder counts down");
    // very fast encoder: loads interrupt unfinished counts
    run_ms(60, 900.0, 1'b0);
    $display("mechanisms seen:");
    mech("error pulses", n_err_pulse);
    mech("C_P restart", n_p_restart);
    mech("C_P saturated", n_p_sat);
    mech("C_I step on f_I", n_i_step);
    mech("C_I carried over to next pulse", n_i_hold);
    mech("C_D-R positive", n_d_pos);
    mech("C_D-R negative", n_d_neg);
    mech("C_A initialised to 0", n_ca_init);
    mech("C_A loaded with sum", n_ca_load);
    mech("C_A counted to zero", n_ca_done);
    mech("C_A count interrupted by load", n_ca_interrupt);
    mech("sum limited to counter range", n_sum_limit);
    mech("PWM positive", n_pwm_pos);
    mech("PWM negative", n_pwm_neg);
    mech("count up (D=1)", n_dir_up);
    mech("count down (D=0)", n_dir_down);
    mech("digital direction changed", n_dig_dir_change);
    mech("controller disabled", n_disable);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
