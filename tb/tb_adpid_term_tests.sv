// tb_adpid_term_tests: one-term tests of the controller, each with the other
// two terms switched off (their counting frequency 0), 8-bit counters and a
// 150 Hz reference standing for 1 V:
//  P: K_P = f_P/f_A = 15000/10000 = 1.5, encoder idle, so every error pulse is
//     a full reference half-period. Each PWM burst must last 1.5 times the
//     error pulse (within the +/-1 count of the counter start value and the
//     rate quantisation).
//  I: K_I = f_I/f_A = 1 (2 kHz each), same constant error. C_I must grow by
//     the error length times f_I at every pulse, so the bursts grow until the
//     next load cuts them short (the behaviour the document reports).
//  D: K_D = f_D/f_A = 1 (20 kHz each), encoder at 140 Hz, so successive error
//     pulses grow or shrink steadily (a ramp). C_D-R must equal the change of
//     the error pulse length times f_D, within 2 counts.
module tb_adpid_term_tests;
  import adpid_pkg::*;
  localparam logic [31:0] FW150 = 32'(hz_to_fword(150, 1_000_000, 32));
  localparam logic [31:0] FW140 = 32'(hz_to_fword(140, 1_000_000, 32));

  logic clk = 0, rst_n = 0, start = 0;
  int checks = 0, failures = 0;
  always #500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------- P only ----------------
  logic p_ref, p_clr, p_err, p_dir, p_pwm, p_pdir, p_neg, p_load;
  logic signed [7:0] p_cp, p_ci, p_cd, p_r, p_ca;
  logic signed [8:0] p_cdr;
  logic signed [9:0] p_sum;
  ca_state_e p_st;
  adpid_top #(.W(8), .F_P_HZ(15000), .F_I_HZ(0), .F_D_HZ(0), .F_A_HZ(10000)) u_p (
    .clk, .rst_n, .start, .stop(1'b0), .ref_fword(FW150), .enc_in(1'b0), .dir_cmp(1'b1),
    .dir_digital(1'b0), .ref_out(p_ref), .clr(p_clr), .err(p_err), .dir(p_dir),
    .cp(p_cp), .ci(p_ci), .cd(p_cd), .r(p_r), .cdr(p_cdr), .sum(p_sum), .sum_neg(p_neg),
    .ca_state(p_st), .ca_load(p_load), .ca(p_ca), .pwm(p_pwm), .pwm_dir(p_pdir));

  // ---------------- I only ----------------
  logic i_ref, i_clr, i_err, i_dir, i_pwm, i_pdir, i_neg, i_load;
  logic signed [7:0] i_cp, i_ci, i_cd, i_r, i_ca;
  logic signed [8:0] i_cdr;
  logic signed [9:0] i_sum;
  ca_state_e i_st;
  adpid_top #(.W(8), .F_P_HZ(0), .F_I_HZ(2000), .F_D_HZ(0), .F_A_HZ(2000)) u_i (
    .clk, .rst_n, .start, .stop(1'b0), .ref_fword(FW150), .enc_in(1'b0), .dir_cmp(1'b1),
    .dir_digital(1'b0), .ref_out(i_ref), .clr(i_clr), .err(i_err), .dir(i_dir),
    .cp(i_cp), .ci(i_ci), .cd(i_cd), .r(i_r), .cdr(i_cdr), .sum(i_sum), .sum_neg(i_neg),
    .ca_state(i_st), .ca_load(i_load), .ca(i_ca), .pwm(i_pwm), .pwm_dir(i_pdir));

  // ---------------- D only ----------------
  logic d_ref, d_clr, d_err, d_dir, d_pwm, d_pdir, d_neg, d_load, d_enc = 0;
  logic signed [7:0] d_cp, d_ci, d_cd, d_r, d_ca;
  logic signed [8:0] d_cdr;
  logic signed [9:0] d_sum;
  ca_state_e d_st;
  logic [31:0] d_acc = 0;
  always @(posedge clk) begin d_acc <= d_acc + FW140; d_enc <= d_acc[31]; end
  adpid_top #(.W(8), .F_P_HZ(0), .F_I_HZ(0), .F_D_HZ(20000), .F_A_HZ(20000)) u_d (
    .clk, .rst_n, .start, .stop(1'b0), .ref_fword(FW150), .enc_in(d_enc), .dir_cmp(1'b1),
    .dir_digital(1'b0), .ref_out(d_ref), .clr(d_clr), .err(d_err), .dir(d_dir),
    .cp(d_cp), .ci(d_ci), .cd(d_cd), .r(d_r), .cdr(d_cdr), .sum(d_sum), .sum_neg(d_neg),
    .ca_state(d_st), .ca_load(d_load), .ca(d_ca), .pwm(d_pwm), .pwm_dir(d_pdir));

  // P: error pulse length vs following PWM burst length
  int p_elen = 0, p_last_elen = 0, p_blen = 0, p_bursts = 0;
  logic p_err_q = 0, p_pwm_q = 0;
  always @(negedge clk) if (rst_n) begin
    if (p_err) p_elen++;
    if (!p_err && p_err_q) begin p_last_elen = p_elen; p_elen = 0; end
    if (p_pwm) p_blen++;
    if (!p_pwm && p_pwm_q) begin
      if (p_bursts > 0)
        check(p_blen > p_last_elen * 3 / 2 - 200 && p_blen < p_last_elen * 3 / 2 + 200,
              $sformatf("P burst %0d us for error %0d us (gain 1.5)", p_blen, p_last_elen));
      p_bursts++;
      p_blen = 0;
    end
    p_err_q = p_err; p_pwm_q = p_pwm;
  end

  // I: C_I grows by about the error length times f_I at every pulse
  int i_prev = 0, i_pulses = 0, i_cut = 0;
  logic i_err_q = 0;
  always @(negedge clk) if (rst_n) begin
    if (!i_err && i_err_q) begin
      if (i_pulses > 0 && i_ci < 127)
        check(int'(i_ci) - i_prev >= 6 && int'(i_ci) - i_prev <= 8,
              $sformatf("C_I step %0d (expected about 6.7)", int'(i_ci) - i_prev));
      i_prev = int'(i_ci);
      i_pulses++;
    end
    if (i_load && i_ca != 0) i_cut++;
    i_err_q = i_err;
  end

  // D: C_D-R follows the change of error pulse length
  int d_elen = 0, d_l1 = 0, d_l0 = 0, d_pulses = 0, d_nonzero = 0;
  logic d_err_q = 0, d_chk = 0;
  always @(negedge clk) if (rst_n) begin
    if (d_chk) begin
      // expected: (l1 - l0) * 20 kHz / 1 MHz counts
      if (d_pulses > 2 && d_l1 < 6000 && d_l0 < 6000) begin
        check(int'(d_cdr) * 50 > (d_l1 - d_l0) - 100 && int'(d_cdr) * 50 < (d_l1 - d_l0) + 100,
              $sformatf("C_D-R %0d for error change %0d us", d_cdr, d_l1 - d_l0));
        if (d_cdr != 0) d_nonzero++;
      end
      d_chk = 0;
    end
    if (d_err) d_elen++;
    if (!d_err && d_err_q) begin
      d_l0 = d_l1; d_l1 = d_elen; d_elen = 0; d_pulses++; d_chk = 1;
    end
    d_err_q = d_err;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    repeat (400_000) @(posedge clk);
    $display("P: %0d bursts; I: %0d pulses, final C_I %0d, %0d bursts cut short; D: %0d nonzero differences",
             p_bursts, i_pulses, i_ci, i_cut, d_nonzero);
    check(p_bursts > 50, "P bursts seen");
    check(i_cut > 0, "I bursts cut short by the next load");
    check(d_nonzero > 20, "D differences seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
