// adpid_top: all-digital PID (ADPID) controller for a system with a pulse
// encoder on its output.
//
// Data flow:
//   setpoint frequency word -> freq_gen -> generated reference pulse train
//   reference XOR encoder output (error_detector) -> error signal P
//   direction D: from an external comparator (dir_cmp) or from the digital
//   pulse-width direction_detector, chosen by dir_digital
//   P, D -> C_P (p_counter, rate f_P), C_I (i_counter, f_I), C_D (d_counter, f_D)
//   pid_adder: C_P + C_I + (C_D-R)
//   combined_ctrl + combined_counter: the sum is loaded into C_A when each
//   error pulse ends and counted to zero at f_A; OR of C_A = PWM, adder MSB =
//   PWM direction.
// Each gain is a ratio of counting frequencies, K_Z = f_Z / f_A (Z = P, I, D).
// The defaults are the document's inkjet-carriage design: f_P = 15 kHz,
// f_I = f_D = 10 Hz, f_A = 5 kHz (K_P = 3, K_I = K_D = 0.002), 4-bit counters.
// A 150 Hz reference (1 V at 150 pulses per volt) is selected by
// ref_fword = hz_to_fword(150, CLK_HZ, PHASE_W).
// All counting frequencies are clock-enable strobes derived from one system
// clock of CLK_HZ (1 MHz by default); that clock, the synchronisers on the
// inputs and the run-time choice of direction source are choices of this
// design. The JK flip-flop (start = J, stop = K) gates the whole controller.
// The analog comparator, the PWM amplifier/H-bridge and the plant are outside.
// ALIGN_TICKS (off by default, so the main configuration runs its counting
// clocks freely as the document's simulated design does) implements the
// improvement the document proposes: the counting clocks of C_P, C_I and C_D
// are restarted at each rising edge of the error, so the rising edge of the
// error is also a counting edge (the +/-1 load of C_P and C_D, one count of
// C_I) and later counts follow at whole periods of f_P, f_I and f_D.
// The reference generator's tick and the counting generators' square waves
// are not needed and are left unconnected on purpose.
// Timing: the PWM burst for an error pulse starts three clocks after the
// synchronised error falls (error register, C state, D state with load).
module adpid_top
  import adpid_pkg::*;
#(
  parameter longint unsigned CLK_HZ  = 1_000_000,
  parameter int unsigned     PHASE_W = 32,
  parameter int unsigned     W       = 4,
  parameter longint unsigned F_P_HZ  = 15_000,
  parameter longint unsigned F_I_HZ  = 10,
  parameter longint unsigned F_D_HZ  = 10,
  parameter longint unsigned F_A_HZ  = 5_000,
  parameter int unsigned     DIR_CNT_W = 16,
  parameter bit              ALIGN_TICKS = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,        // J of the enable flip-flop
  input  logic               stop,         // K of the enable flip-flop
  input  logic [PHASE_W-1:0] ref_fword,    // setpoint as reference frequency word
  input  logic               enc_in,       // encoder output pulse train
  input  logic               dir_cmp,      // direction from an external comparator
  input  logic               dir_digital,  // 1: use the digital direction detector
  output logic               ref_out,      // generated reference pulse train
  output logic               clr,          // controller enabled
  output logic               err,          // error signal P
  output logic               dir,          // error directional signal D in use
  output logic signed [W-1:0] cp,
  output logic signed [W-1:0] ci,
  output logic signed [W-1:0] cd,           // live derivative count C_D
  output logic signed [W-1:0] r,            // previous derivative count R
  output logic signed [W:0]   cdr,
  output logic signed [W+1:0] sum,
  output logic               sum_neg,      // adder MSB
  output ca_state_e          ca_state,     // combined-counter FSM state
  output logic               ca_load,      // combined-counter load strobe
  output logic signed [W-1:0] ca,
  output logic               pwm,          // PWM magnitude
  output logic               pwm_dir       // PWM direction, 1 = negative drive
);

  localparam logic [PHASE_W-1:0] FW_P = PHASE_W'(hz_to_fword(F_P_HZ, CLK_HZ, PHASE_W));
  localparam logic [PHASE_W-1:0] FW_I = PHASE_W'(hz_to_fword(F_I_HZ, CLK_HZ, PHASE_W));
  localparam logic [PHASE_W-1:0] FW_D = PHASE_W'(hz_to_fword(F_D_HZ, CLK_HZ, PHASE_W));
  localparam logic [PHASE_W-1:0] FW_A = PHASE_W'(hz_to_fword(F_A_HZ, CLK_HZ, PHASE_W));

  logic tick_p, tick_i, tick_d, tick_a;
  logic align, tick_i_cnt;
  logic ref_s, enc_s, err_rise, err_fall, dir_dig;
  logic ca_mux;

  // enable flip-flop
  jk_ff u_en (.clk, .rst_n, .j(start), .k(stop), .q(clr));

  // reference pulse train and counting frequencies
  freq_gen #(.PHASE_W(PHASE_W)) u_ref (
    .clk, .rst_n, .en(1'b1), .restart(1'b0), .fword(ref_fword), .tick(), .wave(ref_out));
  freq_gen #(.PHASE_W(PHASE_W)) u_fp (
    .clk, .rst_n, .en(1'b1), .restart(align), .fword(FW_P), .tick(tick_p), .wave());
  freq_gen #(.PHASE_W(PHASE_W)) u_fi (
    .clk, .rst_n, .en(1'b1), .restart(align), .fword(FW_I), .tick(tick_i), .wave());
  freq_gen #(.PHASE_W(PHASE_W)) u_fd (
    .clk, .rst_n, .en(1'b1), .restart(align), .fword(FW_D), .tick(tick_d), .wave());
  freq_gen #(.PHASE_W(PHASE_W)) u_fa (
    .clk, .rst_n, .en(1'b1), .restart(1'b0), .fword(FW_A), .tick(tick_a), .wave());

  // error signal P
  error_detector u_err (
    .clk, .rst_n, .ref_in(ref_out), .enc_in, .ref_s, .enc_s,
    .err, .err_rise, .err_fall);

  // Optional phase alignment of the P, I and D counting clocks: every error
  // pulse restarts their phase, so their next ticks fall whole periods after
  // the error edge, and the error edge itself is a counting edge for C_I.
  assign align      = ALIGN_TICKS & err_rise;
  assign tick_i_cnt = tick_i | align;

  // error directional signal D
  direction_detector #(.CNT_W(DIR_CNT_W)) u_dir (
    .clk, .rst_n, .tick(1'b1), .ref_s, .enc_s, .dir(dir_dig));
  assign dir = dir_digital ? dir_dig : dir_cmp;

  // P, I and D counters
  p_counter #(.W(W)) u_p (
    .clk, .rst_n, .clr, .err, .err_rise, .dir, .tick(tick_p), .cp);
  i_counter #(.W(W)) u_i (
    .clk, .rst_n, .clr, .err, .err_rise, .dir, .tick(tick_i_cnt), .ci);
  d_counter #(.W(W)) u_d (
    .clk, .rst_n, .clr, .err, .err_rise, .err_fall, .dir, .tick(tick_d),
    .cd, .r, .cdr);

  // adder and combined counter
  pid_adder #(.W(W)) u_add (.cp, .ci, .cdr, .sum, .neg(sum_neg));

  combined_ctrl u_ctl (
    .clk, .rst_n, .clr, .err, .state(ca_state), .load(ca_load), .mux_sel(ca_mux));

  combined_counter #(.W(W)) u_ca (
    .clk, .rst_n, .load(ca_load), .mux_sel(ca_mux), .sum, .tick(tick_a),
    .ca, .pwm, .pwm_dir);

endmodule
