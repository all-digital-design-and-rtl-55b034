// carriage_plant_model: behavioural (not synthesizable) model of the inkjet
// carriage drive with its linear encoder, for closed-loop simulation only.
//
// Plant: Y(s)/U(s) = GAIN / (s (s + POLE)), the document's carriage position
// model with the PWM amplitude and amplifier gain folded into GAIN (1947) and
// POLE = 47.579 1/s. The drive u is +1 while pwm is high with pwm_dir = 0,
// -1 while pwm is high with pwm_dir = 1, and 0 otherwise. The model is
// integrated with forward Euler once per clock of period DT_S seconds.
// Encoder: a pulse train whose frequency is PULSES_PER_UNIT * y Hz (150
// pulses per volt of output). Comparator: dir_cmp = 1 while the output is
// below the setpoint (counters count up), as the document's op-amp does.
// Outputs y_mv (output in millivolts) for the testbench to check.
module carriage_plant_model #(
  parameter real GAIN = 1947.0,
  parameter real POLE = 47.579,
  parameter real PULSES_PER_UNIT = 150.0,
  parameter real SETPOINT = 1.0,
  parameter real DT_S = 1.0e-6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pwm,
  input  logic pwm_dir,
  output logic enc_out,
  output logic dir_cmp,
  output int   y_mv
);
  real y = 0.0, v = 0.0, phase = 0.0, u;

  always @(posedge clk) begin
    if (!rst_n) begin
      y = 0.0; v = 0.0; phase = 0.0;
    end else begin
      u = pwm ? (pwm_dir ? -1.0 : 1.0) : 0.0;
      v = v + DT_S * (GAIN * u - POLE * v);
      y = y + DT_S * v;
      phase = phase + DT_S * PULSES_PER_UNIT * (y > 0.0 ? y : -y);
      if (phase >= 1.0) phase = phase - 1.0;
    end
    enc_out <= (phase >= 0.5);
    dir_cmp <= (y < SETPOINT);
    y_mv    <= int'(y * 1000.0);
  end
endmodule
