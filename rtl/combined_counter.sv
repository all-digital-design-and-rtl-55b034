// combined_counter: combined counter C_A and PWM output of the ADPID.
//
// On a load strobe C_A takes either 0 (mux_sel=0, first error) or the adder
// sum C_P + C_I + (C_D-R) (mux_sel=1), limited to the counter's W-bit range.
// Afterwards it counts towards zero at the combined rate f_A: down when the
// value is positive, up when it is negative (MSB set), and stops at zero. A
// new load interrupts a count that has not finished. The OR of all bits of C_A
// is the PWM magnitude: the output is high for |sum| periods of f_A after
// each error pulse. The PWM direction is the adder's MSB taken at the load
// (1 = negative drive), held until the next load.
// Limiting the sum to W bits and latching the direction at the load are
// choices of this design; counting to zero, the OR gate and the direction from
// the adder MSB follow the document.
// Timing: ca, pwm and pwm_dir change one clock after the load strobe / tick.
module combined_counter #(
  parameter int unsigned W = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic                mux_sel,
  input  logic signed [W+1:0] sum,
  input  logic                tick,     // f_A strobe
  output logic signed [W-1:0] ca,
  output logic                pwm,
  output logic                pwm_dir
);

  localparam logic signed [W+1:0] SMAX = (W+2)'({1'b0, {(W-1){1'b1}}});
  localparam logic signed [W+1:0] SMIN = -SMAX - 1;

  logic signed [W-1:0] sat_sum, load_val;

  always_comb begin
    if (sum > SMAX)      sat_sum = SMAX[W-1:0];
    else if (sum < SMIN) sat_sum = SMIN[W-1:0];
    else                 sat_sum = sum[W-1:0];
  end

  assign load_val = mux_sel ? sat_sum : '0;

  updown_counter #(.W(W)) u_cnt (
    .clk, .rst_n, .clear(1'b0), .load, .load_val,
    .en(tick && ca != '0), .up(ca[W-1]), .q(ca)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    pwm_dir <= 1'b0;
    else if (load) pwm_dir <= mux_sel & sum[W+1];
  end

  assign pwm = |ca;

endmodule
