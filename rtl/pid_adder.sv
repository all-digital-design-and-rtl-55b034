// pid_adder: adds the three ADPID terms, C_P + C_I + (C_D-R).
//
// Purely combinational, like the cascaded 4-bit binary adders of the
// document: the sum follows the counters as they change. The result is
// W+2 bits wide so that the sum of two W-bit and one (W+1)-bit two's
// complement value can never overflow; its most significant bit `neg` is the
// sign, which sets the counting and PWM direction of the combined counter.
// The widening is a choice of this design.
module pid_adder #(
  parameter int unsigned W = 4
) (
  input  logic signed [W-1:0] cp,
  input  logic signed [W-1:0] ci,
  input  logic signed [W:0]   cdr,
  output logic signed [W+1:0] sum,
  output logic                neg
);

  assign sum = (W+2)'(cp) + (W+2)'(ci) + (W+2)'(cdr);
  assign neg = sum[W+1];

endmodule
