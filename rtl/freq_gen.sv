// freq_gen: programmable frequency source built as a phase accumulator.
//
// Each enabled clock cycle the accumulator adds fword. The carry out of the
// accumulator is registered into `tick`, a one-cycle strobe whose average rate
// is fword * f_clk / 2**PHASE_W; the accumulator MSB is a square wave `wave` of
// the same frequency and close to 50 % duty. The controller uses one instance
// per counting frequency (f_P, f_I, f_D, f_A: tick is the count enable of a
// counter) and one as the "convert to frequency" stage that turns the
// setpoint into the generated reference pulse train (wave).
// The document obtains these frequencies from crystals, 555 timers or VCOs;
// deriving them from one system clock is this design's choice.
// Timing: tick and wave change one clock after the accumulator wraps; when
// `en` is low the phase is held; `restart` clears the phase.
module freq_gen #(
  parameter int unsigned PHASE_W = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               restart,
  input  logic [PHASE_W-1:0] fword,
  output logic               tick,
  output logic               wave
);

  logic [PHASE_W-1:0] acc;
  logic [PHASE_W:0]   nxt;

  assign nxt  = {1'b0, acc} + {1'b0, fword};
  assign wave = acc[PHASE_W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      tick <= 1'b0;
    end else if (restart) begin
      acc  <= '0;
      tick <= 1'b0;
    end else if (en) begin
      acc  <= nxt[PHASE_W-1:0];
      tick <= nxt[PHASE_W];
    end else begin
      tick <= 1'b0;
    end
  end

endmodule
