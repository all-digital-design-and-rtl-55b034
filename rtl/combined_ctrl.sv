// combined_ctrl: control FSM of the combined counter C_A.
//
// Four states, coded as in the document's state diagram:
//   A (00) idle, multiplexer selects 0;
//   B (01) an error pulse is in progress;
//   C (11) the error pulse has just ended, multiplexer selects the adder;
//   D (10) between error pulses.
// Transitions (clr is the JK flip-flop enable, err the error signal P):
//   any state goes to A when clr=0;
//   A -> B on clr=1, err=1;       B stays while err=1, B -> C on err=0;
//   C -> D on clr=1, whatever err; D stays while err=0, D -> B on err=1.
// The state diagram marks the load output active in B and D. The document's
// text asks for a load lasting one clock, once at the very first error (the
// multiplexer then still selects 0, so C_A is initialised to 0) and once
// after every error pulse ends (the multiplexer now selects the adder). This
// module therefore strobes `load` for one clock on entering B from A and on
// entering D from C; entering B from D does not load, so C_A keeps counting
// through the next error pulse as the document's combined-counter table says.
// In B and D the multiplexer keeps the select it had in the state before.
// Timing: `load` is high in the first clock of B or D, i.e. one clock after the
// err change for B and two clocks after the end of the error pulse for D.
module combined_ctrl
  import adpid_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clr,
  input  logic      err,
  output ca_state_e state,
  output logic      load,
  output logic      mux_sel   // 0: load zero, 1: load adder sum
);

  ca_state_e state_n, prev;
  logic      mux_q;

  always_comb begin
    state_n = state;
    if (!clr) state_n = ST_A;
    else begin
      unique case (state)
        ST_A: state_n = err ? ST_B : ST_A;
        ST_B: state_n = err ? ST_B : ST_C;
        ST_C: state_n = ST_D;
        ST_D: state_n = err ? ST_B : ST_D;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_A;
      prev  <= ST_A;
      mux_q <= 1'b0;
    end else begin
      state <= state_n;
      prev  <= state;
      if (state == ST_A) mux_q <= 1'b0;
      else if (state == ST_C) mux_q <= 1'b1;
    end
  end

  assign mux_sel = (state == ST_A) ? 1'b0 : (state == ST_C) ? 1'b1 : mux_q;
  assign load    = ((state == ST_B) && (prev == ST_A)) ||
                   ((state == ST_D) && (prev == ST_C));

endmodule
