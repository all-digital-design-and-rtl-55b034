// adpid_pkg: types and helpers shared by the all-digital PID (ADPID) controller.
//
// The combined-counter control FSM uses the four states A, B, C and D with the
// two-bit codes 00, 01, 11 and 10 of its state diagram. hz_to_fword converts a
// frequency in Hz into the phase increment of a freq_gen phase accumulator:
// fword = f_hz * 2**phase_w / clk_hz, rounded to nearest. The rounding and the
// phase-accumulator approach are choices of this implementation.
package adpid_pkg;

  // Combined-counter control states (codes as in the state diagram).
  typedef enum logic [1:0] {
    ST_A = 2'b00,  // idle: no load, multiplexer selects 0
    ST_B = 2'b01,  // error high: load strobe (first error loads 0)
    ST_C = 2'b11,  // error just ended: multiplexer selects the adder
    ST_D = 2'b10   // error low: load strobe (adder sum into C_A)
  } ca_state_e;

  function automatic longint unsigned hz_to_fword(input longint unsigned f_hz,
                                                  input longint unsigned clk_hz,
                                                  input int unsigned phase_w);
    longint unsigned num;
    num = f_hz << phase_w;
    return (num + clk_hz / 2) / clk_hz;
  endfunction

endpackage
