// p_counter: proportional term counter C_P of the ADPID.
//
// While the controller is enabled (clr=1) and the error signal P is high, C_P
// counts at the proportional rate f_P (one step per tick) in the direction of
// the error directional signal D: up for dir=1, down for dir=0. At the start
// of every error pulse it restarts from +1 (dir=1) or -1 (dir=0), the value
// its load multiplexer offers, so the count measures the width of the latest
// error pulse only. While P is low it stops and holds that count for the
// adder. With clr=0 the counter is held at zero.
// Gain: K_P = f_P / f_A. Restart, count and hold follow the document; clearing
// to zero while disabled and taking the restart on the system clock at the
// error's rising edge (rather than on the next f_P edge) are choices here.
// Timing: cp reflects a load or step one clock after err_rise / tick.
module p_counter #(
  parameter int unsigned W = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,      // enable from the JK flip-flop
  input  logic                err,      // error signal P
  input  logic                err_rise, // first cycle of an error pulse
  input  logic                dir,      // error directional signal D
  input  logic                tick,     // f_P strobe
  output logic signed [W-1:0] cp
);

  logic load, en;
  logic signed [W-1:0] load_val;

  assign load     = clr & err_rise;
  assign load_val = dir ? W'(1) : {W{1'b1}};   // +1 or -1
  assign en       = clr & err & tick & ~load;

  updown_counter #(.W(W)) u_cnt (
    .clk, .rst_n, .clear(~clr), .load, .load_val, .en, .up(dir), .q(cp)
  );

endmodule
