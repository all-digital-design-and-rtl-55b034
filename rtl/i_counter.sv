// i_counter: integral term counter C_I of the ADPID.
//
// While the controller is enabled (clr=1) and the error signal P is high, C_I
// counts at the integral rate f_I in the direction of D (up for dir=1). It is
// loaded with +1 or -1 only at the first error pulse after being enabled;
// after that it never restarts: it holds its value while P is low and goes on
// from there at the next error pulse, so it accumulates the signed error time.
// With clr=0 it is held at zero and the next error is again a first error.
// Gain: K_I = f_I / f_A. Load-once, count and hold follow the document; the
// clearing while disabled is a choice here.
// Timing: ci reflects a load or step one clock after err_rise / tick.
module i_counter #(
  parameter int unsigned W = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic                err,
  input  logic                err_rise,
  input  logic                dir,
  input  logic                tick,     // f_I strobe
  output logic signed [W-1:0] ci
);

  logic load, en, started;
  logic signed [W-1:0] load_val;

  assign load     = clr & err_rise & ~started;
  assign load_val = dir ? W'(1) : {W{1'b1}};
  assign en       = clr & err & tick & ~load;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    started <= 1'b0;
    else if (!clr) started <= 1'b0;
    else if (load) started <= 1'b1;
  end

  updown_counter #(.W(W)) u_cnt (
    .clk, .rst_n, .clear(~clr), .load, .load_val, .en, .up(dir), .q(ci)
  );

endmodule
