// d_counter: derivative term counter C_D of the ADPID with its register R.
//
// C_D behaves like the proportional counter: at each error pulse it restarts
// from +1 or -1 and counts at the derivative rate f_D in the direction of D
// while P is high. When the error pulse ends, the count of the previous pulse,
// held in the register R (a bank of D flip-flops), is subtracted from the new
// count; the difference C_D-R is held in `cdr` for the adder, and R is
// refreshed with the new count. cdr is thus the change of the error measure
// from one error pulse to the next.
// Gain: K_D = f_D / f_A. The sequence follows the document; the sign (new
// count minus previous count), the W+1 bit width of the difference (so it
// cannot overflow) and the clearing while disabled are choices here.
// Timing: cdr and R change on the clock edge that ends the cycle of err_fall.
module d_counter #(
  parameter int unsigned W = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic                err,
  input  logic                err_rise,
  input  logic                err_fall,
  input  logic                dir,
  input  logic                tick,     // f_D strobe
  output logic signed [W-1:0] cd,       // live count C_D
  output logic signed [W-1:0] r,        // previous count (register R)
  output logic signed [W:0]   cdr       // C_D - R, held
);

  logic load, en;
  logic signed [W-1:0] load_val;

  assign load     = clr & err_rise;
  assign load_val = dir ? W'(1) : {W{1'b1}};
  assign en       = clr & err & tick & ~load;

  updown_counter #(.W(W)) u_cnt (
    .clk, .rst_n, .clear(~clr), .load, .load_val, .en, .up(dir), .q(cd)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r   <= '0;
      cdr <= '0;
    end else if (!clr) begin
      r   <= '0;
      cdr <= '0;
    end else if (err_fall) begin
      cdr <= (W+1)'(cd) - (W+1)'(r);
      r   <= cd;
    end
  end

endmodule
