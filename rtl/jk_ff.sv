// jk_ff: JK flip-flop that holds the controller's enable, called "Clr".
//
// The document gates every counter and the combined-counter FSM with "the JK
// flip-flop's clear" but does not say what drives J and K. Here J sets the
// output (start the controller), K clears it (stop), J and K together toggle,
// and neither holds, as in a standard JK flip-flop clocked by the system clock.
// Timing: q changes on the rising clock edge after J/K are sampled; an
// asynchronous active-low reset clears q.
module jk_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic j,
  input  logic k,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else begin
      unique case ({j, k})
        2'b00: q <= q;
        2'b01: q <= 1'b0;
        2'b10: q <= 1'b1;
        2'b11: q <= ~q;
      endcase
    end
  end

endmodule
