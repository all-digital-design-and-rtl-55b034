// updown_counter: synchronous loadable two's-complement up/down counter.
//
// The behaviour follows the 4-bit synchronous up/down counter with parallel
// load that the document builds every ADPID counter from: a load has priority
// and copies load_val, otherwise each enabled clock steps the count up (up=1)
// or down (up=0). The document counts in two's complement. Where it would run
// past the most positive or most negative value the count stops at that limit
// (the document reports saturated counters); this saturation and the width
// parameter W are choices of this design.
// Timing: q changes on the rising clock edge; clear (synchronous, active high)
// forces 0 and beats load.
module updown_counter #(
  parameter int unsigned W = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                load,
  input  logic signed [W-1:0] load_val,
  input  logic                en,
  input  logic                up,
  output logic signed [W-1:0] q
);

  localparam logic signed [W-1:0] QMAX = {1'b0, {(W-1){1'b1}}};
  localparam logic signed [W-1:0] QMIN = {1'b1, {(W-1){1'b0}}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  q <= '0;
    else if (clear)              q <= '0;
    else if (load)               q <= load_val;
    else if (en && up && q != QMAX)  q <= q + 1'b1;
    else if (en && !up && q != QMIN) q <= q - 1'b1;
  end

endmodule
