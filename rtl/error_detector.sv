// error_detector: forms the ADPID error signal P from two pulse trains.
//
// The generated reference (the encoder output the system should produce) and
// the real encoder output are first brought into the clock domain by
// SYNC_STAGES flip-flops each. Their exclusive OR is the error signal: it is 1
// while the two trains disagree, 0 while they agree, as the document's EXOR
// truth table gives. The error is registered, and one-cycle strobes mark its
// rising and falling edges for the counter controls.
// The synchronisers and edge strobes are this design's additions.
// Timing: err follows the inputs by SYNC_STAGES+1 clocks; err_rise/err_fall
// are high in the first cycle that err is 1 / 0 after a change.
module error_detector #(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ref_in,    // generated reference pulse train
  input  logic enc_in,    // encoder output pulse train (asynchronous)
  output logic ref_s,     // synchronised reference
  output logic enc_s,     // synchronised encoder output
  output logic err,       // error signal P
  output logic err_rise,
  output logic err_fall
);

  logic [SYNC_STAGES-1:0] ref_sync, enc_sync;
  logic err_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_sync <= '0;
      enc_sync <= '0;
      err      <= 1'b0;
      err_d    <= 1'b0;
    end else begin
      ref_sync <= {ref_sync[SYNC_STAGES-2:0], ref_in};
      enc_sync <= {enc_sync[SYNC_STAGES-2:0], enc_in};
      err      <= ref_sync[SYNC_STAGES-1] ^ enc_sync[SYNC_STAGES-1];
      err_d    <= err;
    end
  end

  assign ref_s    = ref_sync[SYNC_STAGES-1];
  assign enc_s    = enc_sync[SYNC_STAGES-1];
  assign err_rise = err & ~err_d;
  assign err_fall = ~err & err_d;

endmodule
