// direction_detector: all-digital error directional signal D.
//
// Two counters run at the same rate (one count per `tick`). One measures the
// length of each high pulse of the generated reference, the other the length of
// each high pulse of the encoder output. When a pulse ends its length is
// latched. A longer pulse means a lower frequency, so when the latched encoder
// pulse is longer than the latched reference pulse the system is too slow and
// dir is set to 1 (counters count up); when it is shorter dir is 0 (count
// down); equal lengths keep the previous direction.
// The document describes this comparison of pulse widths with two equal-rate
// counters as the digital alternative to an analog comparator; the width
// CNT_W, saturation of the width counters and the tie rule are choices here.
// Timing: dir updates the clock after a falling edge of either input.
module direction_detector #(
  parameter int unsigned CNT_W = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,    // counting rate strobe
  input  logic ref_s,   // synchronised generated reference
  input  logic enc_s,   // synchronised encoder output
  output logic dir      // 1: count up (output below reference), 0: count down
);

  logic [CNT_W-1:0] ref_cnt, enc_cnt, ref_w, enc_w;
  logic ref_d, enc_d, upd;

  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_cnt <= '0; enc_cnt <= '0;
      ref_w   <= '0; enc_w   <= '0;
      ref_d   <= 1'b0; enc_d <= 1'b0;
      upd     <= 1'b0;
    end else begin
      ref_d <= ref_s;
      enc_d <= enc_s;
      upd   <= 1'b0;
      // reference pulse width
      if (ref_s && !ref_d)                        ref_cnt <= '0;
      else if (ref_s && tick && ref_cnt != CNT_MAX) ref_cnt <= ref_cnt + 1'b1;
      if (!ref_s && ref_d) begin ref_w <= ref_cnt; upd <= 1'b1; end
      // encoder pulse width
      if (enc_s && !enc_d)                        enc_cnt <= '0;
      else if (enc_s && tick && enc_cnt != CNT_MAX) enc_cnt <= enc_cnt + 1'b1;
      if (!enc_s && enc_d) begin enc_w <= enc_cnt; upd <= 1'b1; end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    dir <= 1'b1;
    else if (upd && enc_w > ref_w) dir <= 1'b1;
    else if (upd && enc_w < ref_w) dir <= 1'b0;
  end

endmodule
