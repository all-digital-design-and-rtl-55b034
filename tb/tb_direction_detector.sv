// tb_direction_detector: drives the reference and encoder inputs with pulse
// trains of known pulse widths and checks the direction output.
// Directed part: square waves where the encoder pulses are longer than the
// reference pulses (system too slow, dir = 1), shorter (dir = 0), and equal
// (dir holds its last value).
// Random part: both trains get random high and low times (3 to 40 clocks,
// counting rate strobe always on). The testbench records the width of every
// completed high pulse itself and, after each falling edge, expects dir to
// follow the comparison of the latest reference and encoder widths (hold on
// a tie). dir is checked on every clock that is at least 3 clocks after the
// last falling edge (two register stages of the detector, plus margin).
module tb_direction_detector;
  logic clk = 0, rst_n = 0, tick = 1, ref_s = 0, enc_s = 0, dir;
  int checks = 0, failures = 0;
  int ref_half = 20, enc_half = 30;
  bit rnd = 0;

  direction_detector #(.CNT_W(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pulse-train drivers and the reference model of the direction
  int ref_left = 1, enc_left = 1, ref_len = 0, enc_len = 0;
  int ref_wid = 0, enc_wid = 0, since_fall = 100;
  logic dir_exp = 1'b1;

  function automatic int next_len(input int half);
    return rnd ? 3 + int'($urandom_range(37)) : half;
  endfunction

  always @(negedge clk) begin
    if (rst_n) begin
      bit ref_fell, enc_fell;
      ref_fell = 0; enc_fell = 0;
      since_fall++;
      ref_left--;
      if (ref_left == 0) begin
        if (ref_s) begin ref_wid = ref_len; ref_fell = 1; end
        ref_s = ~ref_s;
        ref_len = next_len(ref_half);
        ref_left = ref_len;
      end
      enc_left--;
      if (enc_left == 0) begin
        if (enc_s) begin enc_wid = enc_len; enc_fell = 1; end
        enc_s = ~enc_s;
        enc_len = next_len(enc_half);
        enc_left = enc_len;
      end
      if (ref_fell || enc_fell) begin
        since_fall = 0;
        if (enc_wid > ref_wid) dir_exp = 1'b1;
        else if (enc_wid < ref_wid) dir_exp = 1'b0;
      end
    end
  end

  task automatic expect_dir(input logic v, input string what);
    checks++;
    if (dir !== v) begin failures++; $display("FAIL %s: dir=%b", what, dir); end
  endtask

  int rnd_checks = 0, rnd_ups = 0, rnd_downs = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // encoder slower than reference
    repeat (400) @(negedge clk);
    expect_dir(1'b1, "slow encoder");
    // encoder faster than reference
    enc_half = 10;
    repeat (400) @(negedge clk);
    expect_dir(1'b0, "fast encoder");
    // equal widths: hold previous value (0)
    enc_half = 20;
    repeat (400) @(negedge clk);
    expect_dir(1'b0, "tie holds");
    enc_half = 35;
    repeat (400) @(negedge clk);
    expect_dir(1'b1, "slow again");
    enc_half = 20;
    repeat (400) @(negedge clk);
    expect_dir(1'b1, "tie holds 1");
    // random pulse widths against the model
    rnd = 1;
    repeat (100) @(negedge clk);
    for (int i = 0; i < 40_000; i++) begin
      @(negedge clk);
      #1;
      if (since_fall >= 3 && ref_wid > 0 && enc_wid > 0) begin
        expect_dir(dir_exp, $sformatf("random widths ref=%0d enc=%0d", ref_wid, enc_wid));
        rnd_checks++;
        if (dir_exp) rnd_ups++; else rnd_downs++;
      end
    end
    $display("random phase: %0d checks, %0d with dir=1, %0d with dir=0",
             rnd_checks, rnd_ups, rnd_downs);
    checks++;
    if (rnd_ups < 1000 || rnd_downs < 1000) begin
      failures++;
      $display("FAIL: random phase did not exercise both directions");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
