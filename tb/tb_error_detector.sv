// tb_error_detector: drives random reference and encoder levels and checks
// that err is their exclusive OR three clocks later (two synchroniser stages
// and the error register), with one-cycle rise/fall strobes.
module tb_error_detector;
  logic clk = 0, rst_n = 0, ref_in = 0, enc_in = 0;
  logic ref_s, enc_s, err, err_rise, err_fall;
  int checks = 0, failures = 0;
  logic e [0:2047];
  int rises = 0;

  error_detector dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic a, b;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2048; i++) begin
      if (i >= 4) begin
        checks++;
        if (err !== e[i-3]) begin failures++; $display("FAIL err at %0d", i); end
        checks++;
        if (err_rise !== (e[i-3] & ~e[i-4])) begin failures++; $display("FAIL rise at %0d", i); end
        checks++;
        if (err_fall !== (~e[i-3] & e[i-4])) begin failures++; $display("FAIL fall at %0d", i); end
        if (err_rise) rises++;
      end
      // slow-changing random pulse trains
      a = ($urandom_range(0, 3) == 0) ? ~ref_in : ref_in;
      b = ($urandom_range(0, 3) == 0) ? ~enc_in : enc_in;
      ref_in = a; enc_in = b;
      // Table: 00->0, 01->1, 10->1, 11->0
      e[i] = (a != b);
      @(negedge clk);
    end
    checks++; if (rises < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
