// tb_freq_gen: checks the phase-accumulator frequency source.
// A power-of-two increment must give exactly one tick every 2**PHASE_W/fword
// clocks and a square wave of that period; a non-power-of-two increment must
// give the exact long-run tick count; restart and en=0 must clear / hold.
module tb_freq_gen;
  localparam int unsigned PW = 16;
  logic clk = 0, rst_n = 0, en = 0, restart = 0;
  logic [PW-1:0] fword = '0;
  logic tick, wave;
  int checks = 0, failures = 0;

  freq_gen #(.PHASE_W(PW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, last, toggles;
    logic wprev;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // period 16
    fword = 16'h1000; en = 1;
    n = 0; last = -1;
    for (int c = 0; c < 1600; c++) begin
      @(negedge clk);
      if (tick) begin
        if (last >= 0) check(c - last == 16, $sformatf("tick spacing %0d", c - last));
        last = c; n++;
      end
    end
    check(n == 100, $sformatf("100 ticks expected, got %0d", n));
    // wave toggles every 8 clocks
    toggles = 0; wprev = wave;
    for (int c = 0; c < 160; c++) begin
      @(negedge clk);
      if (wave != wprev) toggles++;
      wprev = wave;
    end
    check(toggles == 20, $sformatf("wave toggles %0d", toggles));
    // 3/64 of the clock rate
    restart = 1; @(negedge clk); restart = 0;
    check(wave == 1'b0 && tick == 1'b0, "restart clears phase");
    n = 0;
    while (!tick && n < 100) begin @(negedge clk); n++; end
    check(n == 16, $sformatf("first tick %0d clocks after restart", n));
    fword = 16'h0C00; n = 0;
    for (int c = 0; c < 6400; c++) begin
      @(negedge clk);
      if (tick) n++;
    end
    check(n == 300, $sformatf("300 ticks expected, got %0d", n));
    // hold
    en = 0; n = 0;
    for (int c = 0; c < 200; c++) begin @(negedge clk); if (tick) n++; end
    check(n == 0, "no ticks while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
