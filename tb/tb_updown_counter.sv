// tb_updown_counter: random load/enable/direction/clear sequences on a 4-bit
// counter, compared every clock with an integer model that saturates at -8
// and +7.
module tb_updown_counter;
  logic clk = 0, rst_n = 0, clear = 0, load = 0, en = 0, up = 0;
  logic signed [3:0] load_val = '0, q;
  int checks = 0, failures = 0, model = 0, sat_hits = 0;

  updown_counter dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      clear    = ($urandom_range(0, 99) == 0);
      load     = ($urandom_range(0, 29) == 0);
      load_val = 4'($urandom_range(0, 15));
      en       = ($urandom_range(0, 3) != 0);
      up       = (i % 200) < 100 ? ($urandom_range(0, 4) != 0) : ($urandom_range(0, 4) == 0);
      if (clear) model = 0;
      else if (load) model = int'(load_val);
      else if (en && up) begin if (model < 7) model++; else sat_hits++; end
      else if (en) begin if (model > -8) model--; else sat_hits++; end
      @(negedge clk);
      checks++;
      if (int'(q) != model) begin failures++; $display("FAIL %0d: q=%0d exp=%0d", i, q, model); end
    end
    checks++; if (sat_hits == 0) begin failures++; $display("FAIL no saturation seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
