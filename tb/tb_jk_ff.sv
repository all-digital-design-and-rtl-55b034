// tb_jk_ff: checks hold, reset, set and toggle of the enable JK flip-flop
// against the JK truth table, from random J/K sequences.
module tb_jk_ff;
  logic clk = 0, rst_n = 0, j = 0, k = 0, q;
  logic model;
  int checks = 0, failures = 0;

  jk_ff dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    checks++; if (q !== 1'b0) failures++;
    rst_n = 1; model = 0;
    for (int i = 0; i < 400; i++) begin
      j = 1'($urandom_range(0, 1)); k = 1'($urandom_range(0, 1));
      if (i < 4) begin j = i[1]; k = i[0]; end
      case ({j, k})
        2'b01: model = 0;
        2'b10: model = 1;
        2'b11: model = ~model;
        default: ;
      endcase
      @(negedge clk);
      checks++;
      if (q !== model) begin failures++; $display("FAIL j=%b k=%b q=%b exp=%b", j, k, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
