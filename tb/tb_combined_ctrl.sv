// tb_combined_ctrl: walks the combined-counter control FSM through every
// transition of its state diagram and checks the state codes, the one-clock
// load strobes (first error with select 0, end of each error with select 1)
// and the return to idle when the enable is removed. A random phase then
// compares the state with a table-driven model.
module tb_combined_ctrl;
  import adpid_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, err = 0;
  ca_state_e state;
  logic load, mux_sel;
  int checks = 0, failures = 0;

  combined_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic go(input logic c, input logic e, input ca_state_e st,
                    input logic ld, input logic mx, input bit check_mx);
    clr = c; err = e;
    @(negedge clk);
    checks++;
    if (state !== st || load !== ld || (check_mx && mux_sel !== mx)) begin
      failures++;
      $display("FAIL clr=%b err=%b: state=%b load=%b mux=%b, exp %b %b %b",
               c, e, state, load, mux_sel, st, ld, mx);
    end
  endtask

  initial begin
    ca_state_e ms, mprev;
    logic mload;
    repeat (2) @(negedge clk);
    rst_n = 1;
    go(0, 1, ST_A, 0, 0, 1);   // disabled: stay in A
    go(1, 0, ST_A, 0, 0, 1);   // no error: stay in A
    go(1, 1, ST_B, 1, 0, 1);   // first error: load 0
    go(1, 1, ST_B, 0, 0, 1);   // one-clock strobe
    go(1, 0, ST_C, 0, 1, 1);   // error ends
    go(1, 0, ST_D, 1, 1, 1);   // load adder sum
    go(1, 0, ST_D, 0, 1, 1);
    go(1, 1, ST_B, 0, 1, 1);   // next error: no load, keep counting
    go(1, 0, ST_C, 0, 1, 1);
    go(1, 1, ST_D, 1, 1, 1);   // C -> D also with err=1
    go(1, 1, ST_B, 0, 1, 1);
    go(0, 1, ST_A, 0, 0, 1);   // disable from B
    go(1, 1, ST_B, 1, 0, 1);
    go(1, 0, ST_C, 0, 1, 1);
    go(0, 0, ST_A, 0, 0, 1);   // disable from C
    go(1, 1, ST_B, 1, 0, 1);
    go(1, 0, ST_C, 0, 1, 1);
    go(1, 0, ST_D, 1, 1, 1);
    go(0, 1, ST_A, 0, 0, 1);   // disable from D
    // random walk against the transition table
    ms = ST_A;
    mprev = ST_A;
    for (int i = 0; i < 2000; i++) begin
      logic c, e;
      c = ($urandom_range(0, 19) != 0);
      e = ($urandom_range(0, 2) == 0);
      mprev = ms;
      if (!c) ms = ST_A;
      else case (ms)
        ST_A: ms = e ? ST_B : ST_A;
        ST_B: ms = e ? ST_B : ST_C;
        ST_C: ms = ST_D;
        ST_D: ms = e ? ST_B : ST_D;
      endcase
      mload = (ms == ST_B && mprev == ST_A) || (ms == ST_D && mprev == ST_C);
      go(c, e, ms, mload, 0, 0);
      mprev = ms;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
