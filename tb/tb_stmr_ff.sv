`timescale 1ps/1ps
// tb_stmr_ff: loads random data into the TMR flip-flop, injects single-copy
// upsets and checks that q never shows them. Upsets are injected into
// different copies on consecutive edges with the enable low, which only a
// cell that scrubs (reloads every copy with the voted value) survives.
module tb_stmr_ff;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, d = 1'b0;
  logic [2:0] upset = 3'b000;
  logic q;

  stmr_ff dut (.clk, .rst_n, .en, .d, .upset, .q);

  always #5000 clk = ~clk;

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s at %0t: q=%b expected %b", what, $time, q, exp);
    end
  endtask

  initial begin
    logic val;
    repeat (2) @(posedge clk);
    check(1'b0, "reset");
    @(negedge clk) rst_n = 1'b1;
    val = 1'b0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      // Load a new value.
      en = 1'b1; d = 1'($urandom); val = d; upset = 3'b000;
      @(negedge clk);
      check(val, "load");
      en = 1'b0; d = ~val;
      // Upset copy a, then copy b on the next edge, then copy c.
      for (int k = 0; k < 3; k++) begin
        upset = 3'b001 << ((n + k) % 3);
        @(negedge clk);
        check(val, "single upset");
      end
      upset = 3'b000;
      @(negedge clk);
      check(val, "after scrubbing");
      // An upset on the edge that loads new data must not matter either.
      en = 1'b1; d = ~val; val = ~val; upset = 3'b100;
      @(negedge clk);
      check(val, "upset during load");
      en = 1'b0; upset = 3'b000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
