`timescale 1ps/1ps
// tb_set_filter: drives transients of chosen widths into a 300 ps filter
// (6 inverters of 50 ps) and watches its output every 10 ps. A transient
// no wider than the chain delay (200, 280, 300 ps) must never appear at the output; a wider one
// (400, 500 ps) passes whole, one chain delay late; a real data change appears exactly one chain
// delay later. A second instance with no inverters must pass d straight on.
module tb_set_filter;
  int checks = 0, failures = 0;

  logic d = 1'b0;
  logic y, y0;

  set_filter #(.N_INV(6), .T_INV_PS(50)) dut  (.d(d), .y(y));
  set_filter #(.N_INV(0), .T_INV_PS(50)) dut0 (.d(d), .y(y0));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $time, got, exp);
    end
  endtask

  // Pulse d to ~d for width ps, sampling y every 10 ps for window ps after
  // the start; count samples where y left the value d held before.
  task automatic pulse(input int width, input int window, output int seen);
    logic base;
    base = d;
    seen = 0;
    fork
      begin d = ~base; #(width) d = base; end
      begin
        for (int t = 0; t < window; t += 10) begin
          #10;
          if (y !== base) seen++;
        end
      end
    join
  endtask

  initial begin
    int seen;
    #1000;
    check(y, 1'b0, "quiet output");

    // 200 ps transient against a 300 ps filter: fully blocked.
    pulse(200, 1000, seen);
    checks++; if (seen != 0) begin failures++; $display("FAIL 200 ps pulse leaked (%0d samples)", seen); end

    // 280 ps: still blocked.
    pulse(280, 1000, seen);
    checks++; if (seen != 0) begin failures++; $display("FAIL 280 ps pulse leaked (%0d samples)", seen); end

    // 300 ps, equal to the filter delay: the delayed copy rises exactly as
    // the input falls back, so the two never agree on the wrong value.
    pulse(300, 1000, seen);
    checks++; if (seen != 0) begin failures++; $display("FAIL 300 ps pulse leaked (%0d samples)", seen); end

    // 400 ps: wider than the filter, passes whole.
    pulse(400, 1100, seen);
    checks++; if (seen < 38 || seen > 42) begin failures++; $display("FAIL 400 ps pulse seen %0d samples", seen); end

    // 500 ps: wider than the filter, so it passes whole (delayed by 300 ps).
    pulse(500, 1200, seen);
    checks++; if (seen < 48 || seen > 52) begin failures++; $display("FAIL 500 ps pulse seen %0d samples", seen); end

    // Holding value 1: a negative 250 ps transient is blocked too.
    d = 1'b1; #1000;
    check(y, 1'b1, "steady one");
    pulse(250, 1000, seen);
    checks++; if (seen != 0) begin failures++; $display("FAIL negative pulse leaked (%0d samples)", seen); end

    // A real change 1 -> 0 reaches y after the 300 ps chain delay.
    d = 1'b0;
    #290; check(y, 1'b1, "change not before delay");
    #20;  check(y, 1'b0, "change after delay");

    // Unfiltered instance follows d immediately.
    d = 1'b1; #1; check(y0, 1'b1, "no-filter instance rise");
    d = 1'b0; #1; check(y0, 1'b0, "no-filter instance fall");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
