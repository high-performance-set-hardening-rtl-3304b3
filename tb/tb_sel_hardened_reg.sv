`timescale 1ps/1ps
// tb_sel_hardened_reg: two 8-bit registers with the same per-bit sensitivity
// profile, one capped at 300 ps of filtering, one at 600 ps. Transients of
// 200 to 550 ps (including the 200/300/400/500 ps set of the SET
// analysis) are driven onto the D lines so that they span a capturing
// clock edge (they end 20 ps after it). The expected outcome per bit is
// worked out here from the hardening rule: a bit is filtered only if its
// expected pulse exceeds 450 ps; its filter delay is that pulse capped at the
// maximum, realised with an even number of 50 ps inverters; a transient of
// width W is captured unless the filter delay is at least W - 20 ps. Also
// checks plain data loads and that new data reaches q one clock after en.
module tb_sel_hardened_reg;
  localparam int unsigned W = 8;
  localparam int unsigned PULSES [W] = '{0, 300, 460, 500, 600, 700, 455, 400};
  localparam int PERIOD = 12724;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] d = '0, strike = '0;
  logic [W-1:0] q300, q600;

  sel_hardened_reg #(.WIDTH(W), .PULSE_PS(PULSES), .MAX_FILTER_PS(300)) dut300 (
    .clk, .rst_n, .en, .d, .strike, .q(q300));
  sel_hardened_reg #(.WIDTH(W), .PULSE_PS(PULSES), .MAX_FILTER_PS(600)) dut600 (
    .clk, .rst_n, .en, .d, .strike, .q(q600));

  always #(PERIOD/2) clk = ~clk;

  function automatic int filt_delay(int unsigned pulse, int unsigned cap);
    int dl, n;
    if (pulse <= 450) return 0;
    dl = (pulse > cap) ? cap : pulse;
    n = dl / 50 + ((dl % 50) ? 1 : 0);
    n += n & 1;
    return n * 50;
  endfunction

  function automatic logic [W-1:0] captured_mask(int width, int unsigned cap);
    logic [W-1:0] m;
    for (int i = 0; i < W; i++) m[i] = !(filt_delay(PULSES[i], cap) >= width - 20);
    return m;
  endfunction

  int strikes_blocked = 0, strikes_captured = 0;
  int widths [6] = '{200, 250, 300, 400, 500, 550};

  initial begin
    logic [W-1:0] val;

    repeat (2) @(posedge clk);
    checks++; if (q300 !== '0 || q600 !== '0) begin failures++; $display("FAIL reset"); end
    @(negedge clk) rst_n = 1'b1;
    en = 1'b1;
    for (int n = 0; n < 48; n++) begin
      logic [W-1:0] exp300, exp600;
      int wdt;
      @(negedge clk);
      val = W'($urandom);
      d = val;
      @(negedge clk);   // loaded at the edge in between
      checks++;
      if (q300 !== val || q600 !== val) begin
        failures++; $display("FAIL load %h: %h %h", val, q300, q600);
      end
      // Transient on every D line, ending 20 ps after the next rising edge.
      wdt = widths[n % 6];
      #(PERIOD/2 - wdt + 20) strike = '1;
      #(wdt) strike = '0;
      @(negedge clk);
      exp300 = val ^ captured_mask(wdt, 300);
      exp600 = val ^ captured_mask(wdt, 600);
      checks++;
      if (q300 !== exp300) begin
        failures++; $display("FAIL %0d ps strike, cap 300: q=%b expected %b", wdt, q300, exp300);
      end
      checks++;
      if (q600 !== exp600) begin
        failures++; $display("FAIL %0d ps strike, cap 600: q=%b expected %b", wdt, q600, exp600);
      end
      strikes_blocked  += $countones(~captured_mask(wdt, 300)) + $countones(~captured_mask(wdt, 600));
      strikes_captured += $countones(captured_mask(wdt, 300)) + $countones(captured_mask(wdt, 600));
    end
    // Hold: with en low the register keeps its value whatever d does.
    en = 1'b0;
    val = q300;
    d = ~val;
    repeat (3) @(negedge clk);
    checks++; if (q300 !== val) begin failures++; $display("FAIL hold"); end
    checks++;
    if (strikes_blocked == 0 || strikes_captured == 0) begin
      failures++; $display("FAIL strike outcomes not both exercised");
    end
    $display("strikes blocked by filters: %0d, captured: %0d", strikes_blocked, strikes_captured);
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
