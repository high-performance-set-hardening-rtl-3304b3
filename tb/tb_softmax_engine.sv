`timescale 1ps/1ps
// tb_softmax_engine: soft-max over random score vectors (wide-range,
// negative-only, narrow-range and vectors with repeated maxima, where the
// lowest index must win). The winning index and score must match a reference
// arg-max exactly; every written probability must be within 4 LSB + 1 % of
// a floating-point soft-max, go to addresses 0 .. n-1 in order, and the
// probabilities must sum to 1 within 1 %. Checks 3n + 2 cycles from start to
// done.
module tb_softmax_engine;
  import zfnet_pkg::*;
  import tb_ref_pkg::*;

  localparam int FAW = 12;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  stage_t cfg;
  logic busy, done, wr_en;
  logic [FAW-1:0] f_raddr, wr_addr;
  data_t f_rdata, wr_data, class_score;
  logic [CH_W-1:0] class_idx;
  int fmem [];
  int probs [];
  int nwr = 0, n_cur = 0;
  longint psum = 0;

  softmax_engine #(.FAW(FAW)) dut (.clk, .rst_n, .start, .cfg, .busy, .done,
    .f_raddr, .f_rdata, .wr_en, .wr_addr, .wr_data, .class_idx, .class_score);

  always #5000 clk = ~clk;
  always_ff @(posedge clk) f_rdata <= data_t'(fmem[f_raddr]);

  always @(negedge clk) if (wr_en) begin
    checks++;
    if (int'(wr_addr) != nwr || nwr >= n_cur) begin
      failures++; $display("FAIL write %0d to address %0d", nwr, wr_addr);
    end else if (!prob_close(int'(wr_data), probs[nwr])) begin
      failures++; $display("FAIL p[%0d] = %0d expected %0d", nwr, wr_data, probs[nwr]);
    end
    psum += longint'(wr_data);
    nwr++;
  end

  int ties = 0;

  task automatic run(input int n, input int lo, input int hi, input bit tie);
    int idx, best, cycles;
    fmem = new[1 << FAW];
    foreach (fmem[i]) fmem[i] = int'($urandom_range(0, hi - lo)) + lo;
    if (tie) begin
      ref_argmax(fmem, n, idx, best);
      fmem[n - 1] = best;               // a later copy of the maximum
      if (idx > 0) fmem[idx - 1] = best; // and an earlier one
      ties++;
    end
    ref_argmax(fmem, n, idx, best);
    ref_softmax(fmem, n, probs);
    n_cur = n;
    nwr = 0;
    psum = 0;
    cfg = softmax_stage(n);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    @(negedge clk);
    checks++;
    if (int'(class_idx) != idx || int'(class_score) != best) begin
      failures++;
      $display("FAIL n=%0d: got %0d/%0d expected %0d/%0d", n, class_idx, class_score, idx, best);
    end
    checks++;
    if (cycles != 3*n + 2) begin failures++; $display("FAIL cycles %0d expected %0d", cycles, 3*n + 2); end
    checks++;
    if (nwr != n) begin failures++; $display("FAIL %0d probabilities written, expected %0d", nwr, n); end
    checks++;
    if (psum < 32768 - 328 - 2*n || psum > 32768 + 328) begin
      failures++; $display("FAIL probabilities sum to %0d / 32768 (n=%0d)", psum, n);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 20; r++) begin
      run(int'($urandom_range(1, 1000)), -32768, 32767, 1'b0);
      run(int'($urandom_range(2, 50)), -32768, -100, 1'b0);
      run(int'($urandom_range(2, 1000)), -1024, 1024, 1'b0);
      run(int'($urandom_range(3, 200)), -500, 500, 1'b1);
    end
    checks++;
    if (ties == 0) begin failures++; $display("FAIL no ties exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
