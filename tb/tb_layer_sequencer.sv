`timescale 1ps/1ps
// tb_layer_sequencer: a six-stage table (conv, pool, lrn, conv, conv,
// soft-max) run twice, with engines modelled here as done pulses after a
// random delay. Checks that each stage starts exactly its own engine, in
// table order, one at a time; that the source buffer alternates for every
// stage, the soft-max included; that the next stage starts only after
// the write-back gap; and that done pulses once at the end.
module tb_layer_sequencer;
  import zfnet_pkg::*;

  localparam int NS = 6;
  localparam stage_t [NS-1:0] TABLE = {
    softmax_stage(4),
    conv_stage(2, 1, 1, 1, 1, 0, 4, 1'b0, 40),
    conv_stage(3, 2, 2, 2, 1, 0, 2, 1'b1, 20),
    lrn_stage(3, 2, 2),
    pool_stage(3, 4, 4),
    conv_stage(1, 4, 4, 1, 1, 0, 3, 1'b1, 0)
  };
  localparam op_e OPS [NS] = '{OP_CONV, OP_POOL, OP_LRN, OP_CONV, OP_CONV, OP_SOFTMAX};

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done, src_bank;
  stage_t stage;
  logic [2:0] stage_idx;
  logic [3:0] eng_start, eng_done = '0;

  layer_sequencer #(.NUM_STAGES(NS), .STAGES(TABLE), .GAP(2)) dut (
    .clk, .rst_n, .start, .busy, .done, .stage, .stage_idx, .src_bank, .eng_start, .eng_done);

  always #5000 clk = ~clk;

  int launched = 0, dones = 0;
  logic exp_bank = 1'b0;
  int last_done_cycle = -100, cycle = 0;

  always @(negedge clk) begin
    cycle++;
    if (done) dones++;
    if (eng_start != 0) begin
      checks++;
      if (launched >= NS || eng_start != (4'b1 << OPS[launched % NS]) || int'(stage_idx) != launched % NS
          || stage.op != OPS[launched % NS]) begin
        failures++;
        $display("FAIL launch %0d: eng_start=%b idx=%0d", launched, eng_start, stage_idx);
      end
      checks++;
      if (src_bank != exp_bank) begin failures++; $display("FAIL launch %0d bank %b", launched, src_bank); end
      checks++;
      if (cycle - last_done_cycle < 3) begin failures++; $display("FAIL launch %0d inside gap", launched); end
      exp_bank = ~exp_bank;
      launched++;
      // Engine model: done after a random delay.
      fork
        begin
          automatic op_e op = stage.op;
          repeat ($urandom_range(1, 20)) @(negedge clk);
          eng_done[op] = 1'b1;
          last_done_cycle = cycle;
          @(negedge clk);
          eng_done[op] = 1'b0;
        end
      join_none
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      launched = 0;
      exp_bank = 1'b0;
      dones = 0;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      checks++; if (!busy) begin failures++; $display("FAIL not busy after start"); end
      while (busy) @(negedge clk);
      @(negedge clk);
      checks++; if (launched != NS) begin failures++; $display("FAIL %0d stages launched", launched); end
      checks++; if (dones != 1) begin failures++; $display("FAIL done pulsed %0d times", dones); end
      checks++;
      // Six stages, all writing a map: the last one is back in buffer 0.
      if (src_bank != 1'b0) begin failures++; $display("FAIL final bank %b", src_bank); end
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
