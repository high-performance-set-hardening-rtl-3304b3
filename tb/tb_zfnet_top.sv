`timescale 1ps/1ps
// tb_zfnet_top: end-to-end run of the hardened CNN circuit on a small network
// with every stage kind of ZFNet: a padded stride-2 convolution with
// rectification, 3x3 stride-2 pooling with clipped edge windows, normalisation
// across maps, a padded 3x3 convolution, two fully-connected layers and the
// soft-max classification. The clock runs at 78.59 MHz (12.724 ns).
//
// Three inferences of the same image:
//   1. no transients: every write-back of every stage must match the reference
//      model (the soft-max probabilities within 4 LSB + 1 %), the
//      probabilities read back and the class must match;
//   2. a 250 ps transient on all filtered write-back bits at every write: the
//      300 ps filters must block all of them, results identical to run 1;
//   3. one 250 ps transient on unfiltered bit 0 at the last write of the last
//      fully-connected layer: exactly that word must come out with bit 0
//      flipped.
// Mechanisms counted (each must occur): zero-padding taps, rectified outputs,
// clipped pooling windows, normalisation with a denominator above K, buffer
// swaps, transients blocked, transient captured. The inference cycle count is
// checked against the per-stage formulas plus the sequencer overhead.
module tb_zfnet_top;
  import zfnet_pkg::*;
  import tb_ref_pkg::*;

  localparam int NS = 7;
  localparam int FMW = 512;
  localparam int PERIOD = 12724;

  // Stage table, built with running weight bases.
  localparam stage_t S0 = conv_stage(2, 11, 11, 3, 2, 1, 4, 1'b1, 0);
  localparam stage_t S1 = pool_stage(4, 6, 6);
  localparam stage_t S2 = lrn_stage(4, 3, 3);
  localparam stage_t S3 = conv_stage(4, 3, 3, 3, 1, 1, 3, 1'b1, w_next(S0));
  localparam stage_t S4 = conv_stage(3, 3, 3, 3, 1, 0, 6, 1'b1, w_next(S3));
  localparam stage_t S5 = conv_stage(6, 1, 1, 1, 1, 0, 5, 1'b0, w_next(S4));
  localparam stage_t S6 = softmax_stage(5);
  localparam stage_t [NS-1:0] TABLE = {S6, S5, S4, S3, S2, S1, S0};

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic load_we = 1'b0;
  logic [8:0] load_addr = '0, rd_addr = '0;
  data_t load_data = '0, rd_data, class_score;
  wword_t w_rdata;
  logic busy, done;
  logic [W_AW-1:0] w_raddr;
  logic [CH_W-1:0] class_idx;
  logic [2:0] stage_idx;
  logic [15:0] set_strike = '0;

  zfnet_top #(.NUM_STAGES(NS), .STAGES(TABLE), .FMAP_WORDS(FMW)) dut (
    .clk, .rst_n, .load_we, .load_addr, .load_data, .start, .busy, .done,
    .w_raddr, .w_rdata, .rd_addr, .rd_data, .class_idx, .class_score, .stage_idx,
    .set_strike);

  always #(PERIOD/2) clk = ~clk;
  always_ff @(posedge clk) for (int l = 0; l < LANES; l++) w_rdata[l] <= data_t'(w_lane(int'(w_raddr), l));

  // ---------------------------------------------------------- reference
  int img [];
  int maps [NS][];      // expected output of each stage
  int exp_idx, exp_best;
  int pad_taps = 0, relu_zero = 0, clipped = 0, lrn_big = 0;

  task automatic build_reference();
    int oh, ow;
    img = new[2*11*11];
    foreach (img[i]) img[i] = int'($urandom_range(0, 2047)) - 512;
    ref_conv(img, 2, 11, 11, 3, 2, 1, 4, 1'b1, int'(S0.w_base), maps[0], oh, ow);
    ref_pool(maps[0], 4, 6, 6, maps[1], oh, ow);
    ref_lrn(maps[1], 4, 3, 3, maps[2]);
    ref_conv(maps[2], 4, 3, 3, 3, 1, 1, 3, 1'b1, int'(S3.w_base), maps[3], oh, ow);
    ref_conv(maps[3], 3, 3, 3, 3, 1, 0, 6, 1'b1, int'(S4.w_base), maps[4], oh, ow);
    ref_conv(maps[4], 6, 1, 1, 1, 1, 0, 5, 1'b0, int'(S5.w_base), maps[5], oh, ow);
    ref_argmax(maps[5], 5, exp_idx, exp_best);
    ref_softmax(maps[5], 5, maps[6]);
    // Mechanism occurrence, from the shapes and the reference data.
    pad_taps = 2 * 2;                          // both padded convolutions
    foreach (maps[0][i]) if (maps[0][i] == 0) relu_zero++;
    foreach (maps[3][i]) if (maps[3][i] == 0) relu_zero++;
    foreach (maps[4][i]) if (maps[4][i] == 0) relu_zero++;
    clipped = 4 * 5;                           // 6x6 -> 3x3: 5 edge windows per map
    foreach (maps[2][i]) if (maps[1][i] != 0 && longint'(maps[1][i]) * 256 / maps[2][i] > 512) lrn_big++;
  endtask

  // ------------------------------------------------------- write monitor
  int run_no = 0;
  int mismatches = 0, flipped_bit0 = 0, writes = 0;
  int swaps = 0;
  logic last_bank = 1'b0;

  always @(negedge clk) begin
    if (dut.wb_we && dut.busy) begin
      int st, a, exp;
      st = int'(stage_idx);
      a = int'(dut.wb_addr);
      writes++;
      if (st >= NS || a >= maps[st].size()) begin
        failures++; checks++; $display("FAIL write to %0d in stage %0d", a, st);
      end else begin
        exp = maps[st][a];
        checks++;
        if (st == NS - 1 ? !prob_close(int'($signed(dut.wb_data)), exp)
                         : int'($signed(dut.wb_data)) != exp) begin
          mismatches++;
          if (int'($signed(dut.wb_data ^ 16'h0001)) == exp) flipped_bit0++;
          if (run_no != 3) begin
            failures++;
            $display("FAIL run %0d stage %0d addr %0d: got %0d expected %0d",
                     run_no, st, a, $signed(dut.wb_data), exp);
          end
        end
      end
    end
    if (dut.src_bank != last_bank) swaps++;
    last_bank = dut.src_bank;
  end

  // ------------------------------------------------ transient injection
  int strikes_blocked = 0;
  int strike_target = -1;       // run 3: write count at which bit 0 is hit
  int eng_writes = 0;

  always @(negedge clk) begin
    if (dut.eng_we) begin
      eng_writes++;
      if (run_no == 2) begin
        strikes_blocked++;
        fork
          begin
            #(PERIOD/2 - 250 + 20) set_strike = 16'hffc0;   // filtered bits 6..15
            #250 set_strike = '0;
          end
        join_none
      end else if (run_no == 3 && eng_writes == strike_target) begin
        fork
          begin
            #(PERIOD/2 - 250 + 20) set_strike = 16'h0001;   // plain bit 0
            #250 set_strike = '0;
          end
        join_none
      end
    end
  end

  // ----------------------------------------------------------- sequence
  function automatic int expected_cycles();
    int c;
    c = 0;
    c += int'(conv_cycles(3*3*2, 6*6, 4));   // conv 1
    c += 4*3*3*(9 + 2);             // pool
    c += 4*3*3*(5 + 2);             // lrn
    c += int'(conv_cycles(3*3*4, 3*3, 3));   // conv 2
    c += int'(conv_cycles(3*3*3, 1, 6));     // fc 1
    c += int'(conv_cycles(6, 1, 5));         // fc 2
    c += 3*5 + 2;                   // soft-max
    c += NS * 4;                    // launch, gap (2) and hand-over per stage
    return c;
  endfunction

  task automatic inference(input int n, output int cycles);
    run_no = n;
    eng_writes = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    @(negedge clk);
  endtask

  initial begin
    int cycles, total_writes;
    build_reference();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Load the image into buffer 0.
    foreach (img[i]) begin
      @(negedge clk);
      load_we = 1'b1; load_addr = 9'(i); load_data = data_t'(img[i]);
    end
    @(negedge clk) load_we = 1'b0;

    // Run 1: clean.
    inference(1, cycles);
    total_writes = writes;
    checks++;
    if (int'(class_idx) != exp_idx || int'(class_score) != exp_best) begin
      failures++; $display("FAIL class %0d/%0d expected %0d/%0d", class_idx, class_score, exp_idx, exp_best);
    end
    checks++;
    if (cycles != expected_cycles()) begin
      failures++; $display("FAIL inference took %0d cycles, expected %0d", cycles, expected_cycles());
    end
    $display("inference: %0d cycles, %0d writes", cycles, total_writes);
    // Read back the last map (the class probabilities).
    for (int i = 0; i < 5; i++) begin
      @(negedge clk) rd_addr = 9'(i);
      @(negedge clk);
      checks++;
      if (!prob_close(int'(rd_data), maps[6][i])) begin
        failures++; $display("FAIL readback %0d: %0d expected %0d", i, rd_data, maps[6][i]);
      end
    end

    // Image is still in buffer 0? No: buffer 0 was overwritten. Reload it.
    foreach (img[i]) begin
      @(negedge clk);
      load_we = 1'b1; load_addr = 9'(i); load_data = data_t'(img[i]);
    end
    @(negedge clk) load_we = 1'b0;
    // Run 2: transients on every write, all filtered.
    inference(2, cycles);
    checks++;
    if (int'(class_idx) != exp_idx) begin failures++; $display("FAIL class after blocked strikes"); end

    foreach (img[i]) begin
      @(negedge clk);
      load_we = 1'b1; load_addr = 9'(i); load_data = data_t'(img[i]);
    end
    @(negedge clk) load_we = 1'b0;
    // Run 3: one transient on an unfiltered bit, at the last write of stage 5.
    strike_target = total_writes - 5;
    mismatches = 0;
    flipped_bit0 = 0;
    inference(3, cycles);
    checks++;
    if (mismatches != 1 || flipped_bit0 != 1) begin
      failures++; $display("FAIL captured transient: %0d mismatches, %0d bit-0 flips", mismatches, flipped_bit0);
    end

    // Mechanisms.
    $display("padding taps: %0d, rectified: %0d, clipped windows: %0d, lrn > K: %0d, swaps: %0d, blocked strikes: %0d, captured: %0d",
             pad_taps, relu_zero, clipped, lrn_big, swaps, strikes_blocked, flipped_bit0);
    checks++; if (relu_zero == 0)       begin failures++; $display("FAIL no rectified output"); end
    checks++; if (lrn_big == 0)         begin failures++; $display("FAIL normalisation never above K"); end
    checks++; if (swaps < 3 * 5)        begin failures++; $display("FAIL buffer swaps %0d", swaps); end
    checks++; if (strikes_blocked == 0) begin failures++; $display("FAIL no transient blocked"); end
    checks++; if (flipped_bit0 == 0)    begin failures++; $display("FAIL no transient captured"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
