`timescale 1ps/1ps
// tb_conv_engine: runs four layers on the convolution engine against the
// reference model: a padded stride-2 3x3 convolution with rectification, a
// padded 3x3 layer with 37 channels (two full groups of 16 lanes and a partial
// one), a fully-connected layer (kernel covering the whole map, no
// rectification) and a 1x1 layer with 20 channels whose positions are too
// short for the writer, so the engine must wait for it.
// Feature memory and weight store are modelled here with one cycle of read
// latency. Every written element and address is compared, each address must
// be written exactly once, and the run must take the cycle count worked out
// from the group/position timing below.
module tb_conv_engine;
  import zfnet_pkg::*;
  import tb_ref_pkg::*;

  localparam int FAW = 12;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  stage_t cfg;
  logic busy, done, wr_en;
  logic [FAW-1:0] f_raddr, wr_addr;
  logic [W_AW-1:0] w_raddr;
  data_t f_rdata, wr_data;
  wword_t w_rdata;

  int fmem [];

  conv_engine #(.FAW(FAW)) dut (.clk, .rst_n, .start, .cfg, .busy, .done,
    .f_raddr, .f_rdata, .w_raddr, .w_rdata, .wr_en, .wr_addr, .wr_data);

  always #5000 clk = ~clk;

  always_ff @(posedge clk) begin
    f_rdata <= data_t'(fmem[f_raddr]);
    for (int l = 0; l < LANES; l++) w_rdata[l] <= data_t'(w_lane(int'(w_raddr), l));
  end

  int out_map [];
  int written [];
  int relu_clamped = 0;

  // Sample the write port mid-cycle, where it is stable.
  always @(negedge clk) begin
    if (wr_en) begin
      checks++;
      if (int'(wr_addr) >= out_map.size()) begin
        failures++; $display("FAIL write address %0d out of range", wr_addr);
      end else begin
        written[wr_addr]++;
        if (int'(wr_data) != out_map[wr_addr]) begin
          failures++;
          $display("FAIL addr %0d: got %0d expected %0d", wr_addr, wr_data, out_map[wr_addr]);
        end
        if (cfg.relu && out_map[wr_addr] == 0) relu_clamped++;
      end
    end
  end

  // Each position of each group of LANES channels takes taps + 3 clocks
  // (bias, taps, drain, capture), or longer if the writer is still draining
  // the previous position's results (one per clock); then the last results
  // drain and done follows.
  function automatic int expected_cycles(int taps, int positions, int cout);
    int t, n_prev, ngroups;
    t = 0;
    n_prev = 0;
    ngroups = (cout + LANES - 1) / LANES;
    for (int gi = 0; gi < ngroups; gi++) begin
      int n;
      n = (gi == ngroups - 1) ? cout - gi*LANES : LANES;
      for (int pi = 0; pi < positions; pi++) begin
        t += (n_prev > taps + 3) ? n_prev : taps + 3;
        n_prev = n;
      end
    end
    return t + n_prev + 1;
  endfunction

  int stalls = 0;

  task automatic run_layer(input int cin, input int h, input int w, input int k, input int s,
                           input int p, input int cout, input bit relu_en, input int wbase);
    int oh, ow, cycles;
    fmem = new[1 << FAW];
    foreach (fmem[i]) fmem[i] = int'($urandom_range(0, 1023)) - 400;
    ref_conv(fmem, cin, h, w, k, s, p, cout, relu_en, wbase, out_map, oh, ow);
    if (k*k*cin + 3 < LANES && cout > 1) stalls++;
    written = new[out_map.size()];
    cfg = conv_stage(cin, h, w, k, s, p, cout, relu_en, wbase);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != expected_cycles(k*k*cin, oh*ow, cout)) begin
      failures++;
      $display("FAIL cycle count %0d expected %0d", cycles, expected_cycles(k*k*cin, oh*ow, cout));
    end
    @(negedge clk);
    foreach (written[i]) begin
      checks++;
      if (written[i] != 1) begin failures++; $display("FAIL addr %0d written %0d times", i, written[i]); end
    end
    @(negedge clk);
    checks++; if (busy) begin failures++; $display("FAIL busy after done"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_layer(2, 7, 6, 3, 2, 1, 3, 1'b1, 100);   // padded stride-2 conv + relu
    run_layer(3, 5, 4, 3, 1, 1, 37, 1'b1, 900);  // three groups, the last partial
    run_layer(3, 3, 3, 3, 1, 0, 5, 1'b0, 4000);  // fully connected
    run_layer(4, 2, 2, 1, 1, 0, 20, 1'b1, 0);    // 1x1 conv: writer-bound positions
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL writer stall never exercised"); end
    checks++;
    if (relu_clamped == 0) begin failures++; $display("FAIL rectification never exercised"); end
    $display("rectified outputs: %0d", relu_clamped);
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
