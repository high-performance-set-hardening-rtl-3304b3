`timescale 1ps/1ps
// tb_maxpool_engine: 3x3 stride-2 pooling of random signed maps of odd and
// even size (7x7 -> 3x3 with full windows, 6x8 -> 3x4 with clipped edge
// windows) against the reference model. Checks every written value, that
// each output is written once, and the cycle count outputs*(9 + 2).
module tb_maxpool_engine;
  import zfnet_pkg::*;
  import tb_ref_pkg::*;

  localparam int FAW = 12;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  stage_t cfg;
  logic busy, done, wr_en;
  logic [FAW-1:0] f_raddr, wr_addr;
  data_t f_rdata, wr_data;
  int fmem [];
  int out_map [];
  int written [];

  maxpool_engine #(.FAW(FAW)) dut (.clk, .rst_n, .start, .cfg, .busy, .done,
    .f_raddr, .f_rdata, .wr_en, .wr_addr, .wr_data);

  always #5000 clk = ~clk;
  always_ff @(posedge clk) f_rdata <= data_t'(fmem[f_raddr]);

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
      end
    end
  end

  task automatic run(input int c, input int h, input int w);
    int oh, ow, cycles;
    fmem = new[1 << FAW];
    foreach (fmem[i]) fmem[i] = int'($urandom_range(0, 65535)) - 32768;
    ref_pool(fmem, c, h, w, out_map, oh, ow);
    written = new[out_map.size()];
    cfg = pool_stage(c, h, w);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != c*oh*ow*11) begin
      failures++; $display("FAIL cycle count %0d expected %0d", cycles, c*oh*ow*11);
    end
    @(negedge clk);
    foreach (written[i]) begin
      checks++;
      if (written[i] != 1) begin failures++; $display("FAIL addr %0d written %0d times", i, written[i]); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(3, 7, 7);
    run(2, 6, 8);
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
