`timescale 1ps/1ps
// tb_lrn_engine: normalisation across feature maps of random maps against the
// reference model: small values (denominator close to K), large values (the
// squared sum dominates) and a map with fewer channels than the window.
// Checks every written value, that each element is written once, and the
// cycle count elements*(5 + 2).
module tb_lrn_engine;
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

  lrn_engine #(.FAW(FAW)) dut (.clk, .rst_n, .start, .cfg, .busy, .done,
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

  int big_den = 0;

  task automatic run(input int c, input int h, input int w, input int range_max);
    int cycles, oh, ow;
    oh = h;
    ow = w;
    fmem = new[1 << FAW];
    foreach (fmem[i]) fmem[i] = int'($urandom_range(0, 2*range_max)) - range_max;
    ref_lrn(fmem, c, h, w, out_map);
    foreach (out_map[i]) if (out_map[i] != 0 && (fmem[i] * 128 / out_map[i] > 300)) big_den++;
    written = new[out_map.size()];
    cfg = lrn_stage(c, h, w);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != c*oh*ow*7) begin
      failures++; $display("FAIL cycle count %0d expected %0d", cycles, c*oh*ow*7);
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
    run(7, 3, 4, 600);
    run(6, 2, 3, 32767);
    run(2, 3, 3, 20000);
    checks++;
    if (big_den == 0) begin failures++; $display("FAIL normalisation never above K"); end
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
