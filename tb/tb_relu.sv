`timescale 1ps/1ps
// tb_relu: every 16-bit input, with rectification on and off.
module tb_relu;
  import zfnet_pkg::*;
  int checks = 0, failures = 0;
  logic en;
  data_t x, y;

  relu dut (.en, .x, .y);

  initial begin
    for (int e = 0; e < 2; e++)
      for (int v = -32768; v < 32768; v++) begin
        int exp;
        en = e[0];
        x = data_t'(v);
        #1;
        exp = (e == 1 && v < 0) ? 0 : v;
        checks++;
        if (int'(y) != exp) begin
          failures++;
          if (failures < 10) $display("FAIL en=%0d x=%0d y=%0d", e, v, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
