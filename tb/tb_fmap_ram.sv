`timescale 1ps/1ps
// tb_fmap_ram: random writes and reads against a shadow array, checking the
// one-cycle read latency and read-before-write on a same-address collision.
module tb_fmap_ram;
  localparam int DEPTH = 1000;
  localparam int AW = $clog2(DEPTH);
  int checks = 0, failures = 0;
  logic clk = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [15:0] wdata = '0, rdata;
  int shadow [DEPTH];

  fmap_ram #(.DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5000 clk = ~clk;

  initial begin
    int exp;
    // Fill every word.
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = 16'($urandom); shadow[a] = int'(wdata);
    end
    @(negedge clk) we = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      raddr = AW'($urandom_range(0, DEPTH - 1));
      we = 1'($urandom);
      waddr = (n % 5 == 0) ? raddr : AW'($urandom_range(0, DEPTH - 1));
      wdata = 16'($urandom);
      exp = shadow[raddr];          // old value on a collision
      if (we) shadow[waddr] = int'(wdata);
      @(negedge clk);
      we = 1'b0;
      checks++;
      if (int'(rdata) != exp) begin
        failures++; $display("FAIL read %0d: got %h expected %h", raddr, rdata, exp);
      end
    end
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
