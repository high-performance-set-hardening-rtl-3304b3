`timescale 1ps/1ps
// fmap_ram: on-chip feature-map buffer. Two of them hold the input and the
// output of the stage being executed and swap roles between stages.
//
// A simple dual-port synchronous RAM: one write port and one read port, both
// clocked. Read data appears one clock after the address (read-before-write
// when both ports hit the same word in one cycle). Contents are not reset.
// The default depth holds the largest ZFNet feature map, the 110x110x96 output
// of the first convolution; the word width is the 16-bit data width.
module fmap_ram #(
  parameter int unsigned DEPTH  = 1161600,
  parameter int unsigned DATA_W = 16,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
