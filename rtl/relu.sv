`timescale 1ps/1ps
// relu: linear rectifier applied to a convolution result before write-back.
// Combinational: y = max(x, 0) when en is high, y = x otherwise (the last
// fully-connected layer feeds the classifier without rectification).
module relu (
  input  logic                   en,
  input  zfnet_pkg::data_t       x,
  output zfnet_pkg::data_t       y
);
  assign y = (en && x < 0) ? '0 : x;
endmodule
