`timescale 1ps/1ps
// stmr_ff: self-correcting triple-modular-redundant D flip-flop, the storage
// cell of the radiation-hardened FPGA fabric, modelled at register level.
//
// Three copies hold the same bit and the output is their 2-of-3 majority, so
// an upset in any single copy is never visible at q. When the enable is low,
// every copy reloads the voted value instead of keeping its own, which scrubs
// an upset copy on the next clock edge (self-correction). With the enable high
// all three copies load d. The internal arrangement is this design's choice;
// the hardened flow only relies on the cell being SEU-immune.
//
// Interface: clk, active-low asynchronous reset rst_n (clears all copies), en,
// d, q. Timing: q follows d one clock edge after en is sampled high. The
// upset port flips the selected copies at a clock edge to model a single-event
// upset in the cell; tie it to zero in normal use.
module stmr_ff (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       d,
  input  logic [2:0] upset,
  output logic       q
);

  logic [2:0] copy;
  logic       voted;

  assign voted = (copy[0] & copy[1]) | (copy[0] & copy[2]) | (copy[1] & copy[2]);
  assign q     = voted;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) copy <= 3'b000;
    else        copy <= {3{en ? d : voted}} ^ upset;
  end

endmodule
