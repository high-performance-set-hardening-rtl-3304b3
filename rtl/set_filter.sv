`timescale 1ps/1ps
// set_filter: behavioural timing model of the SET filter placed in front of a
// flip-flop's D pin. It is a model, not synthesizable logic: the filter works
// through real gate delays, which only a timed simulation can represent.
//
// Structure: the gate mix follows the hardened flow's filter (one 3-input
// NAND, three 2-input NANDs and a chain of inverters whose length sets the
// filtering capability). The data input D passes through a chain of N_INV
// inverters, giving a delayed copy DD. The four NAND gates form the majority
// of D, DD and the filter's own output Y, so the output takes a new value only
// when D and DD agree on it and otherwise holds (a guard gate, or C-element).
// A transient on D narrower than the chain delay is never seen by D and DD at
// the same time and does not reach the flip-flop, while a legitimate change
// reaches it N_INV*T_INV_PS later, which is the timing overhead of the filter.
// Which node feeds the third majority input is this design's reading; the
// own-output feedback keeps the filter independent of the flip-flop's state.
// The feedback is a deliberate combinational loop: it is the storage node of
// the guard gate.
//
// Interface: d (from the combinational logic), y (to the flip-flop's D).
// N_INV must be even so that DD is not inverted; N_INV = 0 gives a plain wire
// from d to y. The inverter delay is an assumed value; the NAND gates are
// modelled without delay. After power-up y settles once d has been stable for
// the chain delay.
module set_filter #(
  parameter int unsigned N_INV    = 6,
  parameter int unsigned T_INV_PS = 50
) (
  input  logic d,
  output logic y
);

  initial begin
    if (N_INV % 2 != 0) $fatal(1, "set_filter: N_INV must be even");
  end

  logic dd;

  if (N_INV == 0) begin : g_none
    assign dd = d;
  end else begin : g_chain
    logic [N_INV:0] stage;
    assign stage[0] = d;
    for (genvar i = 0; i < N_INV; i++) begin : g_inv
      assign #(T_INV_PS) stage[i+1] = ~stage[i];
    end
    assign dd = stage[N_INV];
  end

  // Majority of d, dd and y built from the four NAND gates.
  logic n_d_dd, n_d_y, n_dd_y;
  assign n_d_dd = ~(d & dd);
  assign n_d_y  = ~(d & y);
  assign n_dd_y = ~(dd & y);
  assign y      = ~(n_d_dd & n_d_y & n_dd_y);

endmodule
