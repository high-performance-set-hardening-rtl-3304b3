`timescale 1ps/1ps
// sel_hardened_reg: a register hardened selectively against single-event
// transients. Behavioural model: it contains set_filter delay chains, which
// only a timed simulation represents.
//
// Each bit is a self-correcting TMR flip-flop (stmr_ff). PULSE_PS[i] is the
// widest transient the SET analysis expects to reach bit i (0: none reaches
// it). Following the selective hardening rule, a bit gets a filter only when
// that width exceeds the capture threshold THRESH_PS, and the filter delay is
// the expected width capped at MAX_FILTER_PS; the inverter count follows from
// T_INV_PS (set_pkg::inverter_count). Bits below the threshold are left plain,
// which saves the filter's area and its delay on the D path.
//
// Interface: clk, rst_n (asynchronous, active low), en (load), d, q. strike is
// a modelling input: strike[i] is XORed onto the D line of bit i ahead of the
// filter, so a testbench can drive a transient of any width into the register
// exactly where a transient from the combinational logic would arrive. Tie it
// to zero in normal use. Timing: q takes d at the clock edge where en is high;
// d must settle the filter delay (at most MAX_FILTER_PS) before that edge.
// Lint reports the filtered D pins as circular combinational logic: each
// filter's output feeds back into its own majority gate, which is how the
// filter holds its value while d and the delayed d disagree (see set_filter).
// The loop is intended and stays.
//
// The threshold, the capped per-bit delay and the use of TMR flip-flops follow
// the document; the strike port and the per-bit profile as a parameter are
// this design's choices.
module sel_hardened_reg #(
  parameter int unsigned WIDTH         = 16,
  parameter int unsigned PULSE_PS [WIDTH] = '{default: 500},
  parameter int unsigned THRESH_PS     = set_pkg::SENS_THRESH_PS,
  parameter int unsigned MAX_FILTER_PS = set_pkg::MAX_FILTER_PS,
  parameter int unsigned T_INV_PS      = set_pkg::T_INV_PS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  input  logic [WIDTH-1:0] strike,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] d_line;   // D line as it arrives, including any transient
  logic [WIDTH-1:0] d_ff;     // D pin of each flip-flop

  assign d_line = d ^ strike;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    localparam int unsigned DELAY_PS =
      set_pkg::filter_delay_ps(PULSE_PS[i], THRESH_PS, MAX_FILTER_PS);
    localparam int unsigned N_INV = set_pkg::inverter_count(DELAY_PS, T_INV_PS);

    if (N_INV > 0) begin : g_filtered
      set_filter #(.N_INV(N_INV), .T_INV_PS(T_INV_PS)) u_filter (
        .d (d_line[i]),
        .y (d_ff[i])
      );
    end else begin : g_plain
      assign d_ff[i] = d_line[i];
    end

    stmr_ff u_ff (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (en),
      .d     (d_ff[i]),
      .upset (3'b000),
      .q     (q[i])
    );
  end

endmodule
