`timescale 1ps/1ps
// set_pkg: constants and the filter-sizing rule of the selective SET hardening.
//
// A flip-flop is "sensitive" when the SET analysis predicts that a pulse wider
// than the capture threshold (450 ps for the 65 nm fabric) can reach its D pin.
// Only sensitive flip-flops receive a filter. The filter's delay line is sized
// to the widest pulse expected at that flip-flop, but never beyond the
// maximum filtering capability chosen for the design (300 ps in the preferred
// configuration, 600 ps in the alternative one). The delay line is a chain of
// inverters, so its length is rounded up to an even number of stages to keep
// the delayed copy of D non-inverted. The per-inverter delay is this design's
// own assumption.
package set_pkg;

  // Pulses wider than this are latched if they hit the sampling window.
  localparam int unsigned SENS_THRESH_PS = 450;
  // Maximum filtering capability of the preferred selective configuration.
  localparam int unsigned MAX_FILTER_PS  = 300;
  // Delay of one inverter of the filter chain (assumed).
  localparam int unsigned T_INV_PS       = 50;
  // Clock period at the 78.59 MHz reached by the preferred configuration.
  localparam int unsigned CLK_PERIOD_PS  = 12724;

  // Filtering delay, in ps, that a flip-flop expecting pulses of pulse_ps receives.
  // Zero means the flip-flop is left without a filter.
  function automatic int unsigned filter_delay_ps(int unsigned pulse_ps,
                                                  int unsigned thresh_ps,
                                                  int unsigned max_ps);
    if (pulse_ps <= thresh_ps) return 0;
    return (pulse_ps < max_ps) ? pulse_ps : max_ps;
  endfunction

  // Number of inverters that realises at least delay_ps, rounded up to even.
  function automatic int unsigned inverter_count(int unsigned delay_ps,
                                                 int unsigned t_inv_ps);
    int unsigned n;
    if (delay_ps == 0) return 0;
    n = (delay_ps + t_inv_ps - 1) / t_inv_ps;
    if (n % 2 != 0) n = n + 1;
    return n;
  endfunction

endpackage
