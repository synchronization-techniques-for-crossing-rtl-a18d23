// tmr_cdc_pkg: shared constants and timing arithmetic for the triplicated
// clock-domain crossings.
//
// The long-pulse crossing needs every transmitted pulse (and every gap
// between pulses) to satisfy T_pw >= T_rcv + T_skew, i.e. one receiver period
// plus the worst skew between the three wire copies; the sender expresses
// that as n = ceil(T_pw / T_snd) of its own cycles. The short-pulse crossing
// needs a sender pulse no longer than one receiver period and a pause long
// enough for the latch feedback loop to finish (four receiver periods in
// this implementation, plus one sender cycle of margin). All times are in
// picoseconds so that the arithmetic stays integer.
`timescale 1ns / 1ps
package tmr_cdc_pkg;

  // Number of copies in a triplicated signal.
  localparam int unsigned NCOPY = 3;

  // Sender cycles a long pulse must last: ceil((T_rcv + T_skew) / T_snd).
  function automatic int unsigned long_pulse_cycles(int unsigned t_snd_ps,
                                                    int unsigned t_rcv_ps,
                                                    int unsigned t_skew_ps);
    return (t_rcv_ps + t_skew_ps + t_snd_ps - 1) / t_snd_ps;
  endfunction

  // Sender cycles between two short pulses: the latch feedback of the
  // receiver is busy for up to four receiver periods after the set.
  function automatic int unsigned short_pulse_gap(int unsigned t_snd_ps,
                                                  int unsigned t_rcv_ps);
    return (4 * t_rcv_ps + t_snd_ps - 1) / t_snd_ps + 1;
  endfunction

endpackage
