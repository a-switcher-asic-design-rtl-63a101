// switcher_pkg -- types, constants and helper functions shared by the
// Switcher ASIC model.
//
// The Switcher ASIC drives the row electrodes of a pixel sensor. Each of its
// channels owns one sensor row and produces two high-voltage control pulses,
// A and B. A single "token" travels down the channel chain (forward) and back
// up again (reverse), one channel per clock; the channel that holds the token
// emits its pulses. This package holds:
//   * channel_pos_e  - which of the three channel cell variants an instance is
//                      (first, middle, last); the first and last cells carry
//                      the chip's token pins and differ from the middle ones.
//   * revision_e     - silicon revision. Revision 1 and 2 differ only in how
//                      the PA pin sets the polarity of pulse A.
//   * pulse_ctrl_t   - the four pins shared by every channel that shape the
//                      pulses: AI/BI (width) and PA/PB (polarity).
//   * hv_level()     - the polarity rule of each revision.
//   * hv_rise_time_ns() - output rise time against load capacitance, a
//                      piecewise-linear fit through the bench measurements
//                      (10 pF: 12 ns, 100 pF: 43.6 ns, 470 pF: 216 ns,
//                      1 nF: 480 ns, all for a 0 to 15 V step). Outside that
//                      range the end segments are extended; that extension is
//                      this model's choice.
`timescale 1ns/1ps
package switcher_pkg;

  typedef enum logic [1:0] {
    CH_FIRST  = 2'd0,   // channel 1: TDIA pin in, TDOAr pin out (rising edge)
    CH_MIDDLE = 2'd1,   // channels 2 .. N-1: all token I/O on falling edge
    CH_LAST   = 2'd2    // channel N: TDOA pin out (rising edge), TDIAr pin in
  } channel_pos_e;

  typedef enum logic [1:0] {
    REV_1 = 2'd1,       // A positive when PA high, B positive when PB low
    REV_2 = 2'd2        // A and B positive when PA / PB low
  } revision_e;

  typedef struct packed {
    logic ai;           // pulse A width control: A is active only while AI high
    logic bi;           // pulse B width control
    logic pa;           // pulse A polarity control
    logic pb;           // pulse B polarity control
  } pulse_ctrl_t;

  // Logic level driven to the HV stage of one port. 'pulse' is the
  // width-adjusted pulse (1 while the pulse is on). A positive pulse idles
  // low and goes high; a negative pulse idles high and goes low.
  function automatic logic hv_level(input logic pulse, input logic pol,
                                    input logic port_a, input revision_e rev);
    logic invert;
    if (port_a && rev == REV_1) invert = ~pol;
    else                        invert = pol;
    return pulse ^ invert;
  endfunction

  // Bench-measured rise time of an HV output against its load.
  localparam int unsigned RISE_POINTS = 4;
  localparam real RISE_LOAD_PF [RISE_POINTS] = '{10.0, 100.0, 470.0, 1000.0};
  localparam real RISE_TIME_NS [RISE_POINTS] = '{12.0, 43.6, 216.0, 480.0};

  function automatic real hv_rise_time_ns(input real load_pf);
    int unsigned seg;
    real slope;
    seg = 0;
    for (int unsigned i = 1; i < RISE_POINTS - 1; i++)
      if (load_pf > RISE_LOAD_PF[i]) seg = i;
    slope = (RISE_TIME_NS[seg+1] - RISE_TIME_NS[seg]) /
            (RISE_LOAD_PF[seg+1] - RISE_LOAD_PF[seg]);
    return RISE_TIME_NS[seg] + slope * (load_pf - RISE_LOAD_PF[seg]);
  endfunction

endpackage
