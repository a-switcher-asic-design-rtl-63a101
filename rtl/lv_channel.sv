// lv_channel -- low-voltage control logic of one Switcher channel.
//
// A channel owns one sensor row. Two flip-flops, clocked on the FALLING edge
// of CLK, carry the row token: the forward flip-flop samples TDIA (token from
// the previous channel) and the reverse flip-flop samples TDIAr (token from
// the next channel). The row is selected while either holds the token, so a
// token that arrives in both directions in the same clock gives one pulse.
// The selected row produces two pulses that share this token logic:
//   pulse_a = token & AI,  pulse_b = token & BI      (width control)
//   drive_a/drive_b = pulse with the polarity set by PA/PB (see
//   switcher_pkg::hv_level); these go to the level shifters.
// Both pulses therefore start at the falling CLK edge; AI/BI held high give a
// one-clock pulse, a narrower AI/BI pulse trims it.
//
// Three cell variants (POSITION):
//   CH_MIDDLE  TDOA = forward flip-flop, TDOAr = reverse flip-flop.
//   CH_LAST    TDOA comes from an extra RISING-edge flip-flop sampling TDIA,
//              so the chip's token output leads the last row's own pulse by
//              half a clock. Looped back to TDIAr it makes the last row's
//              reverse pulse coincide with its forward pulse.
//   CH_FIRST   TDOAr likewise comes from a rising-edge flip-flop sampling
//              TDIAr.
// -RST (rst_n) is active low. Clearing every flip-flop asynchronously is a
// choice of this model; the source only says that the pulses propagate while
// -RST is high.
//
// Timing: tokens move one channel per CLK period; the chip-end token outputs
// change on the rising edge, everything else on the falling edge.
`timescale 1ns/1ps
module lv_channel
  import switcher_pkg::*;
#(
  parameter channel_pos_e POSITION = CH_MIDDLE,
  parameter revision_e    REVISION = REV_2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tdia,     // forward token in (from channel i-1)
  output logic        tdoa,     // forward token out (to channel i+1)
  input  logic        tdiar,    // reverse token in (from channel i+1)
  output logic        tdoar,    // reverse token out (to channel i-1)
  input  pulse_ctrl_t ctrl,     // AI, BI, PA, PB
  output logic        token,    // row selected this clock
  output logic        pulse_a,  // width-adjusted pulse A, before polarity
  output logic        pulse_b,  // width-adjusted pulse B, before polarity
  output logic        drive_a,  // pulse A after polarity, to the level shifter
  output logic        drive_b   // pulse B after polarity, to the level shifter
);

  logic fwd_q, rev_q;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fwd_q <= 1'b0;
      rev_q <= 1'b0;
    end else begin
      fwd_q <= tdia;
      rev_q <= tdiar;
    end
  end

  always_comb begin
    token   = fwd_q | rev_q;
    pulse_a = token & ctrl.ai;
    pulse_b = token & ctrl.bi;
    drive_a = hv_level(pulse_a, ctrl.pa, 1'b1, REVISION);
    drive_b = hv_level(pulse_b, ctrl.pb, 1'b0, REVISION);
  end

  if (POSITION == CH_LAST) begin : g_tdoa_rise
    logic tdoa_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) tdoa_q <= 1'b0;
      else        tdoa_q <= tdia;
    end
    assign tdoa = tdoa_q;
  end else begin : g_tdoa_fall
    assign tdoa = fwd_q;
  end

  if (POSITION == CH_FIRST) begin : g_tdoar_rise
    logic tdoar_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) tdoar_q <= 1'b0;
      else        tdoar_q <= tdiar;
    end
    assign tdoar = tdoar_q;
  end else begin : g_tdoar_fall
    assign tdoar = rev_q;
  end

endmodule
