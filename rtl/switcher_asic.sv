// switcher_asic -- the Switcher ASIC: CHANNELS row channels, each producing
// two high-voltage control pulses, A and B (128 HV outputs at the default 64).
//
// Each channel is an lv_channel (token flip-flops, pulse width and polarity
// logic) followed, for each of its two pulses, by a level_shifter and an
// hv_driver. The channels form one chain:
//   forward:  TDIA pin -> ch1 -> ch2 -> ... -> chN -> TDOA pin
//   reverse:  TDIAr pin -> chN -> ... -> ch2 -> ch1 -> TDOAr pin
// Channel 1 is the CH_FIRST cell, channel N the CH_LAST cell and every other
// channel a copy of the CH_MIDDLE cell. Inside the chip the token moves one
// channel per falling CLK edge; TDOA and TDOAr leave the chip on the rising
// edge, half a clock after the end channel's neighbour pulses. Connecting
// TDOA to TDIAr sends the token back up the chip, so the outputs sweep down
// and up continuously; the last channel then shows one pulse for both passes.
// AI, BI, PA and PB are common to all channels. -RST (rst_n) is active low.
// Bit i of hv_a / hv_b is output A(i+1) / B(i+1) of the chip.
//
// CHANNELS and REVISION follow the source (64 channels, revision 2 being the
// latest). LOAD_PF (1 nF row line) sets the HV output timing of the driver
// model; SHIFT_DELAY_NS is an assumed level-shifter delay.
`timescale 1ns/1ps
module switcher_asic
  import switcher_pkg::*;
#(
  parameter int unsigned CHANNELS       = 64,
  parameter revision_e   REVISION       = REV_2,
  parameter real         LOAD_PF        = 1000.0,
  parameter real         SHIFT_DELAY_NS = 5.0
) (
  input  logic                clk,     // CLK
  input  logic                rst_n,   // -RST, active low
  input  logic                tdia,    // TDIA of channel 1
  output logic                tdoa,    // TDOA of channel N (rising edge)
  input  logic                tdiar,   // TDIAr of channel N
  output logic                tdoar,   // TDOAr of channel 1 (rising edge)
  input  logic                ai,      // AI: pulse A width control
  input  logic                bi,      // BI: pulse B width control
  input  logic                pa,      // PA: pulse A polarity control
  input  logic                pb,      // PB: pulse B polarity control
  output logic [CHANNELS-1:0] hv_a,    // HV outputs A1 .. AN
  output logic [CHANNELS-1:0] hv_b     // HV outputs B1 .. BN
);

  // fwd[i] is the forward token entering channel i; fwd[CHANNELS] leaves.
  // rev[i] is the reverse token leaving channel i; rev[CHANNELS] enters.
  logic [CHANNELS:0]   fwd, rev;
  logic [CHANNELS-1:0] drive_a, drive_b;
  logic [CHANNELS-1:0] shift_a, shift_b;
  pulse_ctrl_t         ctrl;

  assign ctrl          = '{ai: ai, bi: bi, pa: pa, pb: pb};
  assign fwd[0]        = tdia;
  assign tdoa          = fwd[CHANNELS];
  assign rev[CHANNELS] = tdiar;
  assign tdoar         = rev[0];

  for (genvar i = 0; i < CHANNELS; i++) begin : g_ch
    localparam channel_pos_e POS = (i == 0)            ? CH_FIRST :
                                   (i == CHANNELS - 1) ? CH_LAST  : CH_MIDDLE;

    lv_channel #(.POSITION(POS), .REVISION(REVISION)) u_lv (
      .clk     (clk),
      .rst_n   (rst_n),
      .tdia    (fwd[i]),
      .tdoa    (fwd[i+1]),
      .tdiar   (rev[i+1]),
      .tdoar   (rev[i]),
      .ctrl    (ctrl),
      .token   (),            // LV observation points, not pinned out
      .pulse_a (),
      .pulse_b (),
      .drive_a (drive_a[i]),
      .drive_b (drive_b[i])
    );

    level_shifter #(.DELAY_NS(SHIFT_DELAY_NS)) u_shift_a (
      .v_plus (drive_a[i]), .v_minus(~drive_a[i]), .hv_out(shift_a[i]));
    level_shifter #(.DELAY_NS(SHIFT_DELAY_NS)) u_shift_b (
      .v_plus (drive_b[i]), .v_minus(~drive_b[i]), .hv_out(shift_b[i]));

    hv_driver #(.LOAD_PF(LOAD_PF)) u_drv_a (.in(shift_a[i]), .hv_out(hv_a[i]));
    hv_driver #(.LOAD_PF(LOAD_PF)) u_drv_b (.in(shift_b[i]), .hv_out(hv_b[i]));
  end

  // The first/last cell variants need at least two channels.
  initial assert (CHANNELS >= 2) else $error("switcher_asic: CHANNELS must be >= 2");

endmodule
