// row_control_system -- row control of a large pixel sensor built from CHIPS
// Switcher ASICs (16 x 64 = 1024 rows at the defaults).
//
// The chips share CLK, -RST, AI, BI, PA and PB. Their token pins are chained
// through token_delay_ff flip-flops, one per direction per chip boundary:
//   chip k TDOA  -> delay FF -> chip k+1 TDIA
//   chip k+1 TDOAr -> delay FF -> chip k TDIAr
// A chip's end pins switch on the rising clock edge, half a clock early; the
// flip-flop re-times them to the falling edge and adds one clock, so global
// row r pulses in clock r with no two rows of neighbouring chips overlapping.
// The forward token enters at tdia (chip 0, row 0). The last chip's TDOA and
// TDIAr are brought out as tdoa_end / tdiar_end: tie them together to sweep
// back up the sensor, or leave tdiar_end low for a forward-only scan.
// tdoar_first is chip 0's TDOAr. row_a[r] / row_b[r] are the two HV control
// pulses of global row r = chip * CHANNELS + channel.
// The delay flip-flop in the reverse path is this design's choice; the source
// asks for the extra flip-flop on the token path between chips.
`timescale 1ns/1ps
module row_control_system
  import switcher_pkg::*;
#(
  parameter int unsigned CHIPS    = 16,
  parameter int unsigned CHANNELS = 64,
  parameter revision_e   REVISION = REV_2,
  parameter real         LOAD_PF  = 1000.0
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         tdia,         // token into row 0
  output logic                         tdoa_end,     // last chip TDOA
  input  logic                         tdiar_end,    // last chip TDIAr
  output logic                         tdoar_first,  // first chip TDOAr
  input  logic                         ai,
  input  logic                         bi,
  input  logic                         pa,
  input  logic                         pb,
  output logic [CHIPS*CHANNELS-1:0]    row_a,
  output logic [CHIPS*CHANNELS-1:0]    row_b
);

  logic [CHIPS-1:0] chip_tdia, chip_tdoa, chip_tdiar, chip_tdoar;

  assign chip_tdia[0]        = tdia;
  assign tdoa_end            = chip_tdoa[CHIPS-1];
  assign chip_tdiar[CHIPS-1] = tdiar_end;
  assign tdoar_first         = chip_tdoar[0];

  for (genvar k = 0; k < CHIPS; k++) begin : g_chip
    switcher_asic #(
      .CHANNELS (CHANNELS),
      .REVISION (REVISION),
      .LOAD_PF  (LOAD_PF)
    ) u_asic (
      .clk   (clk),
      .rst_n (rst_n),
      .tdia  (chip_tdia[k]),
      .tdoa  (chip_tdoa[k]),
      .tdiar (chip_tdiar[k]),
      .tdoar (chip_tdoar[k]),
      .ai    (ai),
      .bi    (bi),
      .pa    (pa),
      .pb    (pb),
      .hv_a  (row_a[k*CHANNELS +: CHANNELS]),
      .hv_b  (row_b[k*CHANNELS +: CHANNELS])
    );

    if (k < CHIPS - 1) begin : g_link
      token_delay_ff u_fwd_ff (
        .clk(clk), .rst_n(rst_n), .d(chip_tdoa[k]), .q(chip_tdia[k+1]));
      token_delay_ff u_rev_ff (
        .clk(clk), .rst_n(rst_n), .d(chip_tdoar[k+1]), .q(chip_tdiar[k]));
    end
  end

endmodule
