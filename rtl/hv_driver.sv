// hv_driver -- BEHAVIOURAL MODEL (not synthesizable logic) of the four-stage
// high-voltage output buffer of one pulse output.
//
// The real driver is a chain of four HV inverters sized with an optimised
// stage effort, powered from VDDHO1/VSSHO1 (pulse A) or VDDHO2/VSSHO2
// (pulse B), able to deliver about 200 mA peak into a 1 nF row line. Four
// inverting stages make it non-inverting. This model keeps that logic
// function and the time the output needs to swing into its load: the output
// follows the input after hv_rise_time_ns(LOAD_PF), the bench-measured rise
// time interpolated from 10 pF (12 ns) to 1 nF (480 ns). Taking the full rise
// time as the delay is this model's choice. The delay is inertial, so a
// pulse shorter than the rise time never reaches the output, as a real
// driver would not reach its rail.
// Interface: in (1 = drive high, from the level shifter), hv_out (1 = VDDHO,
// 0 = VSSHO). Default LOAD_PF = 1000 is the 1 nF row line of the sensor.
`timescale 1ns/1ps
module hv_driver
  import switcher_pkg::*;
#(
  parameter real LOAD_PF = 1000.0
) (
  input  logic in,
  output logic hv_out
);

  localparam real RISE_NS = hv_rise_time_ns(LOAD_PF);

  assign #(RISE_NS) hv_out = in;

endmodule
