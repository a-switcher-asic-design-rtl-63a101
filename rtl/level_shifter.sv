// level_shifter -- BEHAVIOURAL MODEL (not synthesizable logic) of the
// current-mirror LV-to-HV level shifter that sits between the 1.8 V control
// logic and the HV driver of each pulse.
//
// The real circuit takes a complementary 1.8 V pair, V+ and V-, and copies the
// current of a low-voltage switching pair into a high-voltage pair through
// current mirrors; a small adjustment pair speeds up the transition and keeps
// the high-side PMOS and low-side NMOS from conducting together. Its output
// swings between VSSH and VDDH (up to 32 V). This model keeps only the logic
// behaviour and a transition delay:
//   V+ = 1, V- = 0  ->  out = 1 (VDDH)
//   V+ = 0, V- = 1  ->  out = 0 (VSSH)
//   V+ = V-         ->  out holds its last level. With no differential
//                       current neither mirror switches; holding is this
//                       model's reading of that case.
// The hold is kept in a latch on purpose: it is the behaviour being modelled.
// Supply pins (VDDH, VSSH, VDDD, VSSD) are not modelled. DELAY_NS is not given
// by the source; 5 ns is an assumed value, small against the HV driver's
// rise time. The output delay is inertial: an input pulse shorter than
// DELAY_NS does not reach the output.
`timescale 1ns/1ps
module level_shifter #(
  parameter real DELAY_NS = 5.0
) (
  input  logic v_plus,   // 1.8 V true input
  input  logic v_minus,  // 1.8 V complement input
  output logic hv_out    // 1 = VDDH, 0 = VSSH
);

  logic state;

  always_latch begin
    if (v_plus != v_minus) state = v_plus;
  end

  assign #(DELAY_NS) hv_out = state;

endmodule
