// Behavioural model (not synthesizable logic): the delay element in the reset
// path of the tuning phase detector.
//
// The output follows the input after DELAY_PS picoseconds. In the FPGA this is
// a chain of logic cells or routing kept by the placer; its purpose is to let
// both phase detector flip-flops stay set for a short, equal time when the
// inputs are in phase, so that the detector has no dead zone around zero.
// The document asks for a delay in the reset path; the 300 ps value is this
// design's choice.
module reset_delay #(
  parameter int unsigned DELAY_PS = 300
) (
  input  logic a,
  output logic y
);
  assign #(DELAY_PS * 1ps) y = a;
endmodule
