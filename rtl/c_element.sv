// c_element: two-input Muller C-element.
//
// The output copies the inputs when they agree and keeps its value while they
// differ. It is the basic state-holding gate of the dual-rail path (completion
// tree and dual-to-single converter). Written as a level-sensitive latch whose
// enable is "inputs agree", which is what a LUT with its output fed back
// computes; the latch (which lint tools may also report as a combinational
// loop through y) is the intended state of the gate. No reset: every use in this design drives
// both inputs to the same value during reset (the all-zero spacer).
`timescale 1ps/1ps
module c_element (
  input  logic a,
  input  logic b,
  output logic y
);

  always_latch begin
    if (a == b) y = a;
  end

endmodule
