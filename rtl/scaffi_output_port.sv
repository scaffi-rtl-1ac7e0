// scaffi_output_port: sender-side SCAFFI controller.
//
// A burst-mode asynchronous state machine with ten states. Towards the sender
// island it speaks a 2-phase handshake: every transition of SR asks for one
// word to be sent, and SA follows SR once the word is on its way. Across the
// channel it speaks a 4-phase handshake on AR/AA. Towards the sender's clock
// stretcher it raises RS (stretch request) and waits for AS (stretch granted)
// before touching AR, so the sender island is always paused while the channel
// moves. One cycle of the specification (SR+ then SR-) carries two words:
//   SR+ /RS+ ; AS+ /AR+ SA+ ; AA+ /AR- ; AA- /RS- ; AS- /
//   SR- /RS+ ; AS+ /AR+ SA- ; AA+ /AR- ; AA- /RS- ; AS- /
// The logic is the two-level hazard-free cover of that specification, with one
// feedback variable Y0, exactly as it would sit in LUTs:
//   RS = AA + SR.~Y0 + ~SR.Y0
//   AR = SR.AS.~AA.~Y0 + ~SR.AS.~AA.Y0
//   SA = SR.Y0 + ~AS.Y0 + SR.AS
//   Y0 = SR.AA + SR.Y0 + ~AA.Y0
// The feedback enters through a reset gate (Y0 is forced low while rst is
// high), which puts the controller in its state 0 when SR, AS and AA are low.
// The specification and the equations follow the published controller; the
// choice of which literals carry a complement in RS and AR was checked
// against the ten states above. The reset gate is as in the published LUT
// layout.
//
// Timing: purely combinational with feedback; it must be operated in
// fundamental mode (one input burst at a time, settled before the next).
// The combinational loop through Y0 is the state-holding element of this
// asynchronous controller and is intended; in an FPGA it is placed as a hard
// macro so that its isochronic forks are respected.
`timescale 1ps/1ps
module scaffi_output_port (
  input  logic rst,  // active high, holds Y0 low
  input  logic sr,   // synchronous request from the sender island (2-phase)
  output logic sa,   // synchronous acknowledge to the sender island (2-phase)
  output logic ar,   // asynchronous request to the input port (4-phase)
  input  logic aa,   // asynchronous acknowledge from the input port (4-phase)
  output logic rs,   // request stretch to the sender clock stretcher
  input  logic as    // stretch acknowledge from the sender clock stretcher
);

  logic y0;     // state variable
  logic y0_fb;  // fed-back state, gated by reset

  assign y0_fb = y0 & ~rst;

  assign y0 = (sr & aa) | (sr & y0_fb) | (~aa & y0_fb);
  assign rs = aa | (sr & ~y0_fb) | (~sr & y0_fb);
  assign ar = (sr & as & ~aa & ~y0_fb) | (~sr & as & ~aa & y0_fb);
  assign sa = (sr & y0_fb) | (~as & y0_fb) | (sr & as);

endmodule
