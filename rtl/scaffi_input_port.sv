// scaffi_input_port: receiver-side SCAFFI controller.
//
// A burst-mode asynchronous state machine with ten states. It receives the
// 4-phase AR/AA handshake from the output port and turns it into a 2-phase
// SR/SA handshake towards the receiver island. Every AR+ first stretches the
// receiver clock (RS = AR); only once the stretcher answers AS+ does the port
// toggle SR and raise AA, so SR always changes while the receiver island is
// paused and is stable when its clock restarts. AR- releases the receiver
// clock; the island then consumes the word, toggles SA, and the port drops AA:
//   AR+ /RS+ ; AS+ /AA+ SR+ ; AR- /RS- ; AS- / ; SA+ /AA-
//   AR+ /RS+ ; AS+ /AA+ SR- ; AR- /RS- ; AS- / ; SA- /AA-
// Logic, with one feedback variable Y0 gated by reset:
//   RS = AR
//   SR = ~SA.AS + Y0 + SA.~AS.AR
//   AA = ~SA.Y0 + AS + SA.~AR.~Y0
//   Y0 = ~SA.AS.AR + ~AR.Y0
// The specification and the equations follow the published controller; the
// complemented literals in the last terms of SR and AA were fixed by checking
// the equations against every state of the specification. The reset gate on
// Y0 mirrors the one used in the output port.
//
// Timing: combinational with feedback, fundamental mode. The loop through Y0
// is the intended state-holding element of this asynchronous controller.
`timescale 1ps/1ps
module scaffi_input_port (
  input  logic rst,  // active high, holds Y0 low
  input  logic ar,   // asynchronous request from the channel (4-phase)
  output logic aa,   // asynchronous acknowledge to the channel (4-phase)
  output logic sr,   // synchronous request to the receiver island (2-phase)
  input  logic sa,   // synchronous acknowledge from the receiver island (2-phase)
  output logic rs,   // request stretch to the receiver clock stretcher
  input  logic as    // stretch acknowledge from the receiver clock stretcher
);

  logic y0;
  logic y0_fb;

  assign y0_fb = y0 & ~rst;

  assign y0 = (~sa & as & ar) | (~ar & y0_fb);
  assign rs = ar;
  assign sr = (~sa & as) | y0_fb | (sa & ~as & ar);
  assign aa = (~sa & y0_fb) | as | (sa & ~ar & ~y0_fb);

endmodule
