// scaffi_single_to_dual: single-rail to dual-rail encoder of the dual-rail
// SCAFFI channel.
//
// Each data bit d[i] becomes a pair of rails (t[i], f[i]). While the output
// port's asynchronous request AR is high the pair carries the bit (t=1,f=0
// for a one, t=0,f=1 for a zero); while AR is low every pair is in the spacer
// state (0,0). The request is thus embedded in the data rails and needs no
// wire of its own, and the 4-phase return-to-zero of AR returns every rail to
// zero. That the encoder sits on the sender side, is plain logic and takes AR
// from the output port follows the published dual-rail channel; the exact
// gating by AR is this design's own.
// Timing: combinational. The sender's data are stable whenever AR is high,
// because the sender clock is stretched for the whole 4-phase cycle.
`timescale 1ps/1ps
module scaffi_single_to_dual #(
  parameter int unsigned W = scaffi_pkg::DATA_W
) (
  input  logic [W-1:0] d,
  input  logic         ar,
  output logic [W-1:0] t,
  output logic [W-1:0] f
);

  always_comb begin
    t = ar ? d  : '0;
    f = ar ? ~d : '0;
  end

endmodule
