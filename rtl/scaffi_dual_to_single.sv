// scaffi_dual_to_single: dual-rail to single-rail converter of the
// dual-rail channel.
//
// One C-element per bit, fed by the true rail and the inverted false rail.
// A valid one (1,0) drives both inputs high, a valid zero (0,1) drives both
// low, and the spacer (0,0) makes them disagree, so the C-element holds the
// last valid bit through the return-to-zero phase. The receiver island can
// therefore read the word after the channel has already returned to the
// spacer. One C-element per bit is as published; feeding it the inverted
// false rail is this design's reading of how the bit is recovered and held.
// Timing: no clock; the output settles one C-element delay after the rails.
// The latches that synthesis reports here are the C-elements' intended state.
`timescale 1ps/1ps
module scaffi_dual_to_single #(
  parameter int unsigned W = scaffi_pkg::DATA_W
) (
  input  logic [W-1:0] t,
  input  logic [W-1:0] f,
  output logic [W-1:0] d
);

  for (genvar i = 0; i < W; i++) begin : g_bit
    c_element u_c (.a(t[i]), .b(~f[i]), .y(d[i]));
  end

endmodule
