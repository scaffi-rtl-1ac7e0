// scaffi_data_production: sender island side of a SCAFFI channel.
//
// Turns a valid/ready word stream of the sender's logic into the 2-phase
// SR/SA handshake of the output port. The channel is free when SA equals SR;
// then a word offered with in_valid is registered onto the data bus and SR is
// toggled in the same clock edge. The output port immediately stretches this
// island's clock and keeps it stretched until the receiver has consumed the
// word, so the bus stays stable for as long as the receiver needs it (the
// bundled-data constraint is met by construction). When the clock resumes SA
// already equals SR again and the next word may go out on that edge.
// The 2-phase handshake and the "send on a clock edge, then be paused" rule
// follow the published interface; the valid/ready front end is this design's
// own. Reset is asynchronous, active high.
`timescale 1ps/1ps
module scaffi_data_production #(
  parameter int unsigned W = scaffi_pkg::DATA_W
) (
  input  logic         clk,       // stretchable sender clock
  input  logic         rst,
  input  logic [W-1:0] in_data,
  input  logic         in_valid,
  output logic         in_ready,  // channel free, word accepted this edge
  output logic         sr,        // to output port
  input  logic         sa,        // from output port
  output logic [W-1:0] data       // bundled data bus
);

  assign in_ready = (sr == sa);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sr   <= 1'b0;
      data <= '0;
    end else if (in_valid && in_ready) begin
      data <= in_data;
      sr   <= ~sr;
    end
  end

  // 2-phase rule: while a word is pending (SR != SA) neither the bus nor SR
  // may change.
  a_hold_while_pending: assert property (
    @(posedge clk) disable iff (rst) (sr != sa) |=> ($stable(data) && $stable(sr)));

endmodule
