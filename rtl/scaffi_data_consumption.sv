// scaffi_data_consumption: receiver island side of a SCAFFI channel.
//
// A word is pending when SR (from the input port) differs from SA. SR only
// changes while this island's clock is stretched, so it is already stable at
// the first clock edge after the stretch. On an edge where a word is pending
// and the island's logic accepts (accept high) the data bus is registered to
// out_data, out_valid pulses for one cycle and SA is toggled, which lets the
// input port finish the 4-phase cycle and in turn releases the sender clock.
// Holding accept low keeps the word pending and the sender paused; that is
// the back-pressure of the interface. The 2-phase handshake follows the
// published interface; the accept input is this design's own. Reset is
// asynchronous, active high.
`timescale 1ps/1ps
module scaffi_data_consumption #(
  parameter int unsigned W = scaffi_pkg::DATA_W
) (
  input  logic         clk,        // stretchable receiver clock
  input  logic         rst,
  input  logic         sr,         // from input port
  output logic         sa,         // to input port
  input  logic [W-1:0] data,       // bundled data bus
  input  logic         accept,     // island ready to take a word
  output logic [W-1:0] out_data,
  output logic         out_valid   // one-cycle pulse per received word
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sa        <= 1'b0;
      out_data  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if ((sr != sa) && accept) begin
        out_data  <= data;
        out_valid <= 1'b1;
        sa        <= sr;
      end
    end
  end

  // Back-pressure rule: without accept, SA must not move.
  a_no_ack_without_accept: assert property (
    @(posedge clk) disable iff (rst) !accept |=> $stable(sa));

endmodule
