// scaffi_bundled: a complete bundled-data SCAFFI channel between two
// independently clocked synchronous islands.
//
// Sender side: data production (2-phase SR/SA), output port, and the clock
// stretcher that makes the sender clock. Receiver side: input port, its clock
// stretcher, and data consumption. Between them run the data bus and the
// 4-phase AR/AA pair. A transfer goes:
//   sender edge: data and SR change -> RS+ stretches the sender clock -> AS+
//   -> AR+ (SA follows SR) -> receiver RS+ stretches the receiver clock -> AS+
//   -> AA+ and receiver SR toggles -> AR- -> receiver clock released -> next
//   receiver edge takes the word and toggles SA -> AA- -> sender RS- ->
//   sender clock released; its next edge can start the next word.
// Each island's clock is only ever stopped, never cut short, so no flip-flop
// samples a changing signal and no synchronizer or arbiter is needed.
// Structure as published; the stream front ends (valid/ready, accept) and all
// delay values are this design's own. The two island clocks are outputs so
// that the surrounding logic of each island can run on them.
// rst is asynchronous, active high, and must be held while both clocks have
// made at least one rising edge.
// The AR/AA pair between the two ports closes a combinational loop: it is the
// asynchronous 4-phase handshake itself and is intended.
`timescale 1ps/1ps
module scaffi_bundled #(
  parameter int unsigned W        = scaffi_pkg::DATA_W,
  parameter int unsigned TX_D3_PS = scaffi_pkg::d3_ps(scaffi_pkg::SENDER_MHZ),
  parameter int unsigned RX_D3_PS = scaffi_pkg::d3_ps(scaffi_pkg::RECEIVER_MHZ)
) (
  input  logic         rst,
  // sender island
  output logic         tx_clk,
  input  logic [W-1:0] tx_data,
  input  logic         tx_valid,
  output logic         tx_ready,
  // receiver island
  output logic         rx_clk,
  output logic [W-1:0] rx_data,
  output logic         rx_valid,
  input  logic         rx_accept
);

  logic         tx_sr, tx_sa, tx_rs, tx_as;
  logic         rx_sr, rx_sa, rx_rs, rx_as;
  logic         ar, aa;
  logic [W-1:0] bus;

  scaffi_stretcher #(.D3_PS(TX_D3_PS)) u_tx_stretch (
    .req(tx_rs), .ack(tx_as), .clk(tx_clk));

  scaffi_data_production #(.W(W)) u_prod (
    .clk(tx_clk), .rst, .in_data(tx_data), .in_valid(tx_valid),
    .in_ready(tx_ready), .sr(tx_sr), .sa(tx_sa), .data(bus));

  scaffi_output_port u_out (
    .rst, .sr(tx_sr), .sa(tx_sa), .ar, .aa, .rs(tx_rs), .as(tx_as));

  scaffi_input_port u_in (
    .rst, .ar, .aa, .sr(rx_sr), .sa(rx_sa), .rs(rx_rs), .as(rx_as));

  scaffi_stretcher #(.D3_PS(RX_D3_PS)) u_rx_stretch (
    .req(rx_rs), .ack(rx_as), .clk(rx_clk));

  scaffi_data_consumption #(.W(W)) u_cons (
    .clk(rx_clk), .rst, .sr(rx_sr), .sa(rx_sa), .data(bus),
    .accept(rx_accept), .out_data(rx_data), .out_valid(rx_valid));

endmodule
