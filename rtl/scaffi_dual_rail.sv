// scaffi_dual_rail: SCAFFI channel with dual-rail (delay-insensitive) data,
// for islands placed far apart.
//
// Same ports, stretchers and island adapters as the bundled channel, but the
// data cross as W rail pairs instead of a bundled bus plus a request wire:
// the single-to-dual encoder puts the word on the rails while the output
// port's AR is high and returns them to the spacer when AR falls; validity
// detection rebuilds AR on the receiver side from the rails themselves, and
// the dual-to-single converter recovers the word and holds it through the
// spacer. AA returns on a single wire as in the bundled channel. Because the
// receiver's AR is derived from the data, unequal wire delays across the
// channel cannot make the receiver take a word before all its bits arrived.
// Structure as published; delays and stream front ends are this design's own.
// rst is asynchronous, active high.
// The AR/AA pair between the two ports closes a combinational loop: it is the
// asynchronous 4-phase handshake itself and is intended.
`timescale 1ps/1ps
module scaffi_dual_rail #(
  parameter int unsigned W        = scaffi_pkg::DATA_W,
  parameter int unsigned TX_D3_PS = scaffi_pkg::d3_ps(scaffi_pkg::SENDER_MHZ),
  parameter int unsigned RX_D3_PS = scaffi_pkg::d3_ps(scaffi_pkg::RECEIVER_MHZ)
) (
  input  logic         rst,
  output logic         tx_clk,
  input  logic [W-1:0] tx_data,
  input  logic         tx_valid,
  output logic         tx_ready,
  output logic         rx_clk,
  output logic [W-1:0] rx_data,
  output logic         rx_valid,
  input  logic         rx_accept,
  // the rails, brought out for observation
  output logic [W-1:0] rail_t,
  output logic [W-1:0] rail_f
);

  logic         tx_sr, tx_sa, tx_rs, tx_as, tx_ar;
  logic         rx_sr, rx_sa, rx_rs, rx_as, rx_ar;
  logic         aa;
  logic [W-1:0] tx_bus, rx_bus;

  scaffi_stretcher #(.D3_PS(TX_D3_PS)) u_tx_stretch (
    .req(tx_rs), .ack(tx_as), .clk(tx_clk));

  scaffi_data_production #(.W(W)) u_prod (
    .clk(tx_clk), .rst, .in_data(tx_data), .in_valid(tx_valid),
    .in_ready(tx_ready), .sr(tx_sr), .sa(tx_sa), .data(tx_bus));

  scaffi_output_port u_out (
    .rst, .sr(tx_sr), .sa(tx_sa), .ar(tx_ar), .aa, .rs(tx_rs), .as(tx_as));

  scaffi_single_to_dual #(.W(W)) u_s2d (
    .d(tx_bus), .ar(tx_ar), .t(rail_t), .f(rail_f));

  scaffi_validity_detection #(.W(W)) u_vd (
    .t(rail_t), .f(rail_f), .ar(rx_ar));

  scaffi_dual_to_single #(.W(W)) u_d2s (
    .t(rail_t), .f(rail_f), .d(rx_bus));

  scaffi_input_port u_in (
    .rst, .ar(rx_ar), .aa, .sr(rx_sr), .sa(rx_sa), .rs(rx_rs), .as(rx_as));

  scaffi_stretcher #(.D3_PS(RX_D3_PS)) u_rx_stretch (
    .req(rx_rs), .ack(rx_as), .clk(rx_clk));

  scaffi_data_consumption #(.W(W)) u_cons (
    .clk(rx_clk), .rst, .sr(rx_sr), .sa(rx_sa), .data(rx_bus),
    .accept(rx_accept), .out_data(rx_data), .out_valid(rx_valid));

endmodule
