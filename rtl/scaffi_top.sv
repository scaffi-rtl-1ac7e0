// scaffi_top: the three SCAFFI designs side by side.
//
//  - bnd_*  a bundled-data SCAFFI channel, 16-bit words, sender island at
//           50 MHz and receiver island at 78 MHz (the basic architecture);
//  - dr_*   the same channel with dual-rail data between the ports, for
//           distant islands;
//  - rsa_*  the GALS RSA core: 128-bit modular exponentiation and modular
//           multiplication islands joined by a SCAFFI channel.
// The three share only the asynchronous, active-high reset. Each brings out
// its island clocks; stream signals of a channel belong to the clock domain
// of their side (tx_* to the sender clock, rx_* to the receiver clock).
// Each design contains the intended combinational loops of its asynchronous
// controllers and handshakes (see the port and channel modules).
`timescale 1ps/1ps
module scaffi_top #(
  parameter int unsigned W     = scaffi_pkg::DATA_W,
  parameter int unsigned RSA_W = scaffi_pkg::RSA_W
) (
  input  logic             rst,
  // bundled channel
  output logic             bnd_tx_clk,
  input  logic [W-1:0]     bnd_tx_data,
  input  logic             bnd_tx_valid,
  output logic             bnd_tx_ready,
  output logic             bnd_rx_clk,
  output logic [W-1:0]     bnd_rx_data,
  output logic             bnd_rx_valid,
  input  logic             bnd_rx_accept,
  // dual-rail channel
  output logic             dr_tx_clk,
  input  logic [W-1:0]     dr_tx_data,
  input  logic             dr_tx_valid,
  output logic             dr_tx_ready,
  output logic             dr_rx_clk,
  output logic [W-1:0]     dr_rx_data,
  output logic             dr_rx_valid,
  input  logic             dr_rx_accept,
  output logic [W-1:0]     dr_rail_t,
  output logic [W-1:0]     dr_rail_f,
  // GALS RSA
  output logic             rsa_mx_clk,
  output logic             rsa_mm_clk,
  input  logic             rsa_start,
  input  logic [RSA_W-1:0] rsa_base,
  input  logic [RSA_W-1:0] rsa_exponent,
  input  logic [RSA_W-1:0] rsa_modulus,
  output logic             rsa_busy,
  output logic             rsa_done,
  output logic [RSA_W-1:0] rsa_result,
  output logic             rsa_mm_busy
);

  scaffi_bundled #(.W(W)) u_bundled (
    .rst,
    .tx_clk(bnd_tx_clk), .tx_data(bnd_tx_data), .tx_valid(bnd_tx_valid),
    .tx_ready(bnd_tx_ready),
    .rx_clk(bnd_rx_clk), .rx_data(bnd_rx_data), .rx_valid(bnd_rx_valid),
    .rx_accept(bnd_rx_accept));

  scaffi_dual_rail #(.W(W)) u_dual_rail (
    .rst,
    .tx_clk(dr_tx_clk), .tx_data(dr_tx_data), .tx_valid(dr_tx_valid),
    .tx_ready(dr_tx_ready),
    .rx_clk(dr_rx_clk), .rx_data(dr_rx_data), .rx_valid(dr_rx_valid),
    .rx_accept(dr_rx_accept), .rail_t(dr_rail_t), .rail_f(dr_rail_f));

  rsa_gals #(.W(RSA_W)) u_rsa (
    .rst, .mx_clk(rsa_mx_clk), .mm_clk(rsa_mm_clk), .start(rsa_start),
    .base(rsa_base), .exponent(rsa_exponent), .modulus(rsa_modulus),
    .busy(rsa_busy), .done(rsa_done), .result(rsa_result),
    .mm_busy(rsa_mm_busy));

endmodule
