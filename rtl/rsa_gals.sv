// rsa_gals: GALS RSA core, the exponentiation island (MX) and the
// multiplication island (MM) joined by one SCAFFI channel.
//
// MX is the sender and MM the receiver. A single channel carries both ways:
// the bundle holds two W-bit operand buses from MX to MM and one W-bit
// result bus from MM to MX, all covered by the one AR/AA handshake. Each
// island has its own stretchable ring-oscillator clock. Because MM
// acknowledges only after the product is ready, the MX clock stays stopped
// for the whole of every multiplication, so the fast exponentiation island
// costs almost no clock activity while the slow multiplier works.
// Clock defaults: MX 72 MHz, MM 40 MHz, the operating points of the published
// prototype. Interface: start/base/exponent/done/result are in the MX clock
// domain (mx_clk is brought out for that); modulus must be stable during an
// exponentiation. rst is asynchronous, active high.
// The AR/AA pair between the two ports closes a combinational loop: it is the
// asynchronous 4-phase handshake itself and is intended.
`timescale 1ps/1ps
module rsa_gals #(
  parameter int unsigned W        = scaffi_pkg::RSA_W,
  parameter int unsigned MX_D3_PS = scaffi_pkg::d3_ps(scaffi_pkg::MX_MHZ),
  parameter int unsigned MM_D3_PS = scaffi_pkg::d3_ps(scaffi_pkg::MM_MHZ)
) (
  input  logic         rst,
  output logic         mx_clk,
  output logic         mm_clk,
  input  logic         start,
  input  logic [W-1:0] base,
  input  logic [W-1:0] exponent,
  input  logic [W-1:0] modulus,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] result,
  output logic         mm_busy
);

  logic         mx_sr, mx_sa, mx_rs, mx_as;
  logic         mm_sr, mm_sa, mm_rs, mm_as;
  logic         ar, aa;
  logic [W-1:0] op_a, op_b, product;

  scaffi_stretcher #(.D3_PS(MX_D3_PS)) u_mx_stretch (
    .req(mx_rs), .ack(mx_as), .clk(mx_clk));

  rsa_modexp #(.W(W)) u_mx (
    .clk(mx_clk), .rst, .start, .base, .exponent, .busy, .done, .result,
    .sr(mx_sr), .sa(mx_sa), .op_a, .op_b, .mm_result(product));

  scaffi_output_port u_out (
    .rst, .sr(mx_sr), .sa(mx_sa), .ar, .aa, .rs(mx_rs), .as(mx_as));

  scaffi_input_port u_in (
    .rst, .ar, .aa, .sr(mm_sr), .sa(mm_sa), .rs(mm_rs), .as(mm_as));

  scaffi_stretcher #(.D3_PS(MM_D3_PS)) u_mm_stretch (
    .req(mm_rs), .ack(mm_as), .clk(mm_clk));

  rsa_modmul #(.W(W)) u_mm (
    .clk(mm_clk), .rst, .sr(mm_sr), .sa(mm_sa), .a(op_a), .b(op_b),
    .n(modulus), .result(product), .busy(mm_busy));

endmodule
