// rsa_modmul: MM, the modular multiplication island of the GALS RSA core.
//
// Computes a*b mod n for W-bit operands (a, b < n) by interleaved
// shift-and-add: for each bit of a, most significant first,
//   p = 2p + a[i]*b ;  p = p - n if p >= n ;  p = p - n if p >= n
// which keeps p below n after every step. One bit per clock, so a product
// takes W cycles after the operands are taken.
// The island is the receiver of a SCAFFI channel and talks to its input port
// with the 2-phase SR/SA handshake. A request (SR != SA) makes it register
// a and b from the bundle and start. Unlike a plain SCAFFI receiver it toggles
// SA only when the product is in the result register, so the 4-phase cycle,
// and with it the stretch of the exponentiation island's clock, lasts for the
// whole multiplication; when the sender clock resumes the result is already
// stable on the result bus. That acknowledge-after-completion and the 128-bit
// operand and result buses follow the published use case; the multiplication
// algorithm is this design's own choice. The modulus n is a static input that
// must be held for a whole exponentiation.
// Reset is asynchronous, active high.
`timescale 1ps/1ps
module rsa_modmul #(
  parameter int unsigned W = scaffi_pkg::RSA_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         sr,      // from input port: operands valid (2-phase)
  output logic         sa,      // to input port: product ready (2-phase)
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] n,
  output logic [W-1:0] result,
  output logic         busy
);

  typedef enum logic {MM_IDLE, MM_RUN} mm_state_e;

  mm_state_e             state;
  logic [W-1:0]          opa, opb;
  logic [W-1:0]          p;
  logic [$clog2(W)-1:0]  idx;
  logic [W+1:0]          p_add, p_red1, p_red2;

  // One interleaved step on the current partial product.
  always_comb begin
    p_add  = {1'b0, p, 1'b0} + (opa[idx] ? {2'b00, opb} : '0);
    p_red1 = (p_add  >= {2'b00, n}) ? p_add  - {2'b00, n} : p_add;
    p_red2 = (p_red1 >= {2'b00, n}) ? p_red1 - {2'b00, n} : p_red1;
  end

  assign busy = (state == MM_RUN);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state  <= MM_IDLE;
      sa     <= 1'b0;
      opa    <= '0;
      opb    <= '0;
      p      <= '0;
      idx    <= '0;
      result <= '0;
    end else begin
      unique case (state)
        MM_IDLE: if (sr != sa) begin
          opa   <= a;
          opb   <= b;
          p     <= '0;
          idx   <= ($clog2(W))'(W - 1);
          state <= MM_RUN;
        end
        MM_RUN: begin
          p   <= p_red2[W-1:0];
          idx <= idx - 1'b1;
          if (idx == '0) begin
            result <= p_red2[W-1:0];
            sa     <= sr;
            state  <= MM_IDLE;
          end
        end
        default: state <= MM_IDLE;
      endcase
    end
  end

endmodule
