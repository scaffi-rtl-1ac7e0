// rsa_modexp: MX, the modular exponentiation island of the GALS RSA core.
//
// Computes base^exponent mod n (n held by the multiplication island) as a
// control loop of modular multiplications, scanning the W exponent bits from
// the most significant one:  r = r*r ; if bit set, r = r*base.  r starts at
// 1, so an exponentiation issues W squarings plus one multiplication per set
// exponent bit. Every multiplication is a SCAFFI transfer: the operands go
// out on two W-bit buses and SR is toggled; the output port then stretches
// this island's clock and keeps it stretched until the multiplication island
// has acknowledged, which it does only once the product is on the result bus.
// So the first edge after the stretch already sees SA == SR and takes the
// product: this island spends no clock edges waiting.
// The loop structure and the bus widths follow the published use case; the
// square-and-multiply order is this design's own choice.
// Interface: start (one cycle, while idle) with base (< n) and exponent;
// done pulses one cycle with result valid from then on. Reset is
// asynchronous, active high.
`timescale 1ps/1ps
module rsa_modexp #(
  parameter int unsigned W = scaffi_pkg::RSA_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] base,
  input  logic [W-1:0] exponent,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] result,
  // SCAFFI sender side
  output logic         sr,
  input  logic         sa,
  output logic [W-1:0] op_a,
  output logic [W-1:0] op_b,
  input  logic [W-1:0] mm_result
);

  typedef enum logic [2:0] {
    MX_IDLE, MX_SQUARE, MX_WAIT_SQUARE, MX_MULTIPLY, MX_WAIT_MULTIPLY
  } mx_state_e;

  mx_state_e            state;
  logic [W-1:0]         r, b, e;
  logic [$clog2(W)-1:0] idx;

  assign busy = (state != MX_IDLE);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state  <= MX_IDLE;
      sr     <= 1'b0;
      op_a   <= '0;
      op_b   <= '0;
      r      <= '0;
      b      <= '0;
      e      <= '0;
      idx    <= '0;
      done   <= 1'b0;
      result <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        MX_IDLE: if (start) begin
          r     <= W'(1);
          b     <= base;
          e     <= exponent;
          idx   <= ($clog2(W))'(W - 1);
          state <= MX_SQUARE;
        end
        MX_SQUARE: begin
          op_a  <= r;
          op_b  <= r;
          sr    <= ~sr;
          state <= MX_WAIT_SQUARE;
        end
        MX_WAIT_SQUARE: if (sa == sr) begin
          r <= mm_result;
          if (e[idx]) begin
            state <= MX_MULTIPLY;
          end else if (idx == '0) begin
            result <= mm_result;
            done   <= 1'b1;
            state  <= MX_IDLE;
          end else begin
            idx   <= idx - 1'b1;
            state <= MX_SQUARE;
          end
        end
        MX_MULTIPLY: begin
          op_a  <= r;
          op_b  <= b;
          sr    <= ~sr;
          state <= MX_WAIT_MULTIPLY;
        end
        MX_WAIT_MULTIPLY: if (sa == sr) begin
          r <= mm_result;
          if (idx == '0) begin
            result <= mm_result;
            done   <= 1'b1;
            state  <= MX_IDLE;
          end else begin
            idx   <= idx - 1'b1;
            state <= MX_SQUARE;
          end
        end
        default: state <= MX_IDLE;
      endcase
    end
  end

endmodule
