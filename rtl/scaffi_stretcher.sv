// scaffi_stretcher: behavioural model of the SCAFFI clock stretcher.
//
// This is a behavioural model with delays, not synthesizable logic: the real
// part is a delay-line ring oscillator built as a hard macro. The ring runs
// from Clock through delay line D3, an inverter, delay line D2, a 2:1 mux and
// a C-element back to Clock. The mux select is Req:
//   Req = 0  the mux passes D2's output, the C-element sees two equal inputs
//            once the inverted clock has crossed D2 and toggles: the ring
//            oscillates with a half period of D3 + inverter + D2 + mux + C.
//   Req = 1  the mux passes Clock itself; the C-element then sees Clock and
//            the inverted, delayed Clock, which disagree, so it holds. The
//            clock is frozen at whichever level it had, high or low.
// Ack is Req delayed by D1, chosen longer than mux plus C-element, so Ack only
// rises once Clock is already held. No arbiter is needed.
// The ring structure, the mux polarity and the D1 rule follow the published
// stretcher; the delay values are this design's own (see scaffi_pkg), D3 is
// chosen per instance to set the frequency.
//
// Interface: req (from a port's RS), ack (to the port's AS), clk (the island
// clock). Timing: clk starts low at time 0 and oscillates unless req is high.
`timescale 1ps/1ps
module scaffi_stretcher #(
  parameter int unsigned D3_PS  = scaffi_pkg::d3_ps(scaffi_pkg::SENDER_MHZ),
  parameter int unsigned D2_PS  = scaffi_pkg::D2_PS,
  parameter int unsigned D1_PS  = scaffi_pkg::D1_PS,
  parameter int unsigned INV_PS = scaffi_pkg::INV_PS,
  parameter int unsigned MUX_PS = scaffi_pkg::MUX_PS,
  parameter int unsigned CEL_PS = scaffi_pkg::CEL_PS
) (
  input  logic req,
  output logic ack,
  output logic clk
);

  // Consistent starting point of the ring: clock low, everything upstream
  // already settled for a rising transition.
  logic clk_r   = 1'b0;
  logic ack_r   = 1'b0;
  logic d3_out  = 1'b0;
  logic inv_out = 1'b1;
  logic d2_out  = 1'b1;
  logic mux_out = 1'b0;

  assign clk = clk_r;
  assign ack = ack_r;

  // Each element is a process that evaluates its input at time 0 and then
  // whenever it differs from the value last seen (a level-sensitive wait, so
  // no change can slip by), and schedules the new output after its delay in
  // a thread of its own. Every change is thus carried through (transport
  // delay), even when several are in flight in one delay line.
  logic d3_in_seen;
  always begin
    d3_in_seen = clk_r;
    fork
      automatic logic v = d3_in_seen;
      #(D3_PS) d3_out = v;
    join_none
    wait ((clk_r) != d3_in_seen);
  end

  logic inv_in_seen;
  always begin
    inv_in_seen = ~d3_out;
    fork
      automatic logic v = inv_in_seen;
      #(INV_PS) inv_out = v;
    join_none
    wait ((~d3_out) != inv_in_seen);
  end

  logic d2_in_seen;
  always begin
    d2_in_seen = inv_out;
    fork
      automatic logic v = d2_in_seen;
      #(D2_PS) d2_out = v;
    join_none
    wait ((inv_out) != d2_in_seen);
  end

  logic mux_in_seen;
  always begin
    mux_in_seen = req ? clk_r : d2_out;
    fork
      automatic logic v = mux_in_seen;
      #(MUX_PS) mux_out = v;
    join_none
    wait ((req ? clk_r : d2_out) != mux_in_seen);
  end

  // C-element closing the ring: follows its inputs when they agree.
  logic c_a, c_b;
  always begin
    c_a = mux_out;
    c_b = inv_out;
    if (c_a == c_b) begin
      fork
        automatic logic v = c_a;
        #(CEL_PS) clk_r = v;
      join_none
    end
    wait (mux_out != c_a || inv_out != c_b);
  end

  // Acknowledge delay line.
  logic d1_in_seen;
  always begin
    d1_in_seen = req;
    fork
      automatic logic v = d1_in_seen;
      #(D1_PS) ack_r = v;
    join_none
    wait ((req) != d1_in_seen);
  end

endmodule
