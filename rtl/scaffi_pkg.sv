// scaffi_pkg: constants shared by the SCAFFI modules.
//
// Widths: the bundled and dual-rail example channels carry 16-bit words (the
// waveform example transfers 16-bit values and the dual-rail drawing shows
// bits d0..d15); the RSA use case works on 128-bit operands.
// Delays: the stretcher is a delay-line ring oscillator. The element delays
// below (inverter, mux, C-element, D1, D2) are this design's own choice, in
// picoseconds; D3 is derived from the wanted clock frequency with d3_ps().
`timescale 1ps/1ps
package scaffi_pkg;

  localparam int unsigned DATA_W = 16;   // bundled / dual-rail channel width
  localparam int unsigned RSA_W  = 128;  // RSA operand and result width

  // Behavioural delays of the stretcher elements, in ps.
  localparam int unsigned INV_PS  = 100;
  localparam int unsigned MUX_PS  = 100;
  localparam int unsigned CEL_PS  = 100;
  localparam int unsigned D2_PS   = 300;
  localparam int unsigned D1_PS   = 400;  // must exceed MUX_PS + CEL_PS

  // Clock frequencies of the examples, in MHz.
  localparam int unsigned SENDER_MHZ   = 50;  // bundled example sender
  localparam int unsigned RECEIVER_MHZ = 78;  // bundled example receiver
  localparam int unsigned MX_MHZ       = 72;  // RSA exponentiation island
  localparam int unsigned MM_MHZ       = 40;  // RSA multiplication island

  // Half a period of the ring is D3 + inverter + D2 + mux + C-element.
  function automatic int unsigned d3_ps(input int unsigned mhz);
    return 500_000 / mhz - (INV_PS + D2_PS + MUX_PS + CEL_PS);
  endfunction

endpackage
