// scaffi_validity_detection: completion detector of the dual-rail channel.
//
// One XOR per bit tells whether that bit's rail pair holds a value (exactly
// one rail high) or the spacer; a balanced binary tree of C-elements combines
// the W bit flags. The tree output rises only when every bit is valid and
// falls only when every bit has returned to the spacer, which makes it the
// receiver-side copy of the asynchronous request AR, free of any bundling
// delay assumption. Structure (W XORs and a C-element tree) as published; the
// tree is laid out as a heap: node k combines nodes 2k and 2k+1, leaves are
// nodes W..2W-1, node 1 is the output.
// Timing: combinational plus C-element state; no clock.
// The latches that synthesis reports here are the C-elements' intended state.
`timescale 1ps/1ps
module scaffi_validity_detection #(
  parameter int unsigned W = scaffi_pkg::DATA_W
) (
  input  logic [W-1:0] t,
  input  logic [W-1:0] f,
  output logic         ar
);

  logic [2*W-1:1] node;

  for (genvar i = 0; i < W; i++) begin : g_leaf
    assign node[W+i] = t[i] ^ f[i];
  end

  if (W == 1) begin : g_single
    assign ar = node[1];
  end else begin : g_tree
    for (genvar k = 1; k < W; k++) begin : g_node
      c_element u_c (.a(node[2*k]), .b(node[2*k+1]), .y(node[k]));
    end
    assign ar = node[1];
  end

endmodule
