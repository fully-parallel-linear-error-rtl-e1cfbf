// lbc_xor_tree: XOR reduction of a W-bit bus through a balanced tree of
// two-input XOR gates.
//
// Level 0 of the tree is the input bus.  Each further level XORs neighbouring
// pairs of the level below (node i of level l = nodes 2i and 2i+1 of level
// l-1); an odd node left over at the end of a level is passed up unchanged.
// After ceil(log2 W) levels a single node remains, the parity of the bus.
// The depth, and with it the delay, therefore grows only with log2 W.  This
// explicit tree is this design's choice of shape; any XOR tree computes the
// same function.
//
// Purely combinational, no clock.  Ports: a (W bits) in; y (1 bit) out,
// y = a_0 XOR a_1 XOR ... XOR a_(W-1).
module lbc_xor_tree #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  output logic         y
);

  localparam int unsigned DEPTH = (W > 1) ? $clog2(W) : 0;

  // Number of nodes on level l: ceil(W / 2^l).
  function automatic int unsigned nodes_at(int unsigned l);
    return (W + (1 << l) - 1) >> l;
  endfunction

  logic [W-1:0] node [DEPTH+1];

  assign node[0] = a;

  for (genvar l = 1; l <= DEPTH; l++) begin : g_level
    for (genvar i = 0; i < W; i++) begin : g_node
      if (i < nodes_at(l)) begin : g_used
        if (2 * i + 1 < nodes_at(l - 1)) begin : g_pair
          assign node[l][i] = node[l-1][2*i] ^ node[l-1][2*i+1];
        end else begin : g_pass
          assign node[l][i] = node[l-1][2*i];
        end
      end else begin : g_unused
        assign node[l][i] = 1'b0;
      end
    end
  end

  assign y = node[DEPTH][0];

endmodule
