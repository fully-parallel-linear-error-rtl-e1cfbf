// lbc_parity_gen: fully parallel parity generator b = m P of a systematic
// linear block code, the combinational core of the encoder.
//
// Parity bit j is the modulo-2 inner product of the message with column j of
// the parity matrix:
//   b_j = (m_0 AND p(0,j)) XOR (m_1 AND p(1,j)) XOR ... XOR (m_(k-1) AND p(k-1,j)).
// For every column the module instantiates one two-bus AND (message bus with
// the column of generator parities) and one XOR tree that reduces the k
// products to b_j.  All R = n-k columns work side by side, so the delay is one
// AND level plus ceil(log2 k) XOR levels, independent of R.  Because P is a
// parameter, a synthesis tool folds the constant ANDs away and keeps only XOR
// trees over the message bits whose p(i,j) is 1.
//
// The decoder uses the same circuit to recompute the parities from the
// received message bits.
//
// Ports: m (K bits, bit i = m_i) in; b (R bits, bit j = b_j) out.
// Parameters: K message bits, R = n-k parity bits, P the K x R parity matrix
// with P[i][j] = p(i,j) (see lbc_pkg).  Combinational, no clock.
module lbc_parity_gen #(
  parameter int unsigned               K = 8,
  parameter int unsigned               R = 8,
  parameter logic [0:K-1][0:R-1]       P = lbc_pkg::P_16_8
) (
  input  logic [K-1:0] m,
  output logic [R-1:0] b
);

  for (genvar j = 0; j < R; j++) begin : g_col
    logic [K-1:0] column;    // generator parities p(0..K-1, j)
    logic [K-1:0] products;  // m_i AND p(i,j)

    for (genvar i = 0; i < K; i++) begin : g_bit
      assign column[i] = P[i][j];
    end

    lbc_two_bus_and #(.W(K)) u_and (
      .a(m),
      .b(column),
      .y(products)
    );

    lbc_xor_tree #(.W(K)) u_xor (
      .a(products),
      .y(b[j])
    );
  end

endmodule
