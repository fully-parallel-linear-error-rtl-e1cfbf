// lbc_two_bus_and: bit-wise AND of two equally wide buses.
//
// In the parallel encoder one instance per parity column gates the k message
// bits with that column's generator parities p(0..k-1, j): y_i = m_i AND
// p(i,j).  The XOR tree that follows turns these products into one parity bit.
// Purely combinational, no clock; the output follows the inputs after one
// gate delay.
//
// Ports: a, b (W bits) in; y (W bits) out.
module lbc_two_bus_and #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  assign y = a & b;

endmodule
