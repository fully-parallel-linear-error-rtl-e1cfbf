// lbc_two_bus_xor: bit-wise XOR of two equally wide buses.
//
// Used in two places.  In the decoder it compares the received parity bits
// with the parities recomputed from the received message bits; the result is
// the syndrome, all zeros when the two agree.  In the top it superimposes an
// error vector on the coded word, modelling a bit flip wherever the error bit
// is 1.  Purely combinational, no clock.
//
// Ports: a, b (W bits) in; y (W bits) out, y_i = a_i XOR b_i.
module lbc_two_bus_xor #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  assign y = a ^ b;

endmodule
