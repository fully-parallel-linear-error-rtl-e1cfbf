// lbc_encoder: fully parallel encoder of a systematic (n,k) linear block code.
//
// The k message bits are captured in the input register; from the register
// the parity generator forms the n-k frame-check (FCS) parity bits
// b = m P in a single AND/XOR network, with no shift register and no
// iteration.  Besides b the module presents the systematic coded word
// c = (b | m) = m G with G = (P | I_k): parity bits in c[n-k-1:0], message
// bits unchanged in c[n-1:n-k].
//
// Timing: with REGISTERED = 1 (default) b, c and out_valid follow m and
// in_valid by one clock, and hold while in_valid stays low.  With
// REGISTERED = 0 the encoder is combinational (zero clock delay).
//
// The structure (register, one two-bus AND and one XOR tree per parity bit)
// follows the encoder circuit of the design; the coded-word output c, the
// valid bit and the reset are this design's additions.
//
// Ports: clk, rst_n, in_valid, m (K bits) in; out_valid, b (N-K bits),
// c (N bits) out.  Parameters: N, K, P (K x (N-K), see lbc_pkg), REGISTERED.
module lbc_encoder #(
  parameter int unsigned               N          = 16,
  parameter int unsigned               K          = 8,
  parameter logic [0:K-1][0:N-K-1]     P          = lbc_pkg::P_16_8,
  parameter bit                        REGISTERED = 1'b1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [K-1:0]   m,
  output logic           out_valid,
  output logic [N-K-1:0] b,
  output logic [N-1:0]   c
);

  localparam int unsigned R = N - K;

  logic [K-1:0] m_q;

  lbc_reg #(.W(K), .REGISTERED(REGISTERED)) u_reg (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .d        (m),
    .out_valid(out_valid),
    .q        (m_q)
  );

  lbc_parity_gen #(.K(K), .R(R), .P(P)) u_par (
    .m(m_q),
    .b(b)
  );

  assign c = {m_q, b};

endmodule
