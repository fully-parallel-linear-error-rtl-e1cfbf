// lbc_decoder: fully parallel syndrome decoder of a systematic (n,k) linear
// block code.
//
// The received word r = (r_0..r_(n-k-1) ; r_(n-k)..r_(n-1)) holds the
// received parity bits followed by the received message bits.  Both parts are
// captured in input registers.  The message part goes through the same parity
// generator as in the encoder, and a two-bus XOR compares the recomputed
// parities with the received ones:
//   s_j = r_j XOR (r_(n-k) AND p(0,j)) XOR ... XOR (r_(n-1) AND p(k-1,j)),
// i.e. s = r H with H = (I_(n-k) ; P).  For a word without errors s = 0; an
// error vector e gives s = e H, which is non-zero for every error the code
// detects.  err is the OR of the syndrome bits.
//
// Timing: with REGISTERED = 1 (default) s, err and out_valid follow r and
// in_valid by one clock.  With REGISTERED = 0 the decoder is combinational.
//
// The structure (separate registers for parity and message bits, encoder
// circuit, two-bus XOR) follows the decoder circuit of the design; err, the
// valid bit and the reset are this design's additions.  No correction is
// made: the syndrome is the output.
//
// Ports: clk, rst_n, in_valid, r (N bits) in; out_valid, s (N-K bits), err
// out.  Parameters: N, K, P (K x (N-K), see lbc_pkg), REGISTERED.
module lbc_decoder #(
  parameter int unsigned               N          = 16,
  parameter int unsigned               K          = 8,
  parameter logic [0:K-1][0:N-K-1]     P          = lbc_pkg::P_16_8,
  parameter bit                        REGISTERED = 1'b1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   r,
  output logic           out_valid,
  output logic [N-K-1:0] s,
  output logic           err
);

  localparam int unsigned R = N - K;

  logic [R-1:0] par_q;     // received parity bits, registered
  logic [K-1:0] msg_q;     // received message bits, registered
  logic [R-1:0] par_calc;  // parities recomputed from msg_q
  logic         par_valid;
  logic         msg_valid;

  lbc_reg #(.W(R), .REGISTERED(REGISTERED)) u_reg_par (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .d        (r[R-1:0]),
    .out_valid(par_valid),
    .q        (par_q)
  );

  lbc_reg #(.W(K), .REGISTERED(REGISTERED)) u_reg_msg (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .d        (r[N-1:R]),
    .out_valid(msg_valid),
    .q        (msg_q)
  );

  lbc_parity_gen #(.K(K), .R(R), .P(P)) u_par (
    .m(msg_q),
    .b(par_calc)
  );

  lbc_two_bus_xor #(.W(R)) u_cmp (
    .a(par_q),
    .b(par_calc),
    .y(s)
  );

  assign out_valid = par_valid & msg_valid;
  assign err       = |s;

endmodule
