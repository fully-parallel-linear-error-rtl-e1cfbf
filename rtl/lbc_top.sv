// lbc_top: coding link of a systematic (n,k) linear block code, from message
// to syndrome.
//
//   m --> encoder (G) --> c --> (+) e --> r --> decoder (H) --> s, err
//
// The encoder turns the k-bit message m into the n-bit coded word
// c = (b | m).  The error vector e is superimposed on c bit by bit (a 1 in e
// flips that bit), giving the received word r.  The decoder recomputes the
// parities from the received message bits and outputs the n-k syndrome bits
// s and the flag err = (s != 0).  With the default (16,8) code every error of
// 1 to 4 bits sets err; errors equal to a non-zero codeword (weight 5 or
// more) pass undetected, as for any linear code.
//
// e is applied in the same cycle as m; the top delays it by the encoder's
// latency so that it meets the coded word.  e is a fault-injection input;
// tie it to zero for an error-free link.
//
// Timing with REGISTERED = 1 (default): c, r and enc_valid one clock after
// m/in_valid; s, err and dec_valid two clocks after.  With REGISTERED = 0 the
// whole link is combinational.
//
// Ports: clk, rst_n, in_valid, m (K bits), e (N bits) in; enc_valid,
// c (N bits), r (N bits), dec_valid, s (N-K bits), err out.
// Parameters: N, K, P (K x (N-K) parity matrix, see lbc_pkg), REGISTERED.
module lbc_top #(
  parameter int unsigned               N          = 16,
  parameter int unsigned               K          = 8,
  parameter logic [0:K-1][0:N-K-1]     P          = lbc_pkg::P_16_8,
  parameter bit                        REGISTERED = 1'b1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [K-1:0]   m,
  input  logic [N-1:0]   e,
  output logic           enc_valid,
  output logic [N-1:0]   c,
  output logic [N-1:0]   r,
  output logic           dec_valid,
  output logic [N-K-1:0] s,
  output logic           err
);

  logic [N-1:0]   e_q;      // error vector aligned with c
  logic           e_valid;

  lbc_encoder #(.N(N), .K(K), .P(P), .REGISTERED(REGISTERED)) u_enc (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .m        (m),
    .out_valid(enc_valid),
    .b        (),           // the parities are also c[N-K-1:0]
    .c        (c)
  );

  lbc_reg #(.W(N), .REGISTERED(REGISTERED)) u_err_align (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .d        (e),
    .out_valid(e_valid),
    .q        (e_q)
  );

  lbc_two_bus_xor #(.W(N)) u_channel (
    .a(c),
    .b(e_q),
    .y(r)
  );

  lbc_decoder #(.N(N), .K(K), .P(P), .REGISTERED(REGISTERED)) u_dec (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (enc_valid & e_valid),
    .r        (r),
    .out_valid(dec_valid),
    .s        (s),
    .err      (err)
  );

endmodule
