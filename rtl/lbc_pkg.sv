// lbc_pkg: generator parity matrices of the systematic linear block codes
// used by the encoder and decoder.
//
// A systematic (n,k) code appends n-k parity bits b = m P to a k-bit message
// m, giving the coded word c = (b | m) and the generator G = (P | I_k).  The
// matrix P (k rows, n-k columns) is the whole definition of the code.  Each
// matrix below is declared with ascending ranges, [0:k-1][0:n-k-1], so that a
// literal reads exactly like the printed matrix: the first word is row 0 and
// its leftmost bit is p(0,0).  Element P[i][j] is p(i,j), the contribution of
// message bit m_i to parity bit b_j.
//
// The three codes are the sample generator results of the design:
//   P_7_4  : standard (7,4) Hamming code, the CRC code of g(X) = 1 + X + X^3.
//            Its rows are X^(3+i) mod g(X), coefficient of X^0 first; minimum
//            distance 3, so every 1- and 2-bit error is detected.
//   P_8_4  : (8,4) code, minimum distance 4, every error of up to 3 bits is
//            detected.
//   P_16_8 : (16,8) code, minimum distance 5, every error of up to 4 bits is
//            detected.  This is the default code of all modules.
package lbc_pkg;

  localparam logic [0:3][0:2] P_7_4 = {
    3'b110,
    3'b011,
    3'b111,
    3'b101
  };

  localparam logic [0:3][0:3] P_8_4 = {
    4'b0111,
    4'b1011,
    4'b1101,
    4'b1110
  };

  localparam logic [0:7][0:7] P_16_8 = {
    8'b00001111,
    8'b00110011,
    8'b01010101,
    8'b01101010,
    8'b10010110,
    8'b10101011,
    8'b11011111,
    8'b11100111
  };

endpackage
