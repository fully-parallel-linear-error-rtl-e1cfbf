// tb_lbc_ref_pkg: reference model for the block-code testbenches.
//
// Holds its own copy of the three sample parity matrices, written as the
// rows are printed (character j of row i is p(i,j)), and computes parity
// bits, coded words and syndromes with plain loops over those characters,
// independently of the RTL's package and generate structure.
//   CODE_7_4  : (7,4) Hamming / CRC code of g(X) = 1 + X + X^3
//   CODE_8_4  : (8,4) code, detects all errors of up to 3 bits
//   CODE_16_8 : (16,8) code, detects all errors of up to 4 bits
package tb_lbc_ref_pkg;

  typedef enum int {CODE_7_4 = 0, CODE_8_4 = 1, CODE_16_8 = 2} code_e;

  function automatic int code_n(code_e code);
    case (code)
      CODE_7_4: return 7;
      CODE_8_4: return 8;
      default:  return 16;
    endcase
  endfunction

  function automatic int code_k(code_e code);
    case (code)
      CODE_7_4: return 4;
      CODE_8_4: return 4;
      default:  return 8;
    endcase
  endfunction

  // Printed row i of the parity matrix of a code.
  function automatic string row(code_e code, int i);
    string r74 [4] = '{"110", "011", "111", "101"};
    string r84 [4] = '{"0111", "1011", "1101", "1110"};
    string r168[8] = '{"00001111", "00110011", "01010101", "01101010",
                       "10010110", "10101011", "11011111", "11100111"};
    case (code)
      CODE_7_4: return r74[i];
      CODE_8_4: return r84[i];
      default:  return r168[i];
    endcase
  endfunction

  function automatic bit p(code_e code, int i, int j);
    string s = row(code, i);
    return s[j] == "1";
  endfunction

  // b_j = XOR over i of m_i AND p(i,j)
  function automatic logic [15:0] parity(code_e code, logic [15:0] m);
    logic [15:0] b = '0;
    for (int j = 0; j < code_n(code) - code_k(code); j++)
      for (int i = 0; i < code_k(code); i++)
        if (m[i] && p(code, i, j)) b[j] = ~b[j];
    return b;
  endfunction

  // c = (b | m): parity bits low, message bits above them
  function automatic logic [15:0] codeword(code_e code, logic [15:0] m);
    int r = code_n(code) - code_k(code);
    logic [15:0] c = parity(code, m);
    for (int i = 0; i < code_k(code); i++) c[r+i] = m[i];
    return c;
  endfunction

  // s_j = r_j XOR (XOR over i of r_(n-k+i) AND p(i,j))
  function automatic logic [15:0] syndrome(code_e code, logic [15:0] rx);
    int r = code_n(code) - code_k(code);
    logic [15:0] msg = '0;
    logic [15:0] s;
    for (int i = 0; i < code_k(code); i++) msg[i] = rx[r+i];
    s = parity(code, msg);
    for (int j = 0; j < r; j++) s[j] = s[j] ^ rx[j];
    return s;
  endfunction

  function automatic int weight(logic [15:0] v);
    int w = 0;
    for (int q = 0; q < 16; q++) w += int'(v[q]);
    return w;
  endfunction

endpackage
