// tb_lbc_parity_gen: self-checking test of the parallel parity generator for
// the three sample codes (7,4), (8,4) and (16,8).
// Every message of each code is applied and the parity bits are compared
// with the reference model's matrix product m P.  For the (7,4) code the
// parities are also checked against the remainder of the polynomial division
// m(X) X^3 mod g(X), g(X) = 1 + X + X^3, which is the CRC definition of the
// same code and independent of the printed matrix.
module tb_lbc_parity_gen;
  import tb_lbc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] m74, m84;
  logic [7:0] m168;
  logic [2:0] b74;
  logic [3:0] b84;
  logic [7:0] b168;

  lbc_parity_gen #(.K(4), .R(3), .P(lbc_pkg::P_7_4)) dut74  (.m(m74),  .b(b74));
  lbc_parity_gen #(.K(4), .R(4), .P(lbc_pkg::P_8_4)) dut84  (.m(m84),  .b(b84));
  lbc_parity_gen                                      dut168 (.m(m168), .b(b168));

  // Remainder of m(X) * X^3 divided by g(X) = 1 + X + X^3 (bit q = coefficient of X^q).
  function automatic logic [2:0] crc3(logic [3:0] m);
    logic [6:0] v = {m, 3'b000};
    for (int d = 6; d >= 3; d--)
      if (v[d]) v = v ^ (7'b0001011 << (d - 3));
    return v[2:0];
  endfunction

  task automatic check(logic [15:0] got, logic [15:0] exp, string what, logic [15:0] m);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s m=%h b=%h expected %h", what, m, got, exp);
    end
  endtask

  initial begin
    for (int x = 0; x < 256; x++) begin
      m74 = 4'(x); m84 = 4'(x >> 4); m168 = 8'(x);
      @(posedge clk);
      check(16'(b168), parity(CODE_16_8, 16'(m168)), "(16,8)", 16'(m168));
      check(16'(b84),  parity(CODE_8_4, 16'(m84)),   "(8,4)",  16'(m84));
      check(16'(b74),  parity(CODE_7_4, 16'(m74)),   "(7,4)",  16'(m74));
      check(16'(b74),  16'(crc3(m74)),               "(7,4) CRC", 16'(m74));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
