// tb_lbc_encoder: self-checking test of the parallel encoder.
// The default (16,8) registered encoder gets random messages with random
// gaps in in_valid; one clock after each accepted message b must equal the
// reference parities and c the systematic word (b | m), and both must hold
// while in_valid is low.  A (8,4) encoder built with REGISTERED=0 must give
// its coded word in the same cycle (zero clock delay) for every message.
module tb_lbc_encoder;
  import tb_lbc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n, in_valid;
  logic [7:0]  m;
  logic        ov;
  logic [7:0]  b;
  logic [15:0] c;

  logic [3:0]  m4;
  logic        ov4;
  logic [3:0]  b4;
  logic [7:0]  c4;

  lbc_encoder dut (.clk, .rst_n, .in_valid, .m, .out_valid(ov), .b, .c);

  lbc_encoder #(.N(8), .K(4), .P(lbc_pkg::P_8_4), .REGISTERED(1'b0)) dut_comb (
    .clk, .rst_n, .in_valid, .m(m4), .out_valid(ov4), .b(b4), .c(c4));

  logic [7:0] last_m;
  logic       exp_v;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: m=%h b=%h c=%h v=%b", what, $time, last_m, b, c, ov);
    end
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; m = '0; m4 = '0;
    repeat (2) @(posedge clk);
    #1 check(ov == 1'b0 && c == '0, "reset");
    @(negedge clk) rst_n = 1'b1;
    last_m = '0;
    // zero-delay encoder: every message, checked in the same cycle
    for (int x = 0; x < 16; x++) begin
      m4 = 4'(x); #1;
      checks++;
      if (c4 !== 8'(codeword(CODE_8_4, 16'(m4))) || b4 !== 4'(parity(CODE_8_4, 16'(m4)))) begin
        failures++;
        $display("FAIL comb (8,4) m=%h c=%h", m4, c4);
      end
    end
    // registered encoder: one clock of latency
    repeat (600) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      m = 8'($urandom);
      @(posedge clk);
      exp_v = in_valid;
      if (in_valid) last_m = m;
      #1;
      check(ov == exp_v, "valid latency");
      check(b == 8'(parity(CODE_16_8, 16'(last_m))), "parity");
      check(c == codeword(CODE_16_8, 16'(last_m)), "coded word");
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
