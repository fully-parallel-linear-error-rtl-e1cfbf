// tb_lbc_workloads: the three sample codes run end to end through the link.
//
// One lbc_top per code: (7,4) and (8,4) registered, (16,8) in its
// zero-clock form (REGISTERED=0).  For every message of the short codes,
// and for 64 random messages of the (16,8) code, every error vector of
// weight 0 up to the code's detection limit t_D (2, 3 and 4 bits) is sent.
// The coded word must match the reference, a clean word must give a zero
// syndrome and every such error must raise err.
module tb_lbc_workloads;
  import tb_lbc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, in_valid;

  logic [3:0]  m74, m84;
  logic [7:0]  m168;
  logic [6:0]  e74, c74, r74;
  logic [7:0]  e84, c84, r84;
  logic [15:0] e168, c168, r168;
  logic [2:0]  s74;
  logic [3:0]  s84;
  logic [7:0]  s168;
  logic        ev74, dv74, err74, ev84, dv84, err84, ev168, dv168, err168;

  lbc_top #(.N(7), .K(4), .P(lbc_pkg::P_7_4)) dut74 (
    .clk, .rst_n, .in_valid, .m(m74), .e(e74), .enc_valid(ev74), .c(c74), .r(r74),
    .dec_valid(dv74), .s(s74), .err(err74));
  lbc_top #(.N(8), .K(4), .P(lbc_pkg::P_8_4)) dut84 (
    .clk, .rst_n, .in_valid, .m(m84), .e(e84), .enc_valid(ev84), .c(c84), .r(r84),
    .dec_valid(dv84), .s(s84), .err(err84));
  lbc_top #(.REGISTERED(1'b0)) dut168 (
    .clk, .rst_n, .in_valid, .m(m168), .e(e168), .enc_valid(ev168), .c(c168), .r(r168),
    .dec_valid(dv168), .s(s168), .err(err168));

  task automatic expect_ok(logic ok, string what, logic [15:0] m, logic [15:0] e);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s m=%h e=%h", what, m, e);
    end
  endtask

  // send m/e to one of the registered links and check two clocks later
  task automatic run_short(code_e code, logic [3:0] m, logic [15:0] e);
    @(negedge clk);
    in_valid = 1'b1;
    if (code == CODE_7_4) begin m74 = m; e74 = 7'(e); end
    else                  begin m84 = m; e84 = 8'(e); end
    @(negedge clk);
    in_valid = 1'b0;
    if (code == CODE_7_4) expect_ok(ev74 && 16'(c74) == codeword(code, 16'(m)), "(7,4) coded word", 16'(m), e);
    else                  expect_ok(ev84 && 16'(c84) == codeword(code, 16'(m)), "(8,4) coded word", 16'(m), e);
    @(negedge clk);
    if (code == CODE_7_4) expect_ok(dv74 && err74 == (e != 0) && 16'(s74) == syndrome(code, 16'(r74)),
                                    "(7,4) detection", 16'(m), e);
    else                  expect_ok(dv84 && err84 == (e != 0) && 16'(s84) == syndrome(code, 16'(r84)),
                                    "(8,4) detection", 16'(m), e);
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0;
    m74 = '0; m84 = '0; m168 = '0; e74 = '0; e84 = '0; e168 = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int m = 0; m < 16; m++)
      for (int e = 0; e < 256; e++) begin
        if (weight(16'(e)) <= 2 && e < 128) run_short(CODE_7_4, 4'(m), 16'(e));
        if (weight(16'(e)) <= 3)            run_short(CODE_8_4, 4'(m), 16'(e));
      end
    in_valid = 1'b1;
    repeat (64) begin
      m168 = 8'($urandom);
      for (int e = 0; e < 65536; e++)
        if (weight(16'(e)) <= 4) begin
          e168 = 16'(e);
          #1;
          expect_ok(c168 == codeword(CODE_16_8, 16'(m168)) && err168 == (e != 0) &&
                    16'(s168) == syndrome(CODE_16_8, r168), "(16,8) detection", 16'(m168), 16'(e));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
