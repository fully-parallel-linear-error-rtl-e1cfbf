// tb_lbc_reg: self-checking test of the input register.
// A registered instance (W=8) is driven with random data and random gaps in
// in_valid; the testbench keeps its own copy of the last loaded word and
// checks q and out_valid one clock after each input, the hold while
// in_valid is low, and the reset values.  A bypassed instance
// (REGISTERED=0) must pass data and valid through in the same cycle.
module tb_lbc_reg;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst_n, in_valid;
  logic [7:0] d, q, qw;
  logic       ov, ovw;

  lbc_reg                          dut  (.clk, .rst_n, .in_valid, .d, .out_valid(ov),  .q(q));
  lbc_reg #(.REGISTERED(1'b0))     dutw (.clk, .rst_n, .in_valid, .d, .out_valid(ovw), .q(qw));

  logic [7:0] exp_q;
  logic       exp_v;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: q=%h exp=%h v=%b expv=%b", what, $time, q, exp_q, ov, exp_v);
    end
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; d = 8'hA5;
    repeat (2) @(posedge clk);
    #1;
    check(q == 8'h00 && ov == 1'b0, "reset");
    exp_q = 8'h00; exp_v = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    repeat (500) begin
      @(negedge clk);
      in_valid = ($urandom % 3) != 0;
      d = 8'($urandom);
      #1;
      checks++;
      if (qw !== d || ovw !== in_valid) begin
        failures++;
        $display("FAIL bypass q=%h d=%h", qw, d);
      end
      @(posedge clk);
      exp_v = in_valid;
      if (in_valid) exp_q = d;
      #1;
      check(q == exp_q && ov == exp_v, "load/hold");
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
