// tb_lbc_two_bus_and: self-checking test of the two-bus AND at two widths.
// Exhaustive over all pairs of 4-bit buses for W=4, random 8-bit and 13-bit
// pairs otherwise; each output bit is compared with a per-bit AND of the
// inputs computed in the testbench.
module tb_lbc_two_bus_and;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  a8, b8, y8;
  logic [3:0]  a4, b4, y4;
  logic [12:0] a13, b13, y13;

  lbc_two_bus_and                 dut8  (.a(a8),  .b(b8),  .y(y8));
  lbc_two_bus_and #(.W(4))        dut4  (.a(a4),  .b(b4),  .y(y4));
  lbc_two_bus_and #(.W(13))       dut13 (.a(a13), .b(b13), .y(y13));

  task automatic check(logic [12:0] got, logic [12:0] a, logic [12:0] b, int w);
    for (int i = 0; i < w; i++) begin
      checks++;
      if (got[i] !== (a[i] && b[i])) begin
        failures++;
        $display("FAIL W=%0d bit %0d a=%h b=%h y=%h", w, i, a, b, got);
      end
    end
  endtask

  initial begin
    for (int x = 0; x < 16; x++)
      for (int z = 0; z < 16; z++) begin
        a4 = 4'(x); b4 = 4'(z); #1;
        check(13'(y4), 13'(a4), 13'(b4), 4);
      end
    repeat (300) begin
      a8 = 8'($urandom); b8 = 8'($urandom); a13 = 13'($urandom); b13 = 13'($urandom);
      @(posedge clk);
      check(13'(y8), 13'(a8), 13'(b8), 8);
      check(y13, a13, b13, 13);
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
