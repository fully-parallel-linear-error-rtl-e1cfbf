// tb_lbc_xor_tree: self-checking test of the XOR tree at widths 1, 2, 3, 5,
// 8 and 16 (exhaustive up to 8 bits, random at 16).  The expected output is
// the parity of the input computed by counting its ones.
module tb_lbc_xor_tree;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] a;
  logic        y1, y2, y3, y5, y8, y16;

  lbc_xor_tree #(.W(1))  d1  (.a(a[0:0]), .y(y1));
  lbc_xor_tree #(.W(2))  d2  (.a(a[1:0]), .y(y2));
  lbc_xor_tree #(.W(3))  d3  (.a(a[2:0]), .y(y3));
  lbc_xor_tree #(.W(5))  d5  (.a(a[4:0]), .y(y5));
  lbc_xor_tree           d8  (.a(a[7:0]), .y(y8));
  lbc_xor_tree #(.W(16)) d16 (.a(a),      .y(y16));

  function automatic logic odd_ones(logic [15:0] v, int w);
    int n = 0;
    for (int i = 0; i < w; i++) if (v[i]) n++;
    return logic'(n % 2);
  endfunction

  task automatic check(logic got, int w);
    checks++;
    if (got !== odd_ones(a, w)) begin
      failures++;
      $display("FAIL W=%0d a=%h y=%b", w, a, got);
    end
  endtask

  initial begin
    for (int x = 0; x < 256; x++) begin
      a = 16'(x) | (16'($urandom) << 8);
      @(posedge clk);
      check(y1, 1); check(y2, 2); check(y3, 3); check(y5, 5); check(y8, 8); check(y16, 16);
    end
    repeat (2000) begin
      a = 16'($urandom);
      @(posedge clk);
      check(y16, 16);
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
