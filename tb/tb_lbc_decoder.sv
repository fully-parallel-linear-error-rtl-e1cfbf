// tb_lbc_decoder: self-checking test of the syndrome decoder.
//
// Zero-delay decoders (REGISTERED=0) of the three sample codes receive every
// possible error vector e on top of a random coded word.  The syndrome must
// equal the reference syndrome of the received word, err must be set exactly
// when the syndrome is non-zero, and the lightest error that goes undetected
// must have weight t_D + 1, with t_D the number of detected bit errors of
// each code: 2 for (7,4), 3 for (8,4), 4 for (16,8).  A registered (16,8)
// decoder is then checked for its one-clock latency and its valid bit.
module tb_lbc_decoder;
  import tb_lbc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n, in_valid;
  logic [15:0] r16, rq;
  logic [7:0]  r8;
  logic [6:0]  r7;
  logic [7:0]  s16, sq;
  logic [3:0]  s8;
  logic [2:0]  s7;
  logic        e16, e8, e7, eq, v16, v8, v7, vq;

  lbc_decoder #(.REGISTERED(1'b0)) dut168 (
    .clk, .rst_n, .in_valid, .r(r16), .out_valid(v16), .s(s16), .err(e16));
  lbc_decoder #(.N(8), .K(4), .P(lbc_pkg::P_8_4), .REGISTERED(1'b0)) dut84 (
    .clk, .rst_n, .in_valid, .r(r8), .out_valid(v8), .s(s8), .err(e8));
  lbc_decoder #(.N(7), .K(4), .P(lbc_pkg::P_7_4), .REGISTERED(1'b0)) dut74 (
    .clk, .rst_n, .in_valid, .r(r7), .out_valid(v7), .s(s7), .err(e7));
  lbc_decoder dutq (
    .clk, .rst_n, .in_valid, .r(rq), .out_valid(vq), .s(sq), .err(eq));

  task automatic sweep(code_e code, int td);
    int n = code_n(code);
    int lightest = 99;
    logic [15:0] c, rx, s_exp, s_got;
    logic        err_got;
    for (int x = 1; x < (1 << n); x++) begin
      c  = codeword(code, 16'($urandom) & 16'((1 << code_k(code)) - 1));
      rx = c ^ 16'(x);
      case (code)
        CODE_7_4: r7  = 7'(rx);
        CODE_8_4: r8  = 8'(rx);
        default:  r16 = rx;
      endcase
      #1;
      case (code)
        CODE_7_4: begin s_got = 16'(s7);  err_got = e7;  end
        CODE_8_4: begin s_got = 16'(s8);  err_got = e8;  end
        default:  begin s_got = 16'(s16); err_got = e16; end
      endcase
      s_exp = syndrome(code, rx);
      checks++;
      if (s_got !== s_exp || err_got !== (s_exp != 0)) begin
        failures++;
        $display("FAIL n=%0d r=%h s=%h expected %h err=%b", n, rx, s_got, s_exp, err_got);
      end
      if (s_exp == 0 && weight(16'(x)) < lightest) lightest = weight(16'(x));
    end
    checks++;
    if (lightest != td + 1) begin
      failures++;
      $display("FAIL n=%0d lightest undetected error has weight %0d, expected %0d", n, lightest, td + 1);
    end else
      $display("n=%0d: all errors of up to %0d bits detected", n, td);
  endtask

  logic [15:0] last_r;
  logic        exp_v;

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; r16 = '0; r8 = '0; r7 = '0; rq = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (vq !== 1'b0 || sq !== '0) begin
      failures++;
      $display("FAIL reset");
    end
    // error-free words give a zero syndrome
    for (int x = 0; x < 256; x++) begin
      r16 = codeword(CODE_16_8, 16'(x)); #1;
      checks++;
      if (s16 !== '0 || e16 !== 1'b0) begin
        failures++;
        $display("FAIL clean word %h gave s=%h", r16, s16);
      end
    end
    sweep(CODE_7_4, 2);
    sweep(CODE_8_4, 3);
    sweep(CODE_16_8, 4);
    // registered decoder
    @(negedge clk) rst_n = 1'b1;
    last_r = '0;
    repeat (500) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      rq = codeword(CODE_16_8, 16'($urandom % 256)) ^ (($urandom % 2) ? 16'(1 << ($urandom % 16)) : 16'h0);
      @(posedge clk);
      exp_v = in_valid;
      if (in_valid) last_r = rq;
      #1;
      checks++;
      if (vq !== exp_v || sq !== 8'(syndrome(CODE_16_8, last_r)) || eq !== (syndrome(CODE_16_8, last_r) != 0)) begin
        failures++;
        $display("FAIL registered r=%h s=%h v=%b", last_r, sq, vq);
      end
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
