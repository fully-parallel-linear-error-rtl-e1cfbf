// tb_lbc_top: end-to-end test of the coding link at its default size, the
// (16,8) code with registered inputs.
//
// Random messages are sent with random gaps in in_valid, each with an error
// vector drawn from one of several classes: no error, random errors of 1 to 4
// bits, random heavier errors, and errors equal to a non-zero codeword (which
// no linear code can detect).  Two scoreboards follow the words through the
// link: one clock after a message c and r must equal the reference coded and
// received word, two clocks after it s must equal the reference syndrome and
// err must be set exactly for non-zero syndromes.  Every error of 1 to 4 bits
// must be detected.  The test counts how often each case occurred (clean
// word, detected error of each weight 1..4, detected heavier error,
// undetected codeword error, idle cycle) and fails if any never happened.
module tb_lbc_top;
  import tb_lbc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n, in_valid;
  logic [7:0]  m;
  logic [15:0] e;
  logic        enc_valid, dec_valid, err;
  logic [15:0] c, r;
  logic [7:0]  s;

  lbc_top dut (.clk, .rst_n, .in_valid, .m, .e, .enc_valid, .c, .r, .dec_valid, .s, .err);

  typedef struct {
    logic [7:0]  m;
    logic [15:0] e;
    int          cycle;
  } word_t;

  word_t enc_q[$], dec_q[$];
  int cycle = 0;
  int unsigned kind;

  // occurrence counters
  int n_clean = 0, n_heavy_det = 0, n_undetected = 0, n_idle = 0;
  int n_det[1:4] = '{0, 0, 0, 0};

  function automatic logic [15:0] random_error(int w);
    logic [15:0] v = '0;
    while (weight(v) < w) v[$urandom % 16] = 1'b1;
    return v;
  endfunction

  task automatic fail(string what);
    failures++;
    $display("FAIL %s at cycle %0d", what, cycle);
  endtask

  always @(posedge clk) cycle <= cycle + 1;

  // scoreboards, sampled just after each clock edge
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      if (enc_valid) begin
        word_t w;
        checks++;
        if (enc_q.size() == 0) fail("unexpected enc_valid");
        else begin
          w = enc_q.pop_front();
          if (cycle != w.cycle + 1) fail("encoder latency");
          if (c !== codeword(CODE_16_8, 16'(w.m))) fail("coded word");
          if (r !== (codeword(CODE_16_8, 16'(w.m)) ^ w.e)) fail("received word");
        end
      end
      if (dec_valid) begin
        word_t w;
        logic [15:0] s_exp;
        checks++;
        if (dec_q.size() == 0) fail("unexpected dec_valid");
        else begin
          w = dec_q.pop_front();
          s_exp = syndrome(CODE_16_8, codeword(CODE_16_8, 16'(w.m)) ^ w.e);
          if (cycle != w.cycle + 2) fail("decoder latency");
          if (16'(s) !== s_exp || err !== (s_exp != 0)) fail("syndrome");
          if (weight(w.e) >= 1 && weight(w.e) <= 4 && !err) fail("error of up to 4 bits not detected");
          if (w.e == 0 && !err) n_clean++;
          else if (weight(w.e) <= 4 && err) n_det[weight(w.e)]++;
          else if (err) n_heavy_det++;
          else n_undetected++;
        end
      end else n_idle++;
    end
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; m = '0; e = '0;
    repeat (3) @(posedge clk);
    #2;
    checks++;
    if (enc_valid || dec_valid || c != '0 || s != '0) fail("reset");
    @(negedge clk) rst_n = 1'b1;
    repeat (3000) begin
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      m = 8'($urandom);
      kind = $urandom % 8;
      case (kind)
        0:       e = '0;
        1, 2:    e = random_error(1);
        3:       e = random_error(2);
        4:       e = random_error(3);
        5:       e = random_error(4);
        6:       e = random_error(5 + $urandom % 11);
        default: e = codeword(CODE_16_8, 16'(1 + $urandom % 255));
      endcase
      if (in_valid) begin
        enc_q.push_back('{m: m, e: e, cycle: cycle});
        dec_q.push_back('{m: m, e: e, cycle: cycle});
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (4) @(posedge clk);
    #2;
    checks++;
    if (enc_q.size() != 0 || dec_q.size() != 0) fail("words lost in the link");
    $display("clean=%0d det1=%0d det2=%0d det3=%0d det4=%0d heavy_detected=%0d undetected=%0d idle=%0d",
             n_clean, n_det[1], n_det[2], n_det[3], n_det[4], n_heavy_det, n_undetected, n_idle);
    checks++;
    if (n_clean == 0 || n_det[1] == 0 || n_det[2] == 0 || n_det[3] == 0 || n_det[4] == 0 ||
        n_heavy_det == 0 || n_undetected == 0 || n_idle == 0)
      fail("a case never occurred");
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
