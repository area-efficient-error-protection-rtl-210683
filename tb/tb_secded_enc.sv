// tb_secded_enc: checks the SECDED check-byte generator.
// Reference: the codeword positions of the data bits are enumerated here
// (every position 1..71 that is not a power of two, in order); a single set
// data bit must give its position as Hamming check bits and the parity of
// that position plus one as bit 7. Random words are checked for linearity
// (check(a^b) == check(a)^check(b)) and against a full recomputation.
module tb_secded_enc;
  import l2ecc_pkg::*;

  word_t data;
  chk_t  chk;
  int    checks = 0, failures = 0;
  int unsigned pos [64];

  secded_enc dut (.data_i(data), .chk_o(chk));

  function automatic chk_t ref_chk(input word_t d);
    logic [6:0] h = '0;
    for (int i = 0; i < 64; i++) if (d[i]) h ^= 7'(pos[i]);
    return {(^d) ^ (^h), h};
  endfunction

  task automatic check(input chk_t exp, input string what);
    checks++;
    if (chk !== exp) begin
      failures++;
      $display("FAIL %s data=%h chk=%h exp=%h", what, data, chk, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 0;
    chk_t ca;
    word_t a, b;
    for (int p = 1; p < 72; p++) if ((p & (p - 1)) != 0) pos[n++] = p;
    data = '0; #1; check('0, "zero");
    for (int i = 0; i < 64; i++) begin
      data = word_t'(1) << i; #1;
      check({^(7'(pos[i])) ^ 1'b1, 7'(pos[i])}, "single");
    end
    for (int t = 0; t < 500; t++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      data = a; #1; ca = chk; check(ref_chk(a), "random");
      data = b; #1; check(ref_chk(b), "random");
      data = a ^ b; #1;
      checks++;
      if (chk !== (ca ^ ref_chk(b))) begin failures++; $display("FAIL linear"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
