// tb_secded_dec: checks the SECDED corrector with 0, 1 and 2 flipped bits.
// Clean check bytes are produced with the package encoder; flips are applied
// to any of the 72 stored bits (64 data, 8 check). Expected: no flag and data
// unchanged for 0 flips; single_err and the original data for 1 flip;
// double_err and no single_err for 2 flips.
module tb_secded_dec;
  import l2ecc_pkg::*;

  word_t data_i, data_o;
  chk_t  chk_i;
  logic  serr, derr;
  int    checks = 0, failures = 0;

  secded_dec dut (.data_i(data_i), .chk_i(chk_i), .data_o(data_o),
                  .single_err_o(serr), .double_err_o(derr));

  task automatic expect_out(input word_t d, input logic s, input logic dd, input string what);
    checks++;
    if (serr !== s || derr !== dd || (!dd && data_o !== d)) begin
      failures++;
      $display("FAIL %s in=%h/%h out=%h s=%b d=%b", what, data_i, chk_i, data_o, serr, derr);
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
    word_t d;
    logic [71:0] cw;
    int a, b;
    for (int t = 0; t < 400; t++) begin
      d  = {$urandom, $urandom};
      cw = {secded_encode(d), d};
      {chk_i, data_i} = cw; #1; expect_out(d, 0, 0, "clean");
      a = $urandom_range(71);
      cw[a] = ~cw[a];
      {chk_i, data_i} = cw; #1; expect_out(d, 1, 0, "single");
      do b = $urandom_range(71); while (b == a);
      cw[b] = ~cw[b];
      {chk_i, data_i} = cw; #1; expect_out(d, 0, 1, "double");
    end
    // every single position once
    d = 64'h0123_4567_89ab_cdef;
    for (int p = 0; p < 72; p++) begin
      cw = {secded_encode(d), d};
      cw[p] = ~cw[p];
      {chk_i, data_i} = cw; #1; expect_out(d, 1, 0, "each single");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
