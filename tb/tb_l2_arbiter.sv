// tb_l2_arbiter: exhaustive check of the L1-first set-index multiplexer.
module tb_l2_arbiter;
  localparam int unsigned SETS = 16;
  logic       free, l1v, clr, gl1, gcl, dfr;
  logic [3:0] l1s, cls, seto;
  int checks = 0, failures = 0;

  l2_arbiter #(.SETS(SETS)) dut (.free_i(free), .l1_valid_i(l1v), .l1_set_i(l1s),
    .clean_req_i(clr), .clean_set_i(cls), .grant_l1_o(gl1), .grant_clean_o(gcl),
    .deferred_o(dfr), .set_o(seto));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      for (int t = 0; t < 20; t++) begin
        {free, l1v, clr} = 3'(v);
        l1s = 4'($urandom); cls = 4'($urandom);
        #1;
        checks++;
        if (gl1 !== (free & l1v) || gcl !== (free & clr & !l1v) ||
            dfr !== (free & clr & l1v) ||
            ((free & clr & !l1v) ? seto !== cls : (l1v && seto !== l1s))) begin
          failures++;
          $display("FAIL free=%b l1=%b clean=%b -> %b %b %b set=%h", free, l1v, clr, gl1, gcl, dfr, seto);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
