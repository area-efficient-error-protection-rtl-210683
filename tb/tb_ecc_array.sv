// tb_ecc_array: writes random entries to random sets, reads them back one
// cycle later against a shadow copy, and checks that the read port holds its
// value while rd_en is low.
module tb_ecc_array;
  localparam int unsigned SETS = 64;
  logic clk = 0, rd_en = 0, wr_en = 0;
  logic [5:0]  rd_set = 0, wr_set = 0;
  logic [63:0] rd_ecc, wr_ecc = 0;
  logic [63:0] shadow [SETS];
  int checks = 0, failures = 0;

  ecc_array #(.SETS(SETS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] held;
    for (int s = 0; s < SETS; s++) begin
      @(negedge clk); wr_en = 1; wr_set = 6'(s); wr_ecc = {$urandom, $urandom}; shadow[s] = wr_ecc;
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      wr_en = ($urandom_range(1) == 1); wr_set = 6'($urandom); wr_ecc = {$urandom, $urandom};
      rd_en = 1; rd_set = 6'($urandom);
      while (rd_set == wr_set) rd_set = 6'($urandom);
      if (wr_en) shadow[wr_set] = wr_ecc;
      @(negedge clk);
      wr_en = 0; rd_en = 0;
      checks++;
      if (rd_ecc !== shadow[rd_set]) begin failures++; $display("FAIL set %0d", rd_set); end
      held = rd_ecc;
      @(negedge clk);
      checks++;
      if (rd_ecc !== held) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
