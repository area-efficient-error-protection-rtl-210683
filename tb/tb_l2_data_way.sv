// tb_l2_data_way: one way's data and parity arrays. Random lines are written
// and read back against a shadow copy with no parity flag; then single bits of
// stored lines are flipped inside the array (a soft error) and the read must
// flag exactly the word that holds the flipped bit.
module tb_l2_data_way;
  import l2ecc_pkg::*;
  localparam int unsigned SETS = 32;
  logic clk = 0, rd_en = 0, wr_en = 0;
  logic [4:0] rd_set = 0, wr_set = 0;
  line_t rd_line, wr_line = '0;
  logic [7:0] rd_perr;
  line_t shadow [SETS];
  int checks = 0, failures = 0;

  l2_data_way #(.SETS(SETS)) dut (.*);
  always #5 clk = ~clk;

  function automatic line_t rnd_line();
    line_t l;
    for (int i = 0; i < 16; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b;
    for (int s = 0; s < SETS; s++) begin
      @(negedge clk); wr_en = 1; wr_set = 5'(s); wr_line = rnd_line(); shadow[s] = wr_line;
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk); rd_en = 1; rd_set = 5'($urandom);
      @(negedge clk); rd_en = 0;
      checks++;
      if (rd_line !== shadow[rd_set] || rd_perr !== 8'h00) begin
        failures++; $display("FAIL read set %0d perr=%b", rd_set, rd_perr);
      end
    end
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      rd_set = 5'($urandom);
      b = $urandom_range(511);
      dut.data_mem[rd_set][b] = ~dut.data_mem[rd_set][b];
      rd_en = 1;
      @(negedge clk); rd_en = 0;
      checks++;
      if (rd_perr !== (8'h01 << (b / 64))) begin
        failures++; $display("FAIL perr=%b bit %0d", rd_perr, b);
      end
      // repair by rewriting
      wr_en = 1; wr_set = rd_set; wr_line = shadow[rd_set];
      @(negedge clk); wr_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
