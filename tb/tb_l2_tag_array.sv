// tb_l2_tag_array: tags and line status of all ways of a set. Random entries
// are written and read back against a shadow copy; then a tag bit or a status
// bit of one way is flipped inside the array and the matching parity flag of
// exactly that way must rise.
module tb_l2_tag_array;
  import l2ecc_pkg::*;
  localparam int unsigned SETS = 16, WAYS = 4, TAG_W = 14;
  logic clk = 0, rd_en = 0, wr_en = 0;
  logic [3:0] rd_set = 0, wr_set = 0;
  logic [WAYS-1:0][TAG_W-1:0] rd_tag, wr_tag = '0;
  line_status_t [WAYS-1:0] rd_status, wr_status = '0;
  logic [WAYS-1:0] rd_tag_perr, rd_stat_perr;
  logic [WAYS-1:0][TAG_W-1:0] sh_tag [SETS];
  line_status_t [WAYS-1:0] sh_st [SETS];
  int checks = 0, failures = 0;

  l2_tag_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w, b;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      wr_en = 1; wr_set = 4'($urandom);
      for (int i = 0; i < WAYS; i++) begin
        wr_tag[i] = TAG_W'($urandom);
        wr_status[i] = line_status_t'($urandom);
      end
      sh_tag[wr_set] = wr_tag; sh_st[wr_set] = wr_status;
      rd_en = 1; rd_set = wr_set + 4'd1;
      @(negedge clk); wr_en = 0;
      rd_en = 1; rd_set = wr_set;
      @(negedge clk); rd_en = 0;
      checks++;
      if (rd_tag !== sh_tag[rd_set] || rd_status !== sh_st[rd_set] ||
          rd_tag_perr !== '0 || rd_stat_perr !== '0) begin
        failures++; $display("FAIL read set %0d", rd_set);
      end
    end
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      w = $urandom_range(WAYS - 1);
      // entry of one way, MSB first: {tag, valid, dirty, written, tag_par, stat_par}
      b = $urandom_range(TAG_W + 2);
      dut.mem[wr_set][w][2 + b] = ~dut.mem[wr_set][w][2 + b];
      rd_en = 1; rd_set = wr_set;
      @(negedge clk); rd_en = 0;
      checks++;
      if (b >= 3 ? (rd_tag_perr !== (4'b1 << w) || rd_stat_perr !== '0)
                 : (rd_stat_perr !== (4'b1 << w) || rd_tag_perr !== '0)) begin
        failures++; $display("FAIL flip way %0d bit %0d: %b %b", w, b, rd_tag_perr, rd_stat_perr);
      end
      dut.mem[wr_set][w][2 + b] = ~dut.mem[wr_set][w][2 + b];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
