// tb_data_buffer: write-backs and fills through the data buffer against the
// memory model (latency 20 here). A written-back line must arrive in memory
// word by word; a fill must return the memory's line, fill_done must pulse
// once, and the fill must take at least the memory latency plus 8 beats.
module tb_data_buffer;
  import l2ecc_pkg::*;
  localparam int unsigned LADDR_W = 10, LAT = 20;
  logic clk = 0, rst_n = 0;
  logic ready_o, wb_valid_i = 0, fill_valid_i = 0, fill_done_o;
  logic [LADDR_W-1:0] wb_laddr_i = 0, fill_laddr_i = 0, mem_req_laddr;
  line_t wb_line_i = '0, fill_line_o;
  logic mem_req_valid, mem_req_ready, mem_req_write, mem_wvalid, mem_wready, mem_rvalid;
  word_t mem_wdata, mem_rdata;
  line_t shadow [2**LADDR_W];
  logic  known  [2**LADDR_W];
  int checks = 0, failures = 0;

  data_buffer #(.LADDR_W(LADDR_W)) dut (.*);
  mem_model #(.LADDR_W(LADDR_W), .LATENCY(LAT)) u_mem (.*);
  always #5 clk = ~clk;

  function automatic line_t init_line(input int unsigned la);
    line_t l;
    for (int i = 0; i < 8; i++) l[i*64 +: 64] = u_mem.init_word(longint'(la) * 8 + i);
    return l;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    int unsigned la;
    for (int i = 0; i < 2**LADDR_W; i++) known[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      while (!ready_o) @(negedge clk);
      la = $urandom_range(31);
      if ($urandom_range(1) == 1) begin
        wb_valid_i = 1; wb_laddr_i = LADDR_W'(la);
        for (int i = 0; i < 16; i++) wb_line_i[i*32 +: 32] = $urandom;
        shadow[la] = wb_line_i; known[la] = 1;
        @(negedge clk); wb_valid_i = 0;
      end else begin
        fill_valid_i = 1; fill_laddr_i = LADDR_W'(la);
        @(negedge clk); fill_valid_i = 0;
        cyc = 1;
        while (!fill_done_o) begin @(negedge clk); cyc++; end
        checks++;
        if (fill_line_o !== (known[la] ? shadow[la] : init_line(la)) || cyc < LAT + 8) begin
          failures++; $display("FAIL fill line %0d after %0d cycles", la, cyc);
        end
        @(negedge clk);
        checks++;
        if (fill_done_o) begin failures++; $display("FAIL fill_done held"); end
      end
    end
    while (!ready_o) @(negedge clk);
    repeat (3) @(negedge clk);
    for (int unsigned l = 0; l < 32; l++) if (known[l]) begin
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (u_mem.peek(longint'(l) * 8 + i) !== shadow[l][i*64 +: 64]) begin
          failures++; $display("FAIL memory line %0d word %0d", l, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
