// tb_cleaning_logic: the request period and set sweep of the cleaning logic,
// and its per-set decision. With SETS=8 and CLEAN_INTERVAL=64 a request must
// appear every 8 cycles (counted from the previous clean_done), with set
// numbers 0,1,...,7,0,...; a request left waiting must hold its set. The
// decision is checked on all status combinations of a 4-way set against the
// rule: write back valid & dirty & !written, clear every written bit.
module tb_cleaning_logic;
  import l2ecc_pkg::*;
  localparam int unsigned SETS = 8, WAYS = 4, INTERVAL = 64, STEP = INTERVAL / SETS;
  logic clk = 0, rst_n = 0, clean_req, clean_done = 0;
  logic [2:0] clean_set;
  line_status_t [WAYS-1:0] status_i, status_o;
  logic [WAYS-1:0] wb_mask_o;
  int checks = 0, failures = 0;

  cleaning_logic #(.SETS(SETS), .WAYS(WAYS), .CLEAN_INTERVAL(INTERVAL)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int gap, hold;
    logic [WAYS-1:0] exp_mask;
    // decision logic
    for (int t = 0; t < 4096; t++) begin
      status_i = line_status_t [WAYS-1:0]'(t * 37 + $urandom);
      #1;
      for (int w = 0; w < WAYS; w++) exp_mask[w] = status_i[w].valid & status_i[w].dirty & ~status_i[w].written;
      checks++;
      for (int w = 0; w < WAYS; w++) begin
        if (wb_mask_o[w] !== exp_mask[w] || status_o[w].written !== 1'b0 ||
            status_o[w].valid !== status_i[w].valid ||
            status_o[w].dirty !== (status_i[w].dirty & ~exp_mask[w])) begin
          failures++; $display("FAIL decision %b", status_i); break;
        end
      end
    end
    // request timing and sweep
    repeat (2) @(negedge clk);
    rst_n = 1;
    gap = 0;
    for (int n = 0; n < 3 * SETS; n++) begin
      gap = 0;
      while (!clean_req) begin @(negedge clk); gap++; end
      checks++;
      if (gap != STEP || clean_set !== 3'(n)) begin
        failures++; $display("FAIL request %0d after %0d cycles set %0d", n, gap, clean_set);
      end
      hold = $urandom_range(3);
      repeat (hold) begin
        @(negedge clk);
        checks++;
        if (!clean_req || clean_set !== 3'(n)) begin failures++; $display("FAIL hold"); end
      end
      clean_done = 1;
      @(negedge clk);
      clean_done = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
