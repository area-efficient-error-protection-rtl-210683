// tb_cleaning_intervals: the cleaning-interval sweep on a synthetic workload.
//
// Five caches of 64 sets run the same generational request stream
// (cleaning_lane). Four use cleaning intervals of 64K, 256K, 1M and 4M cycles
// scaled by 64/4096, so that each set is visited every 16, 64, 256 or 1024
// cycles, as in the full-size cache. The fifth never cleans (interval 2^31).
// For each lane the test prints the average share of dirty lines and the
// write-backs per 100 accesses. It checks that:
//   * every read returned the right data;
//   * the dirty share does not grow as the interval shrinks;
//   * no lane ever exceeds one dirty line per set (25% of the lines);
//   * the shortest interval cleaned lines at all.
// The last two follow from the design; the order of dirty shares is the
// trend cleaning is meant to produce.
module tb_cleaning_intervals;
  localparam int unsigned LANES = 5;
  localparam int unsigned SETS = 64;
  localparam int unsigned SCALE = 4096 / SETS;
  localparam int unsigned IV [LANES] = '{(1 << 16) / SCALE, (1 << 18) / SCALE,
                                          (1 << 20) / SCALE, (1 << 22) / SCALE, 1 << 31};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   done [LANES];
  longint dsum [LANES], samp [LANES], cwb [LANES], ewb [LANES], rwb [LANES], acc [LANES];
  int     rfail [LANES];
  int     checks = 0, failures = 0;

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    cleaning_lane #(.SETS(SETS), .INTERVAL(IV[i]), .REQUESTS(40000)) u_lane (
      .clk(clk), .rst_n(rst_n), .done(done[i]), .dirty_sum(dsum[i]), .samples(samp[i]),
      .n_clean_wb(cwb[i]), .n_ecc_wb(ewb[i]), .n_repl_wb(rwb[i]), .n_access(acc[i]),
      .read_fail(rfail[i]));
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pct [LANES];
    bit all_done;
    repeat (3) @(negedge clk);
    rst_n = 1;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int i = 0; i < LANES; i++) all_done &= done[i];
    end while (!all_done);
    $display("interval(scaled)  dirty%%   clean_wb  ecc_wb  repl_wb  wb/100 accesses");
    for (int i = 0; i < LANES; i++) begin
      pct[i] = 100.0 * real'(dsum[i]) / (real'(samp[i]) * SETS * 4);
      $display("%10d        %6.2f  %8d  %6d  %7d  %6.2f", IV[i], pct[i], cwb[i], ewb[i], rwb[i],
               100.0 * real'(cwb[i] + ewb[i] + rwb[i]) / real'(acc[i]));
      checks++;
      if (rfail[i] != 0) begin failures++; $display("FAIL lane %0d: %0d bad reads", i, rfail[i]); end
      checks++;
      if (pct[i] > 25.0) begin failures++; $display("FAIL lane %0d above 25%% dirty", i); end
    end
    for (int i = 0; i + 1 < LANES; i++) begin
      checks++;
      if (pct[i] > pct[i + 1]) begin
        failures++; $display("FAIL dirty share grows from interval %0d to %0d", IV[i + 1], IV[i]);
      end
    end
    checks++;
    if (cwb[0] == 0) begin failures++; $display("FAIL shortest interval cleaned nothing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
