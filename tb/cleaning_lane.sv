// cleaning_lane: one cache instance driven by a synthetic generational
// workload, for tb_cleaning_intervals (testbench only).
//
// The workload walks a window of 24 lines slowly through an address space of
// 1.5x the cache capacity: lines are read and written while inside the window
// and never touched again after it has passed, the generational behaviour
// dirty-line cleaning relies on. The stream comes from a fixed xorshift
// generator, so every lane sees the same requests. Reads are checked against a
// reference model. Every 16 cycles the lane counts the dirty lines in the tag
// array; it also counts the three kinds of write-back and the accesses.
module cleaning_lane
  import l2ecc_pkg::*;
#(
  parameter int unsigned SETS     = 64,
  parameter int unsigned INTERVAL = 1 << 14,
  parameter int unsigned REQUESTS = 40000
) (
  input  logic    clk,
  input  logic    rst_n,
  output logic    done,
  output longint  dirty_sum,
  output longint  samples,
  output longint  n_clean_wb,
  output longint  n_ecc_wb,
  output longint  n_repl_wb,
  output longint  n_access,
  output int      read_fail
);
  localparam int unsigned WAYS = 4, ADDR_W = 32, SET_W = $clog2(SETS);
  localparam int unsigned LINES = SETS * 6;   // 1.5x the 4-way capacity

  logic req_valid = 0, req_ready, req_write = 0;
  logic [ADDR_W-1:0] req_addr = 0;
  word_t req_wdata = 0, resp_rdata, mem_wdata, mem_rdata;
  logic [7:0] req_wstrb = 8'hff;
  logic resp_valid, resp_error;
  logic mem_req_valid, mem_req_ready, mem_req_write, mem_wvalid, mem_wready, mem_rvalid;
  logic [ADDR_W-OFFSET_W-1:0] mem_req_laddr;
  l2_events_t events;

  l2_ecc_cache #(.SETS(SETS), .WAYS(WAYS), .ADDR_W(ADDR_W), .CLEAN_INTERVAL(INTERVAL)) dut (.*);
  mem_model #(.LADDR_W(ADDR_W - OFFSET_W), .LATENCY(100)) u_mem (.*);

  word_t ref_mem [longint unsigned];
  logic [31:0] rng = 32'h1234_5678;
  logic [15:0] tick = 0;
  logic started = 0;   // set once the cache has finished its reset sweep

  function automatic logic [31:0] xorshift(input logic [31:0] x);
    x ^= x << 13; x ^= x >> 17; x ^= x << 5;
    return x;
  endfunction

  initial begin
    {dirty_sum, samples, n_clean_wb, n_ecc_wb, n_repl_wb, n_access} = '0;
    read_fail = 0;
    done = 0;
  end

  always @(posedge clk) if (rst_n) begin
    if (events.clean_wb) n_clean_wb++;
    if (events.ecc_wb)   n_ecc_wb++;
    if (events.repl_wb)  n_repl_wb++;
    tick <= tick + 1'b1;
    if (tick[3:0] == 0 && started) begin
      samples++;
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++)
          if (dut.u_tags.mem[s][w].status.valid && dut.u_tags.mem[s][w].status.dirty) dirty_sum++;
    end
  end

  initial begin
    int unsigned line, set, tag, word, gap;
    longint unsigned wa;
    word_t exp;
    @(posedge rst_n);
    for (int unsigned n = 0; n < REQUESTS; n++) begin
      rng  = xorshift(rng);
      line = ((n / 200) + rng[4:0] % 24) % LINES;
      set  = line % SETS;
      tag  = line / SETS;
      word = rng[10:8];
      wa   = longint'((tag << (OFFSET_W + SET_W)) | (set << OFFSET_W) | (word << 3)) >> 3;
      @(negedge clk);
      req_valid = 1;
      req_write = (rng[23:16] < 8'd77);   // about 30% writes
      req_addr  = ADDR_W'(wa << 3);
      req_wdata = {rng, ~rng};
      if (req_write) ref_mem[wa] = req_wdata;
      @(posedge clk);
      while (!req_ready) @(posedge clk);
      started = 1;
      #1 req_valid = 0;
      do @(posedge clk); while (!resp_valid);
      n_access++;
      exp = ref_mem.exists(wa) ? ref_mem[wa] : u_mem.init_word(wa);
      if (!req_write && (resp_rdata !== exp || resp_error)) read_fail++;
      gap = rng[30:28];
      repeat (gap) @(posedge clk);
    end
    done = 1;
  end
endmodule
