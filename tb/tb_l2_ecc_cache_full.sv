// tb_l2_ecc_cache_full: the same end-to-end test as tb_l2_ecc_cache, run on
// the cache at its default size (1MB, 4 ways, 4096 sets, 1M-cycle cleaning
// interval, i.e. one set checked every 256 cycles) with no parameter
// overridden. Memory latency is 100 cycles. Random traffic is confined to 32
// sets with 8 tags each so that replacements happen; the cleaning phase waits
// two full sweeps (about 2.1M cycles).
module tb_l2_ecc_cache_full;
  import l2ecc_pkg::*;
  localparam int unsigned SETS = 4096, WAYS = 4, ADDR_W = 32, INTERVAL = 1 << 20;
  localparam int unsigned SET_W = 12, TAG_LSB = OFFSET_W + SET_W;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_write = 0;
  logic [ADDR_W-1:0] req_addr = 0;
  word_t req_wdata = 0, resp_rdata, mem_wdata, mem_rdata;
  logic [7:0] req_wstrb = 0;
  logic resp_valid, resp_error;
  logic mem_req_valid, mem_req_ready, mem_req_write, mem_wvalid, mem_wready, mem_rvalid;
  logic [ADDR_W-OFFSET_W-1:0] mem_req_laddr;
  l2_events_t events;

  l2_ecc_cache dut (.*);
  mem_model #(.LADDR_W(ADDR_W - OFFSET_W), .LATENCY(100)) u_mem (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cycle = 0;
  word_t ref_mem [longint unsigned];

  // event counters
  int n_ecc_wb, n_clean_wb, n_repl_wb, n_clean_check, n_deferred, n_written;
  int n_corr, n_uncorr, n_refetch, n_tag_perr, n_miss;
  initial {n_ecc_wb, n_clean_wb, n_repl_wb, n_clean_check, n_deferred, n_written,
           n_corr, n_uncorr, n_refetch, n_tag_perr, n_miss} = '0;
  always @(posedge clk) begin
    cycle++;
    if (events.ecc_wb)         n_ecc_wb++;
    if (events.clean_wb)       n_clean_wb++;
    if (events.repl_wb)        n_repl_wb++;
    if (events.clean_check)    n_clean_check++;
    if (events.clean_deferred) n_deferred++;
    if (events.written_set)    n_written++;
    if (events.ecc_corrected)  n_corr++;
    if (events.uncorrectable)  n_uncorr++;
    if (events.parity_refetch) n_refetch++;
    if (events.tag_perr)       n_tag_perr++;
    if (events.miss)           n_miss++;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL @%0d: %s", cycle, msg);
  endtask

  function automatic logic [ADDR_W-1:0] mk_addr(input int tag, input int set, input int word);
    return ADDR_W'((tag << TAG_LSB) | (set << OFFSET_W) | (word << 3));
  endfunction

  function automatic word_t ref_word(input logic [ADDR_W-1:0] a);
    longint unsigned wa = longint'(a >> 3);
    return ref_mem.exists(wa) ? ref_mem[wa] : u_mem.init_word(wa);
  endfunction

  // One request; returns the cycles from the accepting edge to resp_valid.
  task automatic access(input logic wr, input logic [ADDR_W-1:0] a, input word_t d,
                        input logic [7:0] strb, output int lat, output word_t rdata,
                        output logic err);
    @(negedge clk);
    req_valid = 1; req_write = wr; req_addr = a; req_wdata = d; req_wstrb = strb;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    #1 req_valid = 0;
    lat = 0;
    do begin @(posedge clk); lat++; end while (!resp_valid);
    rdata = resp_rdata; err = resp_error;
  endtask

  task automatic write_word(input logic [ADDR_W-1:0] a, input word_t d, input logic [7:0] strb,
                            output int lat);
    word_t rd, m;
    logic e;
    m = ref_word(a);
    for (int b = 0; b < 8; b++) if (strb[b]) m[b*8 +: 8] = d[b*8 +: 8];
    ref_mem[longint'(a >> 3)] = m;
    access(1, a, d, strb, lat, rd, e);
  endtask

  task automatic read_check(input logic [ADDR_W-1:0] a, input logic exp_err, output int lat);
    word_t rd;
    logic e;
    access(0, a, '0, '0, lat, rd, e);
    checks++;
    if (e !== exp_err || (!exp_err && rd !== ref_word(a)))
      fail($sformatf("read %h got %h err %b, expected %h err %b", a, rd, e, ref_word(a), exp_err));
  endtask

  function automatic int find_way(input int set, input int tag);
    for (int w = 0; w < WAYS; w++)
      if (dut.u_tags.mem[set][w].status.valid && dut.u_tags.mem[set][w].tag == 14'(tag)) return w;
    return -1;
  endfunction

  task automatic flip_data(input int way, input int set, input int b);
    case (way)
      0: dut.g_way[0].u_way.data_mem[set][b] = ~dut.g_way[0].u_way.data_mem[set][b];
      1: dut.g_way[1].u_way.data_mem[set][b] = ~dut.g_way[1].u_way.data_mem[set][b];
      2: dut.g_way[2].u_way.data_mem[set][b] = ~dut.g_way[2].u_way.data_mem[set][b];
      default: dut.g_way[3].u_way.data_mem[set][b] = ~dut.g_way[3].u_way.data_mem[set][b];
    endcase
  endtask

  function automatic int dirty_count(input int set);
    int n = 0;
    for (int w = 0; w < WAYS; w++)
      if (dut.u_tags.mem[set][w].status.valid && dut.u_tags.mem[set][w].status.dirty) n++;
    return n;
  endfunction

  task automatic check_count(input string name, input int n);
    checks++;
    $display("  %-16s %0d", name, n);
    if (n == 0) fail({"mechanism never happened: ", name});
  endtask

  initial begin
    repeat (6000000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial if ($test$plusargs("trace")) forever begin
    @(posedge clk);
    $display("%0d st=%0d rdy=%b rv=%b buf=%b bst=%0d mv=%b mr=%b rvl=%b", cycle, dut.state, req_ready, resp_valid, dut.buf_ready, dut.u_buf.state, mem_req_valid, mem_req_ready, mem_rvalid);
  end

  initial begin
    int lat, w, total_dirty;
    logic [ADDR_W-1:0] a;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // write-allocate miss, then a hit must answer in 2 cycles
    a = mk_addr(1, 3, 2);
    write_word(a, 64'h1111_2222_3333_4444, 8'hff, lat);
    checks++; if (lat < 100) fail($sformatf("write miss took only %0d cycles", lat));
    read_check(a, 0, lat);
    checks++; if (lat != 2) fail($sformatf("read hit latency %0d, expected 2", lat));
    // second write of the dirty line sets its written bit
    write_word(a, 64'h00ab_0000_0000_00cd, 8'h81, lat);
    checks++; if (lat != 2) fail($sformatf("write hit latency %0d, expected 2", lat));
    checks++; w = find_way(3, 1);
    if (w < 0 || !dut.u_tags.mem[3][w].status.written) fail("written bit not set");

    // a second line of set 3 becomes dirty: the first is written back
    write_word(mk_addr(2, 3, 5), 64'hfeed_beef_0000_0001, 8'hff, lat);
    checks++; if (dirty_count(3) != 1) fail("ECC eviction left two dirty lines");
    repeat (20) @(posedge clk);
    checks++; if (u_mem.peek(longint'(mk_addr(1, 3, 2) >> 3)) !== ref_word(mk_addr(1, 3, 2)))
      fail("evicted line not in memory");
    for (int i = 0; i < 8; i++) read_check(mk_addr(1, 3, i), 0, lat);

    // single-bit error in the dirty line: corrected. Two writes first set the
    // written bit, so a cleaning visit in between cannot make the line clean.
    write_word(mk_addr(2, 3, 0), 64'h5555_aaaa_5555_aaaa, 8'hff, lat);
    write_word(mk_addr(2, 3, 0), 64'h5555_aaaa_5555_aaaa, 8'hff, lat);
    w = find_way(3, 2);
    flip_data(w, 3, 5 * 64 + 17);
    read_check(mk_addr(2, 3, 5), 0, lat);
    @(posedge clk);
    checks++; if (n_corr == 0) fail("no correction reported");
    flip_data(w, 3, 5 * 64 + 17);
    // double-bit error: reported uncorrectable, then repaired by a full write
    write_word(mk_addr(2, 3, 0), 64'h6666_aaaa_5555_aaaa, 8'hff, lat);
    write_word(mk_addr(2, 3, 0), 64'h6666_aaaa_5555_aaaa, 8'hff, lat);
    flip_data(w, 3, 1 * 64 + 3);
    flip_data(w, 3, 1 * 64 + 40);
    read_check(mk_addr(2, 3, 1), 1, lat);
    write_word(mk_addr(2, 3, 1), 64'h0123_4567_89ab_cdef, 8'hff, lat);
    read_check(mk_addr(2, 3, 1), 0, lat);

    // parity error in a clean line: refetched from memory
    read_check(mk_addr(5, 7, 0), 0, lat);
    w = find_way(7, 5);
    flip_data(w, 7, 6 * 64 + 9);
    read_check(mk_addr(5, 7, 6), 0, lat);
    checks++; if (lat < 100) fail("parity refetch did not go to memory");

    // tag-parity error reported
    dut.u_tags.mem[7][w][0] = ~dut.u_tags.mem[7][w][0];
    read_check(mk_addr(5, 7, 1), 0, lat);
    dut.u_tags.mem[7][w][0] = ~dut.u_tags.mem[7][w][0];

    // cleaning: idle for two sweeps, every dirty line gets written back
    repeat (2 * INTERVAL + 200) @(posedge clk);
    total_dirty = 0;
    for (int s = 0; s < SETS; s++) total_dirty += dirty_count(s);
    checks++; if (total_dirty != 0) fail($sformatf("%0d dirty lines left after cleaning", total_dirty));
    checks++; if (u_mem.peek(longint'(mk_addr(2, 3, 5) >> 3)) !== ref_word(mk_addr(2, 3, 5)))
      fail("cleaned line not in memory");

    // random traffic
    for (int t = 0; t < 3000; t++) begin
      a = mk_addr($urandom_range(7), $urandom_range(31), $urandom_range(7));
      if ($urandom_range(99) < 45) write_word(a, {$urandom, $urandom}, 8'($urandom | 1), lat);
      else read_check(a, 0, lat);
      if ($urandom_range(9) == 0) repeat ($urandom_range(40)) @(posedge clk);
    end
    for (int s = 0; s < SETS; s++) begin
      checks++; if (dirty_count(s) > 1) fail($sformatf("set %0d has %0d dirty lines", s, dirty_count(s)));
    end
    for (int t = 0; t < 8; t++)
      for (int s = 0; s < 32; s++)
        for (int i = 0; i < 8; i++) read_check(mk_addr(t, s, i), 0, lat);

    $display("mechanisms:");
    check_count("miss", n_miss);
    check_count("repl_wb", n_repl_wb);
    check_count("ecc_wb", n_ecc_wb);
    check_count("clean_check", n_clean_check);
    check_count("clean_wb", n_clean_wb);
    check_count("clean_deferred", n_deferred);
    check_count("written_set", n_written);
    check_count("ecc_corrected", n_corr);
    check_count("uncorrectable", n_uncorr);
    check_count("parity_refetch", n_refetch);
    check_count("tag_perr", n_tag_perr);
    $display("memory reads %0d writes %0d, %0d cycles", u_mem.reads, u_mem.writes, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
