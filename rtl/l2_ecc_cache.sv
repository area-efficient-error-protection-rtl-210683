// l2_ecc_cache: write-back L2 cache with non-uniform error protection.
//
// Clean lines can always be fetched again from memory, so they are protected
// only by parity (one bit per 64-bit word, one parity array per way). Only
// dirty lines need ECC, and the design keeps at most one dirty line per set,
// so a single ECC array with one 8-byte entry per set (SECDED check bytes of
// that set's dirty line) is enough. Two mechanisms keep lines clean:
//   * ECC-entry eviction: a write that would make a second line of a set dirty
//     first writes the set's current dirty line back to memory and makes it
//     clean, then takes over the set's ECC entry;
//   * cleaning: cleaning_logic visits one set every STEP cycles; a line that is
//     dirty but was not written again since the last visit (written bit 0) is
//     written back and made clean, and all written bits of the set are reset.
// Write-backs therefore have three causes: ECC eviction, cleaning, and
// replacement of a dirty line on a miss. All of this follows the document, as
// do the default sizes (1MB, 4 ways, 64B lines, 4K sets, 1M-cycle cleaning
// interval). The controller below is this design's own.
//
// Requests (from the write-through L1 caches) are single 64-bit words:
// req_addr is a byte address whose low 3 bits are ignored; writes carry a byte
// mask. Every request gets one resp_valid pulse; reads return resp_rdata,
// resp_error flags an uncorrectable (double) error. A read hit answers two
// cycles after the accepting edge; writes also answer after two cycles unless
// they wait for the data buffer. A miss writes back a dirty victim, fills the
// line over the 8-byte bus through data_buffer, then replays the request.
// Reads of a clean line whose word fails parity refetch the line from memory;
// reads of the dirty line are corrected by SECDED. After reset the controller
// spends SETS cycles writing every set invalid (req_ready low). Tag and status
// parity errors are only reported (events.tag_perr); the document does not say
// how they are handled. Victims: the first invalid way, else a round-robin
// pointer (the document names no policy).
module l2_ecc_cache
  import l2ecc_pkg::*;
#(
  parameter int unsigned SETS           = 4096,
  parameter int unsigned WAYS           = 4,
  parameter int unsigned ADDR_W         = 32,
  parameter int unsigned CLEAN_INTERVAL = 1 << 20
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // L1 side
  input  logic                      req_valid,
  output logic                      req_ready,
  input  logic                      req_write,
  input  logic [ADDR_W-1:0]         req_addr,
  input  word_t                     req_wdata,
  input  logic [WORD_W/8-1:0]       req_wstrb,
  output logic                      resp_valid,
  output word_t                     resp_rdata,
  output logic                      resp_error,
  // memory bus (8 bytes wide)
  output logic                      mem_req_valid,
  input  logic                      mem_req_ready,
  output logic                      mem_req_write,
  output logic [ADDR_W-OFFSET_W-1:0] mem_req_laddr,
  output logic                      mem_wvalid,
  input  logic                      mem_wready,
  output word_t                     mem_wdata,
  input  logic                      mem_rvalid,
  input  word_t                     mem_rdata,
  // event pulses
  output l2_events_t                events
);

  localparam int unsigned SET_W   = $clog2(SETS);
  localparam int unsigned TAG_W   = ADDR_W - SET_W - OFFSET_W;
  localparam int unsigned LADDR_W = ADDR_W - OFFSET_W;
  localparam int unsigned WAY_W   = $clog2(WAYS);

  typedef enum logic [2:0] {
    S_INIT, S_IDLE, S_LOOK, S_CLEAN, S_FILL_REQ, S_FILL_WAIT, S_REPLAY
  } state_t;

  state_t state;

  // latched request
  logic              r_write;
  logic [ADDR_W-1:0] r_addr;
  word_t             r_wdata;
  logic [WORD_W/8-1:0] r_wstrb;
  logic [SET_W-1:0]  r_set;
  logic [TAG_W-1:0]  r_tag;
  logic [WSEL_W-1:0] r_word;

  assign r_set  = r_addr[OFFSET_W +: SET_W];
  assign r_tag  = r_addr[ADDR_W-1 -: TAG_W];
  assign r_word = r_addr[OFFSET_W-1 -: WSEL_W];

  logic [SET_W-1:0]  init_set;
  logic [WAY_W-1:0]  rr_ptr;
  logic [WAY_W-1:0]  victim;
  logic [WAY_W-1:0]  victim_q;   // way being filled

  // ---------------------------------------------------------------- arbiter
  logic             grant_l1, grant_clean, clean_deferred;
  logic [SET_W-1:0] arb_set;
  logic             clean_req, clean_done;
  logic [SET_W-1:0] clean_set;

  l2_arbiter #(.SETS(SETS)) u_arb (
    .free_i        (state == S_IDLE),
    .l1_valid_i    (req_valid),
    .l1_set_i      (req_addr[OFFSET_W +: SET_W]),
    .clean_req_i   (clean_req),
    .clean_set_i   (clean_set),
    .grant_l1_o    (grant_l1),
    .grant_clean_o (grant_clean),
    .deferred_o    (clean_deferred),
    .set_o         (arb_set)
  );

  assign req_ready = (state == S_IDLE);

  // ----------------------------------------------------------------- arrays
  logic             rd_en;
  logic [SET_W-1:0] rd_set;
  assign rd_en  = grant_l1 | grant_clean | (state == S_REPLAY);
  assign rd_set = (state == S_REPLAY) ? r_set : arb_set;

  line_t [WAYS-1:0]                 way_line;
  logic  [WAYS-1:0][LINE_WORDS-1:0] way_perr;
  logic  [WAYS-1:0]                 way_we;
  logic  [SET_W-1:0]                data_wset;
  line_t                            data_wline;

  for (genvar g = 0; g < WAYS; g++) begin : g_way
    l2_data_way #(.SETS(SETS)) u_way (
      .clk     (clk),
      .rd_en   (rd_en),
      .rd_set  (rd_set),
      .rd_line (way_line[g]),
      .rd_perr (way_perr[g]),
      .wr_en   (way_we[g]),
      .wr_set  (data_wset),
      .wr_line (data_wline)
    );
  end

  logic [WAYS-1:0][TAG_W-1:0] rd_tag;
  line_status_t [WAYS-1:0]    rd_status;
  logic [WAYS-1:0]            rd_tag_perr, rd_stat_perr;
  logic                       tag_we;
  logic [SET_W-1:0]           tag_wset;
  logic [WAYS-1:0][TAG_W-1:0] tag_wtag;
  line_status_t [WAYS-1:0]    tag_wstatus;

  l2_tag_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W)) u_tags (
    .clk          (clk),
    .rd_en        (rd_en),
    .rd_set       (rd_set),
    .rd_tag       (rd_tag),
    .rd_status    (rd_status),
    .rd_tag_perr  (rd_tag_perr),
    .rd_stat_perr (rd_stat_perr),
    .wr_en        (tag_we),
    .wr_set       (tag_wset),
    .wr_tag       (tag_wtag),
    .wr_status    (tag_wstatus)
  );

  logic [ECC_W-1:0] rd_ecc, new_ecc;
  logic             ecc_we;

  ecc_array #(.SETS(SETS)) u_ecc (
    .clk    (clk),
    .rd_en  (rd_en),
    .rd_set (rd_set),
    .rd_ecc (rd_ecc),
    .wr_en  (ecc_we),
    .wr_set (r_set),
    .wr_ecc (new_ecc)
  );

  // -------------------------------------------------------- cleaning logic
  logic [WAYS-1:0]         cl_wb_mask;
  line_status_t [WAYS-1:0] cl_status;

  cleaning_logic #(.SETS(SETS), .WAYS(WAYS), .CLEAN_INTERVAL(CLEAN_INTERVAL)) u_clean (
    .clk        (clk),
    .rst_n      (rst_n),
    .clean_req  (clean_req),
    .clean_set  (clean_set),
    .clean_done (clean_done),
    .status_i   (rd_status),
    .wb_mask_o  (cl_wb_mask),
    .status_o   (cl_status)
  );

  // ------------------------------------------------------ set analysis
  logic [WAYS-1:0]  hit_vec, dirty_vec, inval_vec;
  logic             hit_any, dirty_any, inval_any;
  logic [WAY_W-1:0] hit_way, dirty_way, inval_way;

  always_comb begin
    hit_vec = '0; dirty_vec = '0; inval_vec = '0;
    hit_way = '0; dirty_way = '0; inval_way = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      hit_vec[w]   = rd_status[w].valid && (rd_tag[w] == r_tag);
      dirty_vec[w] = rd_status[w].valid && rd_status[w].dirty;
      inval_vec[w] = !rd_status[w].valid;
    end
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (hit_vec[w])   hit_way   = WAY_W'(w);
      if (dirty_vec[w]) dirty_way = WAY_W'(w);
      if (inval_vec[w]) inval_way = WAY_W'(w);
    end
    hit_any   = |hit_vec;
    dirty_any = |dirty_vec;
    inval_any = |inval_vec;
  end

  // SECDED check of the set's dirty line, one decoder per word
  line_t                 dec_line;
  logic [LINE_WORDS-1:0] dec_single, dec_double;

  for (genvar i = 0; i < LINE_WORDS; i++) begin : g_dec
    secded_dec u_dec (
      .data_i       (way_line[dirty_way][i*WORD_W +: WORD_W]),
      .chk_i        (rd_ecc[i*CHK_W +: CHK_W]),
      .data_o       (dec_line[i*WORD_W +: WORD_W]),
      .single_err_o (dec_single[i]),
      .double_err_o (dec_double[i])
    );
  end

  // write merge and new ECC entry
  logic  hit_dirty;
  line_t merged_line;
  word_t merged_word;

  assign hit_dirty = dirty_vec[hit_way];

  always_comb begin
    merged_line = hit_dirty ? dec_line : way_line[hit_way];
    merged_word = merged_line[r_word*WORD_W +: WORD_W];
    for (int unsigned b = 0; b < WORD_W / 8; b++)
      if (r_wstrb[b]) merged_word[b*8 +: 8] = r_wdata[b*8 +: 8];
    merged_line[r_word*WORD_W +: WORD_W] = merged_word;
  end

  for (genvar i = 0; i < LINE_WORDS; i++) begin : g_enc
    secded_enc u_enc (
      .data_i (merged_line[i*WORD_W +: WORD_W]),
      .chk_o  (new_ecc[i*CHK_W +: CHK_W])
    );
  end

  // ------------------------------------------------------------ data buffer
  logic               buf_ready, wb_valid, fill_valid, fill_done;
  logic [LADDR_W-1:0] wb_laddr;
  line_t              fill_line;

  data_buffer #(.LADDR_W(LADDR_W)) u_buf (
    .clk           (clk),
    .rst_n         (rst_n),
    .ready_o       (buf_ready),
    .wb_valid_i    (wb_valid),
    .wb_laddr_i    (wb_laddr),
    .wb_line_i     (dec_line),
    .fill_valid_i  (fill_valid),
    .fill_laddr_i  ({r_tag, r_set}),
    .fill_line_o   (fill_line),
    .fill_done_o   (fill_done),
    .mem_req_valid (mem_req_valid),
    .mem_req_ready (mem_req_ready),
    .mem_req_write (mem_req_write),
    .mem_req_laddr (mem_req_laddr),
    .mem_wvalid    (mem_wvalid),
    .mem_wready    (mem_wready),
    .mem_wdata     (mem_wdata),
    .mem_rvalid    (mem_rvalid),
    .mem_rdata     (mem_rdata)
  );

  // ------------------------------------------------------------- controller
  logic       parity_bad;   // hit on a clean line whose parity fails
  logic       need_ecc_wb;  // write hit on a clean line, another line is dirty
  logic       need_repl_wb; // miss whose victim is dirty
  logic       stall;
  logic       do_resp;
  l2_events_t ev;
  state_t     next_state;

  always_comb begin
    victim = inval_any ? inval_way : rr_ptr;
    parity_bad   = hit_any && !hit_dirty &&
                   (r_write ? |way_perr[hit_way] : way_perr[hit_way][r_word]);
    need_ecc_wb  = hit_any && r_write && !parity_bad && dirty_any && (dirty_way != hit_way);
    need_repl_wb = !hit_any && !inval_any && dirty_vec[rr_ptr];

    next_state  = state;
    stall       = 1'b0;
    do_resp     = 1'b0;
    way_we      = '0;
    data_wset   = r_set;
    data_wline  = merged_line;
    tag_we      = 1'b0;
    tag_wset    = r_set;
    tag_wtag    = rd_tag;
    tag_wstatus = rd_status;
    ecc_we      = 1'b0;
    wb_valid    = 1'b0;
    wb_laddr    = {rd_tag[dirty_way], r_set};
    fill_valid  = 1'b0;
    clean_done  = 1'b0;
    ev          = '0;
    ev.clean_deferred = clean_deferred;

    unique case (state)
      S_INIT: begin
        tag_we   = 1'b1;
        tag_wset = init_set;
        tag_wtag = '0;
        tag_wstatus = '0;
        if (init_set == SET_W'(SETS - 1)) next_state = S_IDLE;
      end

      S_IDLE: begin
        if (grant_l1)         next_state = S_LOOK;
        else if (grant_clean) next_state = S_CLEAN;
      end

      S_REPLAY: next_state = S_LOOK;

      S_LOOK: begin
        ev.tag_perr = |(rd_tag_perr | rd_stat_perr);
        if (hit_any && parity_bad) begin
          // clean line with a parity error: memory holds the good copy
          ev.parity_refetch = 1'b1;
          next_state = S_FILL_REQ;
        end else if (hit_any && !r_write) begin
          do_resp = 1'b1;
          if (hit_dirty) begin
            ev.ecc_corrected = dec_single[r_word];
            ev.uncorrectable = dec_double[r_word];
          end
          next_state = S_IDLE;
        end else if (hit_any) begin
          if (need_ecc_wb && !buf_ready) begin
            stall = 1'b1;
          end else begin
            way_we[hit_way] = 1'b1;
            ecc_we          = 1'b1;
            tag_we          = 1'b1;
            tag_wstatus[hit_way].dirty   = 1'b1;
            tag_wstatus[hit_way].written = hit_dirty;
            ev.written_set   = hit_dirty;
            if (hit_dirty) begin
              ev.ecc_corrected = |dec_single;
              ev.uncorrectable = |dec_double;
            end
            if (need_ecc_wb) begin
              wb_valid = 1'b1;
              tag_wstatus[dirty_way].dirty   = 1'b0;
              tag_wstatus[dirty_way].written = 1'b0;
              ev.ecc_wb        = 1'b1;
              ev.ecc_corrected = |dec_single;
              ev.uncorrectable = |dec_double;
            end
            do_resp    = 1'b1;
            next_state = S_IDLE;
          end
        end else begin
          if (need_repl_wb && !buf_ready) begin
            stall = 1'b1;
          end else begin
            if (need_repl_wb) begin
              wb_valid         = 1'b1;
              ev.repl_wb       = 1'b1;
              ev.ecc_corrected = |dec_single;
              ev.uncorrectable = |dec_double;
            end
            next_state = S_FILL_REQ;
          end
        end
      end

      S_CLEAN: begin
        ev.tag_perr = |(rd_tag_perr | rd_stat_perr);
        if (|cl_wb_mask && !buf_ready) begin
          stall = 1'b1;
        end else begin
          tag_we      = 1'b1;
          tag_wset    = clean_set;
          tag_wstatus = cl_status;
          clean_done  = 1'b1;
          ev.clean_check = 1'b1;
          if (|cl_wb_mask) begin
            wb_valid         = 1'b1;
            wb_laddr         = {rd_tag[dirty_way], clean_set};
            ev.clean_wb      = 1'b1;
            ev.ecc_corrected = |dec_single;
            ev.uncorrectable = |dec_double;
          end
          next_state = S_IDLE;
        end
      end

      S_FILL_REQ: begin
        if (buf_ready) begin
          fill_valid = 1'b1;
          next_state = S_FILL_WAIT;
        end
      end

      S_FILL_WAIT: begin
        if (fill_done) begin
          way_we[victim_q] = 1'b1;
          data_wline     = fill_line;
          tag_we         = 1'b1;
          tag_wtag[victim_q]    = r_tag;
          tag_wstatus[victim_q] = '{valid: 1'b1, dirty: 1'b0, written: 1'b0};
          ev.miss        = 1'b1;
          next_state     = S_REPLAY;
        end
      end

      default: next_state = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_INIT;
      init_set   <= '0;
      rr_ptr     <= '0;
      victim_q   <= '0;
      r_write    <= 1'b0;
      r_addr     <= '0;
      r_wdata    <= '0;
      r_wstrb    <= '0;
      resp_valid <= 1'b0;
      resp_rdata <= '0;
      resp_error <= 1'b0;
      events     <= '0;
    end else begin
      state      <= next_state;
      resp_valid <= do_resp;
      events     <= ev;
      if (state == S_INIT) init_set <= init_set + 1'b1;
      if (grant_l1) begin
        r_write <= req_write;
        r_addr  <= req_addr;
        r_wdata <= req_wdata;
        r_wstrb <= req_wstrb;
      end
      if (do_resp) begin
        resp_rdata <= hit_dirty ? dec_line[r_word*WORD_W +: WORD_W]
                                : way_line[hit_way][r_word*WORD_W +: WORD_W];
        resp_error <= hit_dirty && !r_write && dec_double[r_word];
      end
      // the victim pointer advances on every miss; a parity refetch reuses
      // the failing way
      if (state == S_LOOK && !stall) begin
        if (parity_bad)    victim_q <= hit_way;
        else if (!hit_any) begin
          victim_q <= victim;
          rr_ptr   <= rr_ptr + 1'b1;
        end
      end
    end
  end

  // at most one dirty line per set is the invariant the shared ECC array needs
  a_one_dirty: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_LOOK || state == S_CLEAN) |-> $onehot0(dirty_vec));

endmodule
