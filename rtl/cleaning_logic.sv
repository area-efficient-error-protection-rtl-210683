// cleaning_logic: periodic dirty-line cleaning of the L2 cache.
//
// As in the document, it consists of a cycle counter and a latch holding the
// next set number. Every STEP_CYCLES cycles it asks the cache to check the set
// in the latch (clean_req, clean_set). While the cache checks that set it feeds
// the set's line status back in (status_i); the decision outputs say which
// lines to write back and the status to store: a line that is dirty but whose
// written bit is zero has not been modified again and is written back and made
// clean; every written bit of the set is reset to zero. When the cache signals
// clean_done the latch moves on to the next set (wrapping) and the counter
// starts over, so one full sweep of the cache takes CLEAN_INTERVAL cycles plus
// the few cycles each check itself takes.
//
// The document's cleaning interval (1M cycles, Sec. 5.2) is the time in which
// every line is checked once; dividing it evenly over the sets is this
// design's reading. The counter is held while a request waits, because L1
// requests have priority for the cache port. Reset: latch at set 0, counter
// at its full period.
module cleaning_logic
  import l2ecc_pkg::*;
#(
  parameter int unsigned SETS           = 4096,
  parameter int unsigned WAYS           = 4,
  parameter int unsigned CLEAN_INTERVAL = 1 << 20,
  parameter int unsigned STEP_CYCLES    = CLEAN_INTERVAL / SETS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  output logic                    clean_req,
  output logic [$clog2(SETS)-1:0] clean_set,
  input  logic                    clean_done,
  input  line_status_t [WAYS-1:0] status_i,
  output logic [WAYS-1:0]         wb_mask_o,
  output line_status_t [WAYS-1:0] status_o
);

  localparam int unsigned CNT_W = $clog2(STEP_CYCLES + 1);

  logic [CNT_W-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count     <= CNT_W'(STEP_CYCLES - 1);
      clean_set <= '0;
      clean_req <= 1'b0;
    end else if (clean_req) begin
      if (clean_done) begin
        clean_req <= 1'b0;
        clean_set <= clean_set + 1'b1;
        count     <= CNT_W'(STEP_CYCLES - 1);
      end
    end else if (count == '0) begin
      clean_req <= 1'b1;
    end else begin
      count <= count - 1'b1;
    end
  end

  always_comb begin
    for (int unsigned w = 0; w < WAYS; w++) begin
      wb_mask_o[w]         = status_i[w].valid & status_i[w].dirty & ~status_i[w].written;
      status_o[w].valid    = status_i[w].valid;
      status_o[w].dirty    = status_i[w].dirty & ~wb_mask_o[w];
      status_o[w].written  = 1'b0;
    end
  end

endmodule
