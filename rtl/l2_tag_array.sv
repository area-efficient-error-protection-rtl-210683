// l2_tag_array: tags and status bits of all ways of the L2 cache.
//
// Per line it keeps the tag, the valid and dirty bits and the written bit the
// document adds for cleaning, plus one parity bit over the tag and one over
// the status bits (the document protects tags and status bits with one parity
// bit each). Parity is produced on write and checked on read.
//
// Interface and timing: one entry holds all WAYS lines of a set and is read
// and written as a whole. A read returns tags, status and per-way parity-error
// flags one cycle after rd_en and holds them until the next read. The array is
// not reset; the cache controller writes every set invalid after reset.
// Whole-set access and the registered read are this design's choices.
module l2_tag_array
  import l2ecc_pkg::*;
#(
  parameter int unsigned SETS  = 4096,
  parameter int unsigned WAYS  = 4,
  parameter int unsigned TAG_W = 14
) (
  input  logic                           clk,
  input  logic                           rd_en,
  input  logic [$clog2(SETS)-1:0]        rd_set,
  output logic [WAYS-1:0][TAG_W-1:0]     rd_tag,
  output line_status_t [WAYS-1:0]        rd_status,
  output logic [WAYS-1:0]                rd_tag_perr,
  output logic [WAYS-1:0]                rd_stat_perr,
  input  logic                           wr_en,
  input  logic [$clog2(SETS)-1:0]        wr_set,
  input  logic [WAYS-1:0][TAG_W-1:0]     wr_tag,
  input  line_status_t [WAYS-1:0]        wr_status
);

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    line_status_t     status;
    logic             tag_par;
    logic             stat_par;
  } tag_entry_t;

  tag_entry_t [WAYS-1:0] mem [SETS];
  tag_entry_t [WAYS-1:0] wr_entry;
  tag_entry_t [WAYS-1:0] rd_q;

  always_comb begin
    for (int unsigned w = 0; w < WAYS; w++) begin
      wr_entry[w].tag      = wr_tag[w];
      wr_entry[w].status   = wr_status[w];
      wr_entry[w].tag_par  = ^wr_tag[w];
      wr_entry[w].stat_par = ^wr_status[w];
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_set] <= wr_entry;
    if (rd_en) rd_q <= mem[rd_set];
  end

  always_comb begin
    for (int unsigned w = 0; w < WAYS; w++) begin
      rd_tag[w]       = rd_q[w].tag;
      rd_status[w]    = rd_q[w].status;
      rd_tag_perr[w]  = (^rd_q[w].tag) ^ rd_q[w].tag_par;
      rd_stat_perr[w] = (^rd_q[w].status) ^ rd_q[w].stat_par;
    end
  end

endmodule
