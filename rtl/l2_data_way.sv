// l2_data_way: data array of one L2 way together with its parity-bits array.
//
// Holds SETS lines of 64 bytes. Next to every line sit 8 parity bits, one per
// 64-bit word; in the document each way has such a parity array in place of
// the per-way ECC array of a conventional cache. Parity is generated here on
// every write and checked on every read.
//
// Interface and timing: single port, write wins over read in the same cycle is
// not allowed (the controller never does it). A read (rd_en) returns the line
// and its per-word parity-error flags in the next cycle; the outputs hold until
// the next read. A write (wr_en) stores a whole line and its fresh parity.
// Whole-line width, single port and registered read are this design's choices.
module l2_data_way
  import l2ecc_pkg::*;
#(
  parameter int unsigned SETS = 4096
) (
  input  logic                    clk,
  input  logic                    rd_en,
  input  logic [$clog2(SETS)-1:0] rd_set,
  output line_t                   rd_line,
  output logic [LINE_WORDS-1:0]   rd_perr,
  input  logic                    wr_en,
  input  logic [$clog2(SETS)-1:0] wr_set,
  input  line_t                   wr_line
);

  line_t                 data_mem [SETS];
  logic [LINE_WORDS-1:0] par_mem  [SETS];
  logic [LINE_WORDS-1:0] par_q;
  logic [LINE_WORDS-1:0] wr_par;

  always_comb begin
    for (int unsigned w = 0; w < LINE_WORDS; w++)
      wr_par[w] = word_parity(wr_line[w*WORD_W +: WORD_W]);
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      data_mem[wr_set] <= wr_line;
      par_mem[wr_set]  <= wr_par;
    end
    if (rd_en) begin
      rd_line <= data_mem[rd_set];
      par_q   <= par_mem[rd_set];
    end
  end

  always_comb begin
    for (int unsigned w = 0; w < LINE_WORDS; w++)
      rd_perr[w] = word_parity(rd_line[w*WORD_W +: WORD_W]) ^ par_q[w];
  end

endmodule
