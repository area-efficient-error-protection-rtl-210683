// ecc_array: the single ECC array shared by all ways of the L2 cache.
//
// One 8-byte entry per set holds the SECDED check bytes (one per 64-bit word)
// of the one dirty line that set may contain. The document sizes it at 32KB,
// 4K entries of 8 bytes, a quarter of the per-way ECC arrays of a conventional
// cache. Whose line an entry protects is not stored: it is the line of the set
// whose dirty bit is set.
//
// Interface and timing: single port; a read returns the entry one cycle after
// rd_en and holds it until the next read; a write stores wr_ecc at wr_set.
module ecc_array
  import l2ecc_pkg::*;
#(
  parameter int unsigned SETS = 4096
) (
  input  logic                    clk,
  input  logic                    rd_en,
  input  logic [$clog2(SETS)-1:0] rd_set,
  output logic [ECC_W-1:0]        rd_ecc,
  input  logic                    wr_en,
  input  logic [$clog2(SETS)-1:0] wr_set,
  input  logic [ECC_W-1:0]        wr_ecc
);

  logic [ECC_W-1:0] mem [SETS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_set] <= wr_ecc;
    if (rd_en) rd_ecc <= mem[rd_set];
  end

endmodule
