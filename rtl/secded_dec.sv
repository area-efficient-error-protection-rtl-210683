// secded_dec: SECDED checker and corrector for one 64-bit word.
//
// Recomputes the Hamming syndrome from the stored word and its check byte
// (see secded_enc). With overall parity wrong, the syndrome names the single
// flipped position, which is corrected (a flip of a check bit leaves the data
// unchanged). A non-zero syndrome with overall parity right, or a syndrome
// pointing past position 71, is a double error: single_err_o stays low and
// double_err_o is raised, data passes uncorrected. Purely combinational.
module secded_dec
  import l2ecc_pkg::*;
(
  input  word_t data_i,
  input  chk_t  chk_i,
  output word_t data_o,
  output logic  single_err_o,
  output logic  double_err_o
);

  logic [6:0] syn;
  logic       par;

  always_comb begin
    syn = chk_i[6:0];
    for (int unsigned i = 0; i < WORD_W; i++) begin
      if (data_i[i]) syn ^= data_pos(i);
    end
    par = (^data_i) ^ (^chk_i);

    data_o       = data_i;
    single_err_o = 1'b0;
    double_err_o = 1'b0;
    if (par) begin
      if (syn < 7'd72) begin
        single_err_o = 1'b1;
        for (int unsigned i = 0; i < WORD_W; i++) begin
          if (data_pos(i) == syn) data_o[i] = ~data_i[i];
        end
      end else begin
        double_err_o = 1'b1;
      end
    end else if (syn != 7'd0) begin
      double_err_o = 1'b1;
    end
  end

endmodule
