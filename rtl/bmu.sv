// bmu: branch metric unit of the hard-decision Viterbi decoder.
//
// For the received 2-bit symbol it computes the Hamming distance to each of
// the four possible code words 00, 01, 10 and 11: the received bits are
// compared bit by bit with the code word and the differing bits are counted.
// bm[c] is the branch metric of every trellis branch that carries code word c,
// so the add-compare-select logic picks its metric by the branch's code word.
//
// Interface and timing: purely combinational; rx_code = {c1,c2} as received,
// bm[c] in 0..2.
module bmu
  import vd_pkg::*;
(
  input  code_t rx_code,
  output bm_t   bm [1 << CODE_W]
);

  always_comb begin
    for (int c = 0; c < (1 << CODE_W); c++) begin
      code_t diff;
      diff  = rx_code ^ code_t'(c);
      bm[c] = bm_t'(diff[1]) + bm_t'(diff[0]);
    end
  end

endmodule
