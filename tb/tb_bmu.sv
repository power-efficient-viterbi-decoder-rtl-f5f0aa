// tb_bmu: exhaustive self-checking test of the branch metric unit.
//
// For all four received symbols it checks the Hamming distance to each of the
// four code words against a bit-by-bit count done here.
module tb_bmu;
  import vd_pkg::*;

  code_t rx_code;
  bm_t   bm [1 << CODE_W];
  int    checks = 0;
  int    failures = 0;

  bmu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      rx_code = code_t'(r);
      #1;
      for (int c = 0; c < 4; c++) begin
        int hd;
        hd = ((r >> 1) != (c >> 1) ? 1 : 0) + ((r & 1) != (c & 1) ? 1 : 0);
        checks++;
        if (int'(bm[c]) != hd) begin
          failures++;
          $display("FAIL rx=%0d code=%0d bm=%0d expected %0d", r, c, bm[c], hd);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
