// tb_bmu: exhaustive check of the four Hamming-distance branch metrics for
// every received pair.
module tb_bmu;
  import vd_ref_pkg::*;
  logic [1:0] rx;
  logic [3:0][4:0] bm;
  int checks = 0, failures = 0;

  bmu dut (.rx(rx), .bm(bm));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      rx = 2'(r);
      #1;
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (int'(bm[c]) != hamming2(2'(r), 2'(c))) begin
          failures++;
          $display("rx=%0d code=%0d bm=%0d", r, c, bm[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
