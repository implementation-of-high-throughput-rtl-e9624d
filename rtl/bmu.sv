// bmu: hard-decision branch metric unit.
//
// For a rate-1/2 code every trellis branch carries one of four codewords
// {Y1,Y0} = 00, 01, 10, 11.  The branch metric of a codeword is the Hamming
// distance between it and the received hard-decision pair, i.e. the number of
// differing bits (0, 1 or 2).  The unit computes all four metrics in parallel
// with one XOR and a 2-bit population count per codeword; the ACS units pick
// the metric of their branch by codeword index.
//
// Interface: rx = received {Y1,Y0}; bm[c] = distance(rx, c), zero-extended to
// BM_W bits (5 bits, the branch-metric width the design specifies).  Purely
// combinational.
module bmu
  import vd_pkg::*;
#(
  parameter int unsigned BM_W = BM_W_DEF
) (
  input  logic [1:0]            rx,
  output logic [3:0][BM_W-1:0]  bm
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      logic [1:0] diff;
      diff  = rx ^ c[1:0];
      bm[c] = BM_W'(diff[0]) + BM_W'(diff[1]);
    end
  end

endmodule
