// vit_bmu: hard-decision branch metric unit.
//
// For every possible expected code symbol c (all 2^NOUT patterns) the unit XORs
// c with the received hard-decision symbol and counts the ones, giving the
// Hamming distance used as branch metric. Computing the metric once per
// pattern, rather than once per trellis branch, lets all ACS elements share the
// 2^NOUT results. Purely combinational.
//
//   rx  received code symbol, one bit per encoder output
//   bm  bm[c] = Hamming distance between rx and c
//
// The XOR-then-count structure follows the branch metric block of the design;
// hard decision (rather than soft decision) input is also the design's choice
// for its example decoder, and is kept here.
module vit_bmu #(
  parameter int NOUT = 2,
  localparam int BMW = $clog2(NOUT + 1)
) (
  input  logic [NOUT-1:0] rx,
  output logic [BMW-1:0]  bm [2**NOUT]
);

  always_comb begin
    for (int c = 0; c < 2**NOUT; c++) begin
      logic [NOUT-1:0] diff;
      diff  = rx ^ NOUT'(c);
      bm[c] = '0;
      for (int b = 0; b < NOUT; b++) bm[c] += BMW'(diff[b]);
    end
  end

endmodule
