// vit_acs: one add-compare-select element.
//
// Two adders form the candidate path metrics of the two branches entering a
// state, a comparator picks the smaller one and a selector passes it on as the
// state's new metric. The comparator result is the decision bit for the
// survivor memory: 1 when the branch from the predecessor whose MSB is 1 wins.
// Ties go to branch 0. Purely combinational.
//
// Metrics are unsigned and allowed to wrap around; the comparison is done
// modulo 2^SMW (the sign of the difference), so no normalisation is needed as
// long as SMW leaves room for twice the largest metric spread. The wrap-around
// comparison is this design's choice; the adder/compare/select structure is the
// standard ACS element.
module vit_acs #(
  parameter int SMW = 10,
  parameter int BMW = 2
) (
  input  logic [SMW-1:0] sm0,   // metric of predecessor with decision bit 0
  input  logic [BMW-1:0] bm0,   // branch metric from that predecessor
  input  logic [SMW-1:0] sm1,   // metric of predecessor with decision bit 1
  input  logic [BMW-1:0] bm1,
  output logic [SMW-1:0] sm,    // surviving metric
  output logic           dec    // decision bit
);

  logic [SMW-1:0] p0, p1, diff;

  always_comb begin
    p0   = sm0 + SMW'(bm0);
    p1   = sm1 + SMW'(bm1);
    diff = p1 - p0;
    dec  = diff[SMW-1];          // p1 < p0 modulo 2^SMW
    sm   = dec ? p1 : p0;
  end

endmodule
