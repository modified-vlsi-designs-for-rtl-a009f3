// ldpc_sign_product: sign products of a group of LDPC check nodes.
//
// In log-domain sum-product decoding each check node c forms the product of
// the signs of the variable-to-check messages L_cn it receives. With signs
// coded as bits (1 = negative) the product is the XOR of the sign bits, the
// same circuit as the check-sum of the hard decisions. The binary mapping of
// the product, S_c, is 1 when the product is negative. This module computes
// S_c for P check nodes of degree WR at once and also counts the ones among
// them, which is the contribution of this group to the early-stopping sum S_S.
//
// Interface: sign[c][j] is the sign bit of the j-th message into check node c;
// sc[c] is S_c; ones is the number of set bits of sc. Purely combinational.
//
// XOR-based sign product and the S_S sum follow the design; the grouping of P
// check nodes per cycle is this design's choice. WR = 6 is the row weight of
// the (3,6) code the design evaluates.
module ldpc_sign_product #(
  parameter int P  = 8,
  parameter int WR = 6,
  localparam int CW = $clog2(P + 1)
) (
  input  logic [WR-1:0] sign [P],
  output logic [P-1:0]  sc,
  output logic [CW-1:0] ones
);

  always_comb begin
    ones = '0;
    for (int c = 0; c < P; c++) begin
      sc[c] = ^sign[c];
      ones += CW'(sc[c]);
    end
  end

endmodule
