// mlo_xor: binary-multilevel exclusive-OR operator.
//
// The multilevel exclusive-OR of a binary value p and a multilevel value r
// whose largest level is radix_m1 (the radix minus one) is
//   EXOR(p, r) = p*radix_m1 + r - 2*p*r,
// which is r when p = 0 and the multilevel complement radix_m1 - r when
// p = 1. When r is the sum of k binary values y_i, EXOR(p, r) equals the sum
// of the k binary XORs p ^ y_i, so one such operator after an adder does
// the work of k XOR gates placed before it. As in the source design's circuit, a
// subtractor forms radix_m1 - r and a 2:1 multiplexer controlled by p picks
// it or r. Purely combinational. The caller keeps r <= radix_m1.
module mlo_xor #(
  parameter int unsigned W = 14
) (
  input  logic         p,
  input  logic [W-1:0] r,
  input  logic [W-1:0] radix_m1,
  output logic [W-1:0] y
);
  logic [W-1:0] complement;

  always_comb begin
    complement = radix_m1 - r;
    y          = p ? complement : r;
  end
endmodule
