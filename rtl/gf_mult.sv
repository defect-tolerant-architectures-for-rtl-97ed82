// gf_mult: bit-parallel multiplier in GF(2^M) (Mastrovito style).
//
// The product c = a * b is formed in one combinational stage: the M x M AND array of
// partial products is XOR-summed and reduced modulo the field polynomial POLY, so that
// every output bit is an XOR tree over AND terms of depth about 1 AND + 2*log2(M) XOR,
// which is the delay and m^2 AND + m^2 XOR area budget the decoder analysis assumes.
// The reduction is written as a loop and folded by synthesis into the fixed XOR network
// of the Mastrovito matrix. Interface: a, b in, c out, no clock.
module gf_mult #(
  parameter int unsigned M    = gf_pkg::GF_M_DEF,
  parameter int unsigned POLY = gf_pkg::GF_POLY_DEF
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] c
);
  always_comb c = M'(gf_pkg::gf_mul(gf_pkg::gf_t'(a), gf_pkg::gf_t'(b), M, POLY));
endmodule
