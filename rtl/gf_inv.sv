// gf_inv: inversion in GF(2^M) by a hard-wired look-up table.
//
// For the small fields used by the BCH decoder (M < 10) the fastest inverter is a ROM
// of 2^M entries, addressed by the operand. The table is computed at elaboration from
// the power and logarithm tables of the field: inv(alpha^e) = alpha^(2^M - 1 - e).
// The inverse of zero is returned as zero (the decoder never uses it). Purely
// combinational: a in, y out.
module gf_inv #(
  parameter int unsigned M    = gf_pkg::GF_M_DEF,
  parameter int unsigned POLY = gf_pkg::GF_POLY_DEF
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] y
);
  localparam int unsigned N = (1 << M) - 1;

  function automatic logic [(1<<M)*M-1:0] build_table();
    gf_pkg::gf_tab_t ex, lg;
    logic [(1<<M)*M-1:0] t;
    ex = gf_pkg::gf_exp_table(M, POLY);
    lg = gf_pkg::gf_log_table(M, POLY);
    t  = '0;
    for (int unsigned v = 1; v <= N; v++)
      t[v*M +: M] = M'(ex[(N - 32'(lg[v])) % N]);
    return t;
  endfunction

  localparam logic [(1<<M)*M-1:0] INV_TABLE = build_table();

  always_comb y = INV_TABLE[a*M +: M];
endmodule
