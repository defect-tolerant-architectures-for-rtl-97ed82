// bch_syndrome: step 1 of the bit-parallel BCH decoder - syndrome evaluation.
//
// S_j = r(alpha^j) for j = 1 .. 2T. Written out bit by bit, S = r * H^T, and every one
// of the 2*T*M syndrome bits is the XOR of the received bits r_i whose column of H has a
// one in that position: one XOR tree per syndrome bit, all trees working in parallel on
// the same received vector. The masks that select each tree's inputs are computed at
// elaboration from the field's power table (bit b of alpha^(i*j)); a tree spans about
// N/2 inputs on average and log2(N) XOR levels at worst.
// Interface: r[N-1:0] is the received word, bit i the coefficient of x^i; s[j-1] is S_j.
// Purely combinational.
module bch_syndrome #(
  parameter int unsigned M    = gf_pkg::GF_M_DEF,
  parameter int unsigned POLY = gf_pkg::GF_POLY_DEF,
  parameter int unsigned T    = gf_pkg::BCH_T_DEF,
  localparam int unsigned N   = (1 << M) - 1
) (
  input  logic [N-1:0]         r,
  output logic [2*T-1:0][M-1:0] s
);
  localparam gf_pkg::gf_tab_t EXP = gf_pkg::gf_exp_table(M, POLY);

  // inputs of the tree for bit b of S_j: positions i where bit b of alpha^(i*j) is set
  function automatic logic [N-1:0] tree_mask(input int unsigned j, input int unsigned b);
    logic [N-1:0] mk;
    for (int unsigned i = 0; i < N; i++) mk[i] = EXP[(i * j) % N][b];
    return mk;
  endfunction

  // one XOR tree per syndrome bit
  for (genvar q = 0; q < 2*T*M; q++) begin : g_tree
    localparam logic [N-1:0] MASK = tree_mask(q / M + 1, q % M);
    assign s[q / M][q % M] = ^(r & MASK);
  end
endmodule
