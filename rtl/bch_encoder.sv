// bch_encoder: systematic encoder of the binary BCH code used on the write path.
//
// Codeword c(x) = x^(N-K) u(x) + (x^(N-K) u(x) mod g(x)): the K information bits occupy
// positions N-K .. N-1 unchanged and the N-K parity bits positions 0 .. N-K-1. The
// generator polynomial g(x) is the product of (x + alpha^e) over the cyclotomic cosets of
// alpha^1, alpha^3, ..., alpha^(2T-1); it and the parity matrix are computed at
// elaboration, so the hardware is N-K parallel XOR trees over the information bits.
// K must equal N - deg g(x) (179 for N = 255, T = 10). Purely combinational.
module bch_encoder #(
  parameter int unsigned M    = gf_pkg::GF_M_DEF,
  parameter int unsigned POLY = gf_pkg::GF_POLY_DEF,
  parameter int unsigned T    = gf_pkg::BCH_T_DEF,
  parameter int unsigned K    = gf_pkg::BCH_K_DEF,
  localparam int unsigned N   = (1 << M) - 1,
  localparam int unsigned P   = N - K
) (
  input  logic [K-1:0] u,
  output logic [N-1:0] c
);
  // binary generator polynomial, bit i = coefficient of x^i
  function automatic logic [N:0] gen_poly();
    gf_pkg::gf_tab_t ex, lg, g;
    int unsigned dg;
    logic [N-1:0] inset;
    int unsigned e;
    logic [N:0] res;
    ex = gf_pkg::gf_exp_table(M, POLY);
    lg = gf_pkg::gf_log_table(M, POLY);
    inset = '0;
    for (int unsigned j = 1; j < 2*T; j += 2) begin
      e = j;
      for (int unsigned c2 = 0; c2 < M; c2++) begin
        inset[e] = 1'b1;
        e = (2 * e) % N;
      end
    end
    g = '0;
    g[0] = 16'd1;
    dg = 0;
    // multiply by (x + alpha^x) for every root, using log/antilog tables
    for (int unsigned x = 1; x < N; x++)
      if (inset[x]) begin
        dg++;
        for (int d = int'(dg); d >= 0; d--)
          g[d] = ((g[d] == 0) ? 16'd0 : ex[(32'(lg[g[d]]) + x) % N]) ^
                 ((d > 0) ? g[d-1] : 16'd0);
      end
    for (int unsigned d = 0; d <= N; d++) res[d] = g[d][0];
    return res;
  endfunction

  localparam logic [N:0] GEN = gen_poly();

  typedef logic [P-1:0][K-1:0] pmask_t;
  function automatic pmask_t parity_masks();
    logic [P-1:0] rem;
    pmask_t mk;
    rem = GEN[P-1:0];             // x^P mod g
    mk  = '0;
    for (int unsigned i = 0; i < K; i++) begin
      for (int unsigned p = 0; p < P; p++) mk[p][i] = rem[p];
      rem = rem[P-1] ? ({rem[P-2:0], 1'b0} ^ GEN[P-1:0]) : {rem[P-2:0], 1'b0};
    end
    return mk;
  endfunction

  localparam pmask_t PMASK = parity_masks();

  for (genvar p = 0; p < P; p++) begin : g_par
    assign c[p] = ^(u & PMASK[p]);
  end
  assign c[N-1:P] = u;
endmodule
