// bch_chien: step 3 of the BCH decoder - error-location search and correction.
//
// Every code position i = 0 .. N-1 has its own test circuit that checks in parallel
// whether alpha^(-i) is a root of sigma(X), i.e. whether 1 + sum_j sigma_j alpha^(-ij)
// is zero. A test circuit is T constant multipliers (sigma_j times the fixed element
// alpha^(-ij)), M T-bit XOR trees, and a final M-bit zero detector. Because each position
// tests the inverse element directly, no inversion of the roots is needed. The received
// bit of every position whose test fires is flipped by one XOR gate.
// The roots are also counted: a word is reported uncorrectable when their number differs
// from the degree of sigma (this check is this design's addition; it is what lets the
// memory's self-test find fragments the code cannot fix).
// Interface and timing: purely combinational; r is the received word, sigma/deg come
// from the Berlekamp-Massey stage, v is the corrected word.
module bch_chien #(
  parameter int unsigned M    = gf_pkg::GF_M_DEF,
  parameter int unsigned POLY = gf_pkg::GF_POLY_DEF,
  parameter int unsigned T    = gf_pkg::BCH_T_DEF,
  localparam int unsigned N   = (1 << M) - 1
) (
  input  logic [N-1:0]       r,
  input  logic [T:0][M-1:0]  sigma,
  input  logic [7:0]         deg,
  output logic [N-1:0]       v,
  output logic [N-1:0]       err_loc,
  output logic [8:0]         nerr,
  output logic               fail
);
  localparam gf_pkg::gf_tab_t EXP = gf_pkg::gf_exp_table(M, POLY);

  for (genvar i = 0; i < N; i++) begin : g_test
    logic [T:1][M-1:0] term;
    logic [M-1:0]      sum;
    for (genvar j = 1; j <= T; j++) begin : g_cm
      // constant multiplier by alpha^(-i*j)
      localparam logic [M-1:0] C = M'(EXP[(N - ((i * j) % N)) % N]);
      always_comb term[j] = M'(gf_pkg::gf_mul(gf_pkg::gf_t'(sigma[j]), gf_pkg::gf_t'(C), M, POLY));
    end
    always_comb begin
      sum = sigma[0];
      for (int j = 1; j <= int'(T); j++) sum = sum ^ term[j];
    end
    assign err_loc[i] = ~|sum;
  end

  assign v = r ^ err_loc;

  always_comb begin
    nerr = '0;
    for (int i = 0; i < int'(N); i++) nerr = nerr + 9'(err_loc[i]);
  end

  assign fail = (nerr != 9'(deg)) || (deg > 8'(T));
endmodule
