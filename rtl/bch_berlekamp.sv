// bch_berlekamp: step 2 of the BCH decoder - the error-location polynomial sigma(X) by
// the simplified (binary) Berlekamp-Massey iteration.
//
// For a binary code only the odd steps of Berlekamp-Massey are needed, so T iterations
// mu = 0 .. T-1 suffice. One iteration is done per clock cycle by a single set of
// hardware shared by all iterations, sized for the largest degree T:
//   part 2A  sigma^(mu+1) = sigma^(mu) + d_mu * d_rho^-1 * X^(2(mu-rho)) * sigma^(rho)
//            T multipliers form d_mu * sigma^(rho), a shifter multiplies by
//            X^(2(mu-rho)), T multipliers apply d_rho^-1 (from the inversion LUT), and
//            M T-bit XOR trees add the result to sigma^(mu);
//   part 2B  d_(mu+1) = S_(2mu+3) + sigma_1 S_(2mu+2) + ... + sigma_T S_(2mu+3-T)
//            T multipliers and an XOR tree.
// Row rho is the earlier row with d_rho != 0 and the largest 2*rho - l_rho; the control
// unit keeps that row (its sigma, d, degree l and 2*rho) in registers and replaces it
// whenever the row just used qualifies better. The start row rho = -1/2 has sigma = 1,
// d = 1, l = 0.
// Interface: pulse start with the syndromes s (s[j-1] = S_j) valid; done pulses T cycles
// later with sigma (sigma[0] = 1) and its degree deg valid until the next start.
module bch_berlekamp #(
  parameter int unsigned M    = gf_pkg::GF_M_DEF,
  parameter int unsigned POLY = gf_pkg::GF_POLY_DEF,
  parameter int unsigned T    = gf_pkg::BCH_T_DEF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [2*T-1:0][M-1:0]  s,
  output logic                   busy,
  output logic                   done,
  output logic [T:0][M-1:0]      sigma,
  output logic [7:0]             deg
);
  typedef logic [T:0][M-1:0] poly_t;

  logic [2*T-1:0][M-1:0] s_q;       // syndromes held for the whole run
  poly_t             sig_q, sigp_q; // sigma^(mu) and sigma^(rho)
  logic [M-1:0]      d_q, dp_q;     // d_mu and d_rho
  logic signed [9:0] l_q, lp_q;     // degrees l_mu and l_rho
  logic signed [9:0] tr_q;          // 2*rho (-1 for the start row)
  logic [7:0]        mu_q;
  logic signed [9:0] two_mu;        // 2*mu as a signed number

  assign two_mu = signed'({1'b0, mu_q, 1'b0});

  // ---------------- part 2A ----------------
  poly_t        dsp;        // d_mu * sigma^(rho)
  poly_t        shifted;    // ... * X^(2(mu-rho))
  poly_t        corr;       // ... * d_rho^-1
  poly_t        sig_n;
  logic [M-1:0] dp_inv;
  logic signed [9:0] shamt;
  logic signed [9:0] l_n;

  gf_inv #(.M(M), .POLY(POLY)) u_inv (.a(dp_q), .y(dp_inv));

  for (genvar j = 0; j <= T; j++) begin : g_2a
    gf_mult #(.M(M), .POLY(POLY)) u_dsp (.a(d_q),        .b(sigp_q[j]), .c(dsp[j]));
    gf_mult #(.M(M), .POLY(POLY)) u_inv (.a(shifted[j]), .b(dp_inv),    .c(corr[j]));
  end

  always_comb begin
    shamt = two_mu - tr_q;
    for (int j = 0; j <= int'(T); j++)
      shifted[j] = (j >= int'(shamt)) ? dsp[j - int'(shamt)] : '0;
    if (d_q == '0) begin
      sig_n = sig_q;
      l_n   = l_q;
    end else begin
      for (int j = 0; j <= int'(T); j++) sig_n[j] = sig_q[j] ^ corr[j];
      l_n = (l_q > lp_q + shamt) ? l_q : lp_q + shamt;
    end
  end

  // ---------------- part 2B ----------------
  logic [T:1][M-1:0] dterm;
  logic [M-1:0]      d_n;
  logic [T:1][M-1:0] s_sel;

  always_comb
    for (int j = 1; j <= int'(T); j++) begin
      // S_(2mu+3-j), zero when the index falls outside 1 .. 2T
      int idx;
      idx = 2 * int'(mu_q) + 3 - j;
      s_sel[j] = (idx >= 1 && idx <= 2 * int'(T)) ? s_q[idx-1] : '0;
    end

  for (genvar j = 1; j <= T; j++) begin : g_2b
    gf_mult #(.M(M), .POLY(POLY)) u_dm (.a(sig_n[j]), .b(s_sel[j]), .c(dterm[j]));
  end

  always_comb begin
    int idx0;
    idx0 = 2 * int'(mu_q) + 3;
    d_n = (idx0 <= 2 * int'(T)) ? s_q[idx0-1] : '0;
    for (int j = 1; j <= int'(T); j++) d_n = d_n ^ dterm[j];
  end

  // ---------------- control unit ----------------
  logic better;
  always_comb better = (d_q != '0) && ((two_mu - l_q) > (tr_q - lp_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      mu_q   <= '0;
      s_q    <= '0;
      sig_q  <= '0;
      sigp_q <= '0;
      d_q    <= '0;
      dp_q   <= '0;
      l_q    <= '0;
      lp_q   <= '0;
      tr_q   <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy   <= 1'b1;
        mu_q   <= '0;
        s_q    <= s;
        sig_q  <= poly_t'(1);
        sigp_q <= poly_t'(1);
        d_q    <= s[0];
        dp_q   <= M'(1);
        l_q    <= '0;
        lp_q   <= '0;
        tr_q   <= -10'sd1;
      end else if (busy) begin
        sig_q <= sig_n;
        l_q   <= l_n;
        d_q   <= d_n;
        if (better) begin
          sigp_q <= sig_q;
          dp_q   <= d_q;
          lp_q   <= l_q;
          tr_q   <= two_mu;
        end
        mu_q <= mu_q + 8'd1;
        if (mu_q == 8'(T - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign sigma = sig_q;
  assign deg   = 8'(l_q);

  // handshake rule: a new word may start only when the previous run has finished
  a_busy_start: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("bch_berlekamp: start while busy");
endmodule
