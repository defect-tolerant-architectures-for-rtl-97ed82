// bch_decoder: bit-parallel decoder for a primitive binary BCH code (N = 2^M - 1).
//
// The three decoding steps are separate circuits:
//   1. bch_syndrome  - 2T syndromes by parallel XOR trees (combinational),
//   2. bch_berlekamp - error-location polynomial, one Berlekamp-Massey iteration per
//                      clock with hardware shared by all T iterations,
//   3. bch_chien     - parallel root test of all N positions and correction (combinational).
// Timing: in_valid with the received word r captures it; the syndromes are formed in the
// next cycle and loaded into the Berlekamp-Massey stage, which runs T cycles; the root
// search and correction follow combinationally and the result is registered, so
// out_valid rises exactly T + 2 cycles after the in_valid cycle. One word is decoded at a
// time: in_ready is low while a word is in flight (the decoder is not pipelined).
// Outputs: corrected word v, its information bits data = v[N-1:N-K], the number of
// corrected bits nerr and the uncorrectable flag fail.
module bch_decoder #(
  parameter int unsigned M    = gf_pkg::GF_M_DEF,
  parameter int unsigned POLY = gf_pkg::GF_POLY_DEF,
  parameter int unsigned T    = gf_pkg::BCH_T_DEF,
  parameter int unsigned K    = gf_pkg::BCH_K_DEF,
  localparam int unsigned N   = (1 << M) - 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [N-1:0] r,
  output logic         out_valid,
  output logic [N-1:0] v,
  output logic [K-1:0] data,
  output logic [8:0]   nerr,
  output logic         fail
);
  logic [N-1:0]          r_q;
  logic                  load_q;     // syndromes of r_q go to step 2 this cycle
  logic                  inflight_q;
  logic [2*T-1:0][M-1:0] synd;
  logic                  bm_busy, bm_done;
  logic [T:0][M-1:0]     sigma;
  logic [7:0]            deg;
  logic [N-1:0]          v_c, loc_c;
  logic [8:0]            nerr_c;
  logic                  fail_c;

  bch_syndrome #(.M(M), .POLY(POLY), .T(T)) u_synd (.r(r_q), .s(synd));

  bch_berlekamp #(.M(M), .POLY(POLY), .T(T)) u_bm (
    .clk, .rst_n, .start(load_q), .s(synd), .busy(bm_busy), .done(bm_done),
    .sigma, .deg
  );

  bch_chien #(.M(M), .POLY(POLY), .T(T)) u_chien (
    .r(r_q), .sigma, .deg, .v(v_c), .err_loc(loc_c), .nerr(nerr_c), .fail(fail_c)
  );

  assign in_ready = !inflight_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q        <= '0;
      load_q     <= 1'b0;
      inflight_q <= 1'b0;
      out_valid  <= 1'b0;
      v          <= '0;
      nerr       <= '0;
      fail       <= 1'b0;
    end else begin
      load_q    <= 1'b0;
      out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        r_q        <= r;
        load_q     <= 1'b1;
        inflight_q <= 1'b1;
      end
      if (bm_done) begin
        v          <= v_c;
        nerr       <= nerr_c;
        fail       <= fail_c;
        out_valid  <= 1'b1;
        inflight_q <= 1'b0;
      end
    end
  end

  assign data = v[N-1:N-K];

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) load_q |-> !bm_busy)
    else $error("bch_decoder: new word while step 2 busy");
endmodule
