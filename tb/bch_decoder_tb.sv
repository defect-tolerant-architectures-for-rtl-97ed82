// bch_decoder_tb: self-checking test of the BCH(255,179,t=10) decoder.
//
// Codewords are built here by long division with the generator polynomial of the code,
// written out as a constant (independent of the encoder block). Random words with 0..T
// random bit errors must come back exactly, with the right error count, no fail flag and
// a latency of exactly T + 2 cycles. Words with T+1..T+4 errors must never be returned as
// the original codeword, and some of them must be flagged uncorrectable.
module bch_decoder_tb;
  localparam int M = 8, T = 10, K = 179, N = 255, P = N - K;
  localparam logic [P:0] G = 77'h12ca7239ee08d439812d;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, fail;
  logic [N-1:0] r, v;
  logic [K-1:0] data;
  logic [8:0] nerr;
  int checks = 0, failures = 0, cyc = 0, nfail = 0;

  bch_decoder dut (.clk, .rst_n, .in_valid, .in_ready, .r, .out_valid, .v, .data, .nerr, .fail);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] encode(input logic [K-1:0] u);
    logic [N-1:0] w;
    w = {u, {P{1'b0}}};
    for (int i = N - 1; i >= P; i--)
      if (w[i]) w[i -: P+1] = w[i -: P+1] ^ G;
    return {u, w[P-1:0]};
  endfunction

  function automatic logic [K-1:0] rand_data();
    logic [K-1:0] u;
    for (int i = 0; i < K; i += 32) u[i +: 32] = $urandom;
    return u;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input int nerrs);
    logic [K-1:0] u;
    logic [N-1:0] c, e;
    int t0, pos;
    u = rand_data();
    c = encode(u);
    e = '0;
    for (int k = 0; k < nerrs; k++) begin
      do pos = $urandom_range(N - 1); while (e[pos]);
      e[pos] = 1'b1;
    end
    @(negedge clk);
    wait (in_ready);
    @(negedge clk);
    r = c ^ e;
    in_valid = 1;
    t0 = cyc;
    @(negedge clk);
    in_valid = 0;
    wait (out_valid);
    if (nerrs <= T) begin
      check(v == c, $sformatf("corrected word, %0d errors", nerrs));
      check(data == u, "information bits");
      check(nerr == 9'(nerrs), $sformatf("error count %0d vs %0d", nerr, nerrs));
      check(!fail, "fail flag on correctable word");
      // t0 is sampled one edge before the capturing edge
      check(cyc - t0 - 1 == T + 2, $sformatf("latency %0d", cyc - t0 - 1));
    end else begin
      check(v != c || fail, "uncorrectable word reported as clean");
      if (fail) nfail++;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // zero word and the all-ones word (a codeword of every primitive narrow-sense BCH code)
    for (int n = 0; n <= T; n++) run(n);
    for (int i = 0; i < 200; i++) run($urandom_range(T));
    for (int i = 0; i < 40; i++) run(T + 1 + $urandom_range(3));
    check(encode({K{1'b1}}) == {N{1'b1}}, "all-ones codeword reference");
    check(nfail > 0, "some uncorrectable words flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
